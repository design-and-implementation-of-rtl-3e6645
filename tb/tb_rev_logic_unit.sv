// tb_rev_logic_unit: self-checking test of the reversible logic unit.
// Drives corner and random operand pairs and compares all five outputs (AND,
// OR, NOT of A, XOR, NAND) with the SystemVerilog operators.
module tb_rev_logic_unit;
  localparam int unsigned WIDTH = 16;
  logic [WIDTH-1:0] a, b, and_o, or_o, not_o, xor_o, nand_o;
  int checks = 0, failures = 0;

  rev_logic_unit #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .and_o(and_o), .or_o(or_o),
                                       .not_o(not_o), .xor_o(xor_o), .nand_o(nand_o));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [WIDTH-1:0] ta, input logic [WIDTH-1:0] tb);
    a = ta; b = tb;
    #1;
    checks += 5;
    if (and_o  !== (ta & tb))    begin failures++; $display("FAIL AND  %h %h -> %h", ta, tb, and_o);  end
    if (or_o   !== (ta | tb))    begin failures++; $display("FAIL OR   %h %h -> %h", ta, tb, or_o);   end
    if (not_o  !== ~ta)          begin failures++; $display("FAIL NOT  %h -> %h", ta, not_o);         end
    if (xor_o  !== (ta ^ tb))    begin failures++; $display("FAIL XOR  %h %h -> %h", ta, tb, xor_o);  end
    if (nand_o !== ~(ta & tb))   begin failures++; $display("FAIL NAND %h %h -> %h", ta, tb, nand_o); end
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, '0);
    check_one('0, '1);
    check_one('1, '1);
    check_one(16'haaaa, 16'h5555);
    for (int n = 0; n < 2000; n++)
      check_one(WIDTH'($urandom), WIDTH'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
