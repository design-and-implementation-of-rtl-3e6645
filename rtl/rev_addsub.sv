// rev_addsub: WIDTH-bit reversible ripple adder/subtractor built from a chain
// of JRC gates.
//
// One JRC gate per bit. Bit i takes A[i], B[i], the carry/borrow from bit i-1
// (Cin for bit 0) and the constant D = 0; its Sel line is the shared SUB
// control. With SUB = 0 the unit computes SUM = A + B + CIN and COUT is the
// carry out; with SUB = 1 it computes SUM = A - B - CIN and COUT is the borrow
// out (1 when A < B + CIN). The carry/borrow ripples from bit 0 up, so the
// delay grows with WIDTH; there is no register. A 16-bit unit uses 16 JRC
// gates, as the design specifies; the outputs P, R and T of each gate are
// garbage outputs and are left unused.
module rev_addsub #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             sub,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  // carry[i] enters bit i; carry[WIDTH] leaves the top bit.
  logic [WIDTH:0]   carry;
  // Garbage outputs of the JRC gates (P, R, T of each bit).
  logic [WIDTH-1:0] g_p, g_r, g_t;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    rev_jrc_gate u_jrc (
      .a  (a[i]),
      .b  (b[i]),
      .c  (carry[i]),
      .d  (1'b0),
      .sel(sub),
      .p  (g_p[i]),
      .q  (sum[i]),
      .r  (g_r[i]),
      .s  (carry[i+1]),
      .t  (g_t[i])
    );
  end

  assign cout = carry[WIDTH];
endmodule
