// rev_result_select: picks one of the ALU's eight result words by the 3-bit
// operation select, using a tree of Fredkin gates as 2:1 multiplexers.
//
// Each bit position has a three-level tree: four Fredkin gates controlled by
// SEL[0], two by SEL[1] and one by SEL[2], seven in all. A Fredkin gate with
// control S and data lines X0, X1 puts X0 on its Q output when S = 0 and X1
// when S = 1. Word k of RES_IN appears on Y when SEL = k. The ALU performs
// every operation at once and this block delivers the one the control signal
// asks for, as the design describes; building the selection from Fredkin
// gates is this implementation's own choice. Purely combinational.
module rev_result_select #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] res_in [8],
  input  logic [2:0]   sel,
  output logic [W-1:0] y
);
  logic [W-1:0] lvl1 [4];
  logic [W-1:0] lvl2 [2];

  for (genvar i = 0; i < W; i++) begin : g_bit
    // Garbage outputs: the P and R lines of the seven gates.
    logic [6:0] g_p, g_r;

    for (genvar k = 0; k < 4; k++) begin : g_l1
      rev_fredkin_gate u_mux (.a(sel[0]), .b(res_in[2*k][i]), .c(res_in[2*k+1][i]),
                              .p(g_p[k]), .q(lvl1[k][i]), .r(g_r[k]));
    end
    for (genvar k = 0; k < 2; k++) begin : g_l2
      rev_fredkin_gate u_mux (.a(sel[1]), .b(lvl1[2*k][i]), .c(lvl1[2*k+1][i]),
                              .p(g_p[4+k]), .q(lvl2[k][i]), .r(g_r[4+k]));
    end
    rev_fredkin_gate u_mux (.a(sel[2]), .b(lvl2[0][i]), .c(lvl2[1][i]),
                            .p(g_p[6]), .q(y[i]), .r(g_r[6]));
  end
endmodule
