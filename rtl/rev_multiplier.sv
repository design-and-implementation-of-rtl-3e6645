// rev_multiplier: WIDTH x WIDTH unsigned array multiplier built from
// reversible gates, giving a 2*WIDTH-bit product.
//
// Partial product bit pp[i][j] = A[j] & B[i] comes from a Fredkin gate with
// control B[i], data A[j] and a constant 0 (output R). The rows are then summed
// by WIDTH-1 ripple adders, each a rev_addsub chain of JRC gates held in add
// mode: row i adds pp[i] to the upper WIDTH bits of the running sum (with its
// carry), and the lowest bit of each running sum drops out as one product bit.
// The multiplier itself is named by the design but its structure is not
// given; this array structure, unsigned operands and the full 2*WIDTH-bit
// result are this implementation's own choices. Purely combinational; the
// delay grows with about 2*WIDTH gate stages.
module rev_multiplier #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] prod
);
  // pp[i] is A masked by B[i].
  logic [WIDTH-1:0] pp [WIDTH];
  // acc[i] is the WIDTH+1-bit running sum after row i (carry on top).
  logic [WIDTH:0]   acc [WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_pp_row
    for (genvar j = 0; j < WIDTH; j++) begin : g_pp_bit
      logic g_p, g_q;
      rev_fredkin_gate u_pp (.a(b[i]), .b(a[j]), .c(1'b0),
                             .p(g_p), .q(g_q), .r(pp[i][j]));
    end
  end

  assign acc[0] = {1'b0, pp[0]};
  if (WIDTH > 1) begin : g_bit0
    assign prod[0] = acc[0][0];
  end

  for (genvar i = 1; i < WIDTH; i++) begin : g_sum_row
    rev_addsub #(.WIDTH(WIDTH)) u_row (
      .a   (acc[i-1][WIDTH:1]),
      .b   (pp[i]),
      .cin (1'b0),
      .sub (1'b0),
      .sum (acc[i][WIDTH-1:0]),
      .cout(acc[i][WIDTH])
    );
    if (i < WIDTH - 1) begin : g_out_bit
      assign prod[i] = acc[i][0];
    end
  end

  assign prod[2*WIDTH-1:WIDTH-1] = acc[WIDTH-1];
endmodule
