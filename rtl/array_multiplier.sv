// array_multiplier: unsigned N x N -> 2N parallel array multiplier built from
// carry-save full-adder rows.
//
// Partial product row j is a AND b[j], shifted left by j. The first three
// rows meet in one row of full adders; each further row adds one more row of
// full adders whose inputs are the previous row's sum and carry vectors and
// the new partial product. Sum and carry never propagate sideways inside
// these rows; the last stage is a ripple carry-propagate adder, the only
// horizontal data path. The array is combinational: the division into
// pipeline stages is not registered here.
// Interface: a, b in (unsigned), p = a * b out.
// The row structure follows the carry-save array multiplier it is modelled
// on; unsigned operands and the default N = 16 are this design's choices.
module array_multiplier #(
  parameter int N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int W = 2 * N;

  logic [W-1:0] ops [N];
  for (genvar j = 0; j < N; j++) begin : g_pp
    assign ops[j] = W'(a & {N{b[j]}}) << j;
  end

  multi_operand_adder #(.W(W), .OPS(N), .OUT_W(W)) u_add (
    .ops(ops), .sum(p)
  );
endmodule
