// booth_multiplier: signed N x N -> 2N radix-4 modified Booth multiplier with
// carry-save partial-product reduction.
//
// Three steps. (1) Partial products: the multiplier b is cut into N/2
// overlapping 3-bit groups {b[2k+1], b[2k], b[2k-1]}, with a 0 padded below
// b[0]; each group is encoded by mbe_encoder into NEG/ONE/TWO and
// mbe_decoder turns the multiplicand a into an (N+1)-bit row 0, +-A or +-2A
// (one's complement when negative). Each row is sign-extended to 2N bits and
// shifted left by 2k. The NEG bits, which complete the two's complement of
// the negative rows, are collected in one extra row, NEG_k at bit 2k.
// (2) The N/2 + 1 rows are reduced to a sum and a carry vector by rows of
// full adders, and (3) added by a ripple carry-propagate adder
// (multi_operand_adder with OUT_W = 2N, i.e. modulo 2^2N).
// Rows are sign-extended in full rather than with a sign-extension
// constant; that choice and the plain NEG row are this design's own.
// Interface: a, b in (two's complement), p = a * b out. Combinational.
// N must be even.
module booth_multiplier
  import mult_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0]   a,   // multiplicand
  input  logic [N-1:0]   b,   // multiplier
  output logic [2*N-1:0] p
);
  localparam int ND = N / 2;          // Booth digits
  localparam int W  = 2 * N;

  logic [N:0]   bx;                   // {b, 0}: b[k] is bx[k+1]
  assign bx = {b, 1'b0};

  booth_sel_t   sel [ND];
  logic [N:0]   row [ND];
  logic [W-1:0] ops [ND+1];
  logic [W-1:0] neg_row;

  for (genvar k = 0; k < ND; k++) begin : g_digit
    mbe_encoder u_enc (.grp(bx[2*k+2 -: 3]), .sel(sel[k]));
    mbe_decoder #(.N(N)) u_dec (.a(a), .sel(sel[k]), .pp(row[k]));
    // Sign-extend the (N+1)-bit row to 2N bits, then place it at weight 4^k.
    assign ops[k] = W'({{(W-N-1){row[k][N]}}, row[k]}) << (2 * k);
  end

  always_comb begin
    neg_row = '0;
    for (int k = 0; k < ND; k++) neg_row[2*k] = sel[k].neg;
  end
  assign ops[ND] = neg_row;

  multi_operand_adder #(.W(W), .OPS(ND + 1), .OUT_W(W)) u_add (
    .ops(ops), .sum(p)
  );
endmodule
