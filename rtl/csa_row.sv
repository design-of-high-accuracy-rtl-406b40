// csa_row: one carry-save adder row (3:2 compressor row).
//
// A ladder of standalone full adders, one per bit, with no carry chain: bit i
// of x, y and z go into full adder i, which gives sum bit i and a carry that
// has the weight of bit i+1. The carry vector is returned already shifted
// into its own weight, so x + y + z == sum + carry (modulo 2^W).
// The carry out of the top bit is dropped; callers size W so that it is 0
// or lies beyond the bits they keep.
// Combinational, one full-adder delay whatever W is.
// The row of standalone full adders follows the carry-save adder this design
// is based on; dropping the top carry is this design's choice.
module csa_row #(
  parameter int W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] c;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(x[i]), .b(y[i]), .cin(z[i]), .s(sum[i]), .cout(c[i]));
  end

  // Carries move one column to the left; bit 0 of the carry vector is empty.
  assign carry = {c[W-2:0], 1'b0};

  // c[W-1] is the carry out of the top column, outside the W-bit result.
  logic unused_top_carry;
  assign unused_top_carry = c[W-1];
endmodule
