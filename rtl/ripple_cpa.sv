// ripple_cpa: carry-propagate adder for the last two rows of a carry-save
// reduction (the horizontal last stage of the multiplier arrays).
//
// A chain of W full adders; the carry ripples from bit 0 to bit W-1, so the
// delay grows linearly with W. Inputs a, b and cin; outputs the W-bit sum
// and the carry out. Combinational.
// The source design asks only for a carry-propagate adder at this point; the
// ripple-carry form is this design's choice, the simplest that does it.
module ripple_cpa #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[W];
endmodule
