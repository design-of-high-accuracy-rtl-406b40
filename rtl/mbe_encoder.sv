// mbe_encoder: radix-4 modified Booth encoder for one group of the multiplier.
//
// Takes the overlapping triple (y[i+1], y[i], y[i-1]) of the multiplier
// (y[-1] = 0 for the first group) and returns the select signals of the
// Booth digit -2..+2, following the encoding table:
//   y[i+1] y[i] y[i-1] | digit | NEG ONE TWO
//     0     0     0    |   0   |  0   0   0
//     0     0     1    |  +A   |  0   1   0
//     0     1     0    |  +A   |  0   1   0
//     0     1     1    |  +2A  |  0   0   1
//     1     0     0    |  -2A  |  1   0   1
//     1     0     1    |  -A   |  1   1   0
//     1     1     0    |  -A   |  1   1   0
//     1     1     1    |   0   |  0   0   0
// NEG is y[i+1] except for 111, where the table gives a digit of 0 with
// NEG = 0; ONE is y[i] ^ y[i-1]; TWO marks 011 and 100. Combinational.
module mbe_encoder
  import mult_pkg::*;
(
  input  logic [2:0]  grp,   // {y[i+1], y[i], y[i-1]}
  output booth_sel_t  sel
);
  always_comb begin
    sel.one = grp[1] ^ grp[0];
    sel.two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    sel.neg = grp[2] & ~(grp[1] & grp[0]);
  end
endmodule
