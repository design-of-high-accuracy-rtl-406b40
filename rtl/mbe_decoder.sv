// mbe_decoder: modified Booth decoder, one partial-product row.
//
// Forms the N+1 bit row for one Booth digit from the N-bit multiplicand A
// (two's complement). Each bit j is
//   pp[j] = ((ONE & A[j]) | (TWO & A[j-1])) ^ NEG
// with A[-1] = 0 and A[N] = A[N-1] (sign extension, needed for 2A). The
// row is thus 0, A, 2A or their one's complement; the +1 that completes the
// two's complement negation is added by the caller at the row's LSB (the
// NEG bit). Combinational, one AND-OR plus one XOR level.
// The selection rule follows the Booth encoding table; the row width N+1 and
// the sign bit used for 2A are this design's choices.
module mbe_decoder
  import mult_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0] a,     // multiplicand
  input  booth_sel_t   sel,   // from mbe_encoder
  output logic [N:0]   pp     // partial-product row (before +NEG)
);
  logic [N+1:0] ax;           // {A[N-1] (as A[N]), A, 0 (as A[-1])}
  assign ax = {a[N-1], a, 1'b0};

  for (genvar j = 0; j <= N; j++) begin : g_bit
    // ax[j+1] is A[j], ax[j] is A[j-1]
    assign pp[j] = ((sel.one & ax[j+1]) | (sel.two & ax[j])) ^ sel.neg;
  end
endmodule
