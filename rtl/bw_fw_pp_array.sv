// bw_fw_pp_array: partial-product array of the signed N x N fixed-width
// multiplier, with minor input correction (MIC) compensation.
//
// The full N x N two's complement product is the modified Baugh-Wooley array:
// bit x[i] & y[j] at column i+j, complemented when exactly one of i, j is
// N-1, plus constant ones at columns N and 2N-1. Its columns fall in three
// parts:
//   MSP  columns N .. 2N-2       (kept)
//   IC   column  N-1             (kept: the input correction vector)
//   LSP  columns 0 .. N-2        (dropped); its top column N-2 is the MIC
//        vector, bits x[N-2-k] & y[k] for k = 0 .. N-2.
// The dropped LSP is replaced by an estimate built from the MIC vector.
// The MIC column is symmetric: bit k and bit N-2-k are x[N-2-k]y[k] and
// x[k]y[N-2-k], which have the same statistics. Only the upper half
// ("up-MIC", k < (N-1)/2) is formed, and each of its AND gates feeds two
// slots of column N-2, standing in for its mirror bit in the lower half
// ("down-MIC") as well; the middle bit, when N-1 is odd, is used once. This
// halves the AND gates and the fan-in of the compensation.
// The rest of the LSP (columns 0 .. N-3) is replaced by its expected value
// under uniform inputs, rounded to a whole unit of 2^(N-2), and the rounding
// half-LSB 2^(N-1) of the N-bit result is added with it (mult_pkg::fw_bias).
// Column N-2 is the lowest column that exists here: all outputs are shifted
// down by N-2, so bit 0 of every row has weight 2^(N-2), and the rows are
// RW = N+2 bits wide (columns N-2 .. 2N-1).
// Output: N+1 operand rows (row j holds the kept bits of y[j]'s partial
// product and one MIC slot; row N holds the constants), to be summed modulo
// 2^RW. The fixed-width product is bits RW-1 .. 2 of that sum.
// How the MIC vector is grouped and weighted is this design's own choice; the
// MSP/IC/LSP/MIC partition follows the Baugh-Wooley array it is named after.
// Combinational.
module bw_fw_pp_array
  import mult_pkg::*;
#(
  parameter int N  = 16,
  parameter int RW = N + 2
) (
  input  logic [N-1:0]  x,
  input  logic [N-1:0]  y,
  output logic [RW-1:0] rows [N+1]
);
  localparam int M     = N - 1;       // MIC vector length
  localparam int NUP   = M / 2;       // up-MIC bits (each used twice)
  localparam int LOW   = N - 2;       // lowest column kept (MIC column)
  localparam int BIAS  = fw_bias(N);
  // Constants in units of 2^(N-2): Baugh-Wooley ones at columns N and 2N-1,
  // plus the compensation bias.
  localparam logic [RW-1:0] KROW =
      RW'((1 << (N - LOW)) + (1 << (2 * N - 1 - LOW)) + BIAS);

  logic [M-1:0] mic;                  // MIC bit k = x[N-2-k] & y[k]
  for (genvar k = 0; k < M; k++) begin : g_mic
    if (k < NUP || (M % 2 == 1 && k == NUP)) begin : g_used
      assign mic[k] = x[N-2-k] & y[k];
    end else begin : g_shared
      // down-MIC slot: driven by the up-MIC gate of the mirror position
      assign mic[k] = mic[M-1-k];
    end
  end

  always_comb begin
    for (int j = 0; j < N; j++) begin
      rows[j] = '0;
      for (int i = 0; i < N; i++) begin
        if (i + j >= N - 1) begin
          rows[j][i + j - LOW] = (x[i] & y[j]) ^ ((i == N - 1) != (j == N - 1));
        end
      end
      // MIC slot in column N-2 (bit 0); row N-1 has none (the MIC has N-1 bits)
      if (j < M) rows[j][0] = mic[j];
    end
    rows[N] = KROW;
  end
endmodule
