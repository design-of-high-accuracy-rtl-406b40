// fixed_width_multiplier: signed N x N -> N-bit fixed-width multiplier with
// minor input correction (MIC) error compensation.
//
// Keeping only the upper N bits of an N x N product lets the lower half of
// the partial-product array go: bw_fw_pp_array forms the kept Baugh-Wooley
// columns (MSP and the IC column N-1), the MIC compensation in column N-2 and
// a constant that stands for the rest of the dropped part and for rounding.
// The N+1 rows of N+2 bits are reduced by carry-save full-adder rows and a
// ripple carry-propagate adder (multi_operand_adder, modulo 2^(N+2)); the
// result p is bits N+1 .. 2 of that sum, i.e. an approximation of
// round(x * y / 2^N) in two's complement.
// Interface: x, y in, p out, all N bits, two's complement. Combinational.
// The 16-bit default, the MSP/IC/MIC partition and the use of carry-save rows
// follow the source design; rounding to nearest and the form of the
// compensation are this design's own.
module fixed_width_multiplier #(
  parameter int N = 16
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] p
);
  localparam int RW = N + 2;

  logic [RW-1:0] rows [N+1];
  logic [RW-1:0] total;

  bw_fw_pp_array #(.N(N), .RW(RW)) u_pp (.x(x), .y(y), .rows(rows));

  multi_operand_adder #(.W(RW), .OPS(N + 1), .OUT_W(RW)) u_add (
    .ops(rows), .sum(total)
  );

  assign p = total[RW-1:2];

  // Bits 1..0 have weights 2^(N-1) and 2^(N-2): below the N-bit result.
  logic [1:0] unused_low;
  assign unused_low = total[1:0];
endmodule
