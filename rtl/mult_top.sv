// mult_top: the three multipliers of this design side by side.
//
//  - fixed_width_multiplier: signed N x N -> N-bit product with MIC error
//    compensation (the main design).
//  - booth_multiplier: signed N x N -> 2N product, radix-4 modified Booth
//    encoding, carry-save reduction, carry-propagate adder.
//  - array_multiplier: unsigned N x N -> 2N parallel array multiplier of
//    carry-save full-adder rows.
// All three share the carry-save adder rows and ripple adder
// (multi_operand_adder, csa_row, ripple_cpa, full_adder). Each has its own
// operand and result ports; nothing is shared between them at run time.
// Placing them side by side, with separate ports, is this design's choice.
// No clock is used: all three are
// combinational: a result is valid once its inputs have settled.
module mult_top #(
  parameter int N = 16
) (
  input  logic [N-1:0]   fw_x,   // fixed-width multiplier operands (signed)
  input  logic [N-1:0]   fw_y,
  output logic [N-1:0]   fw_p,   // approx. round(fw_x * fw_y / 2^N)
  input  logic [N-1:0]   bm_a,   // Booth multiplier operands (signed)
  input  logic [N-1:0]   bm_b,
  output logic [2*N-1:0] bm_p,   // bm_a * bm_b
  input  logic [N-1:0]   am_a,   // array multiplier operands (unsigned)
  input  logic [N-1:0]   am_b,
  output logic [2*N-1:0] am_p    // am_a * am_b
);
  fixed_width_multiplier #(.N(N)) u_fw (.x(fw_x), .y(fw_y), .p(fw_p));
  booth_multiplier       #(.N(N)) u_bm (.a(bm_a), .b(bm_b), .p(bm_p));
  array_multiplier       #(.N(N)) u_am (.a(am_a), .b(am_b), .p(am_p));
endmodule
