// multi_operand_adder: adds OPS operands of W bits with carry-save rows and
// one carry-propagate adder.
//
// The first three operands go through one row of full adders (csa_row);
// every further operand gets one more row, which takes the running sum and
// carry vectors and the new operand. What is left is a sum vector and a
// carry vector, which ripple_cpa adds into the result. For OPS == 2 the two
// operands go straight to the carry-propagate adder.
// Operands are zero-extended to OUT_W bits before the first row; with the
// default OUT_W = W + $clog2(OPS) the result never overflows. Callers that
// work modulo 2^W (two's complement) set OUT_W = W.
// Interface: ops[OPS] in, sum out. Combinational: OPS-2 full-adder delays
// through the rows, then OUT_W full-adder delays through the ripple adder.
// The default 4 operands of 4 bits are the size of the carry-save adder
// example this block is modelled on.
module multi_operand_adder #(
  parameter int W     = 4,
  parameter int OPS   = 4,
  parameter int OUT_W = W + $clog2(OPS)
) (
  input  logic [W-1:0]     ops [OPS],
  output logic [OUT_W-1:0] sum
);
  // Operands widened to the result width.
  logic [OUT_W-1:0] opx [OPS];
  for (genvar k = 0; k < OPS; k++) begin : g_ext
    if (OUT_W >= W) begin : g_zext
      assign opx[k] = OUT_W'(ops[k]);
    end else begin : g_trunc
      assign opx[k] = ops[k][OUT_W-1:0];
    end
  end

  // Final two rows handed to the carry-propagate adder.
  logic [OUT_W-1:0] last_s, last_c;

  if (OPS == 2) begin : g_two
    assign last_s = opx[0];
    assign last_c = opx[1];
  end else begin : g_rows
    // Row r (0 .. OPS-3) adds operand r+2 to the running sum/carry.
    logic [OUT_W-1:0] rs [OPS-2];
    logic [OUT_W-1:0] rc [OPS-2];

    csa_row #(.W(OUT_W)) u_row0 (
      .x(opx[0]), .y(opx[1]), .z(opx[2]), .sum(rs[0]), .carry(rc[0])
    );

    for (genvar r = 1; r < OPS - 2; r++) begin : g_row
      csa_row #(.W(OUT_W)) u_row (
        .x(rs[r-1]), .y(rc[r-1]), .z(opx[r+2]), .sum(rs[r]), .carry(rc[r])
      );
    end

    assign last_s = rs[OPS-3];
    assign last_c = rc[OPS-3];
  end

  logic cpa_cout;
  ripple_cpa #(.W(OUT_W)) u_cpa (
    .a(last_s), .b(last_c), .cin(1'b0), .sum(sum), .cout(cpa_cout)
  );

  // The carry out lies beyond OUT_W: it is zero when OUT_W is wide enough,
  // and is the modulo-2^OUT_W overflow otherwise.
  logic unused_cout;
  assign unused_cout = cpa_cout;
endmodule
