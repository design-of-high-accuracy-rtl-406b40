// tb_mult_top: end-to-end test of the top level at its default size
// (16-bit operands). Each cycle it applies new random operands to the three
// multipliers and checks all three results against independent arithmetic:
// the fixed-width result against the reference model (fw_ref_pkg), the Booth
// result against the signed product, the array result against the unsigned
// product. It counts how often each mechanism occurred and fails if one
// never did: every Booth digit -2..+2, a negative Booth product, an up-MIC
// bit feeding the compensation, the compensated result differing from plain
// truncation, and a carry into the top bit of the array product.
module tb_mult_top;
  import fw_ref_pkg::*;

  localparam int N      = 16;
  localparam int NVEC   = 20000;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [N-1:0]   fw_x, fw_y, fw_p;
  logic [N-1:0]   bm_a, bm_b, am_a, am_b;
  logic [2*N-1:0] bm_p, am_p;

  mult_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NVEC + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int digit_seen [5];
  int neg_product, mic_used, comp_effect, top_carry;

  initial begin
    for (int t = 0; t < NVEC; t++) begin
      longint xs, ys;
      logic [N:0] bx;
      @(negedge clk);
      {fw_x, fw_y, bm_a, bm_b, am_a, am_b} = {$urandom, $urandom, $urandom};
      if (t == 0) begin
        fw_x = 16'h8000; fw_y = 16'h8000; bm_a = 16'h8000; bm_b = 16'h8000; am_a = '1; am_b = '1;
      end
      @(posedge clk);
      // fixed-width multiplier
      xs = longint'($signed(fw_x)); ys = longint'($signed(fw_y));
      checks++;
      if (fw_p !== N'(fw_value(N, xs, ys))) begin
        failures++;
        $display("FAIL fw: %0d * %0d -> %0d expected %0d", xs, ys, $signed(fw_p), fw_value(N, xs, ys));
      end
      for (int k = 0; k < (N - 1) / 2; k++) if (fw_x[N-2-k] && fw_y[k]) begin mic_used++; break; end
      if (longint'($signed(fw_p)) != trunc_value(N, xs, ys)) comp_effect++;
      // Booth multiplier
      checks++;
      if (bm_p !== (2*N)'(longint'($signed(bm_a)) * longint'($signed(bm_b)))) begin
        failures++;
        $display("FAIL booth: %0d * %0d -> %h", $signed(bm_a), $signed(bm_b), bm_p);
      end
      if (bm_p[2*N-1]) neg_product++;
      bx = {bm_b, 1'b0};
      for (int k = 0; k < N / 2; k++)
        digit_seen[-2 * int'(bx[2*k+2]) + int'(bx[2*k+1]) + int'(bx[2*k]) + 2]++;
      // array multiplier
      checks++;
      if (am_p !== (2*N)'(am_a) * (2*N)'(am_b)) begin
        failures++;
        $display("FAIL array: %0d * %0d -> %0d", am_a, am_b, am_p);
      end
      if (am_p[2*N-1]) top_carry++;
    end

    for (int d = 0; d < 5; d++) begin
      $display("Booth digit %0d: %0d times", d - 2, digit_seen[d]);
      checks++; if (digit_seen[d] == 0) failures++;
    end
    $display("negative Booth products: %0d", neg_product);
    $display("vectors with an up-MIC bit set: %0d", mic_used);
    $display("compensated result != truncated result: %0d", comp_effect);
    $display("array products reaching the top bit: %0d", top_carry);
    checks++; if (neg_product == 0) failures++;
    checks++; if (mic_used == 0) failures++;
    checks++; if (comp_effect == 0) failures++;
    checks++; if (top_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
