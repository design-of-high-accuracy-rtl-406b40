// tb_fixed_width_multiplier: checks the fixed-width multiplier bit-exactly
// against the reference model (all 8 x 8 pairs, random 16 x 16 pairs) and
// measures its error against the exact product P / 2^n. The compensated
// result must be closer to P / 2^n on average than direct truncation (LSP
// dropped, nothing added), and its mean error must be small.
module tb_fixed_width_multiplier;
  import fw_ref_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [7:0]  x8, y8, p8;
  logic [15:0] x16, y16, p16;

  fixed_width_multiplier #(.N(8)) dut8 (.x(x8), .y(y8), .p(p8));
  fixed_width_multiplier dut16 (.x(x16), .y(y16), .p(p16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // error statistics, in units of the output LSB
  real sum_e_fw, sum_a_fw, max_a_fw, sum_e_tr, sum_a_tr, max_a_tr;
  int  cnt;

  task automatic stats_reset();
    sum_e_fw = 0; sum_a_fw = 0; max_a_fw = 0;
    sum_e_tr = 0; sum_a_tr = 0; max_a_tr = 0; cnt = 0;
  endtask

  task automatic stats_add(int n, longint xs, longint ys, logic signed [15:0] got);
    real exact, efw, etr;
    exact = real'(xs * ys) / (2.0 ** n);
    efw = real'(got) - exact;
    etr = real'(trunc_value(n, xs, ys)) - exact;
    sum_e_fw += efw; sum_a_fw += (efw < 0 ? -efw : efw);
    sum_e_tr += etr; sum_a_tr += (etr < 0 ? -etr : etr);
    if ((efw < 0 ? -efw : efw) > max_a_fw) max_a_fw = (efw < 0 ? -efw : efw);
    if ((etr < 0 ? -etr : etr) > max_a_tr) max_a_tr = (etr < 0 ? -etr : etr);
    cnt++;
  endtask

  task automatic stats_check(int n);
    $display("n=%0d: compensated mean err %f mean |err| %f max |err| %f LSB",
             n, sum_e_fw / cnt, sum_a_fw / cnt, max_a_fw);
    $display("n=%0d: truncated   mean err %f mean |err| %f max |err| %f LSB",
             n, sum_e_tr / cnt, sum_a_tr / cnt, max_a_tr);
    checks++;
    if (!(sum_a_fw < sum_a_tr)) begin
      failures++;
      $display("FAIL n=%0d: compensation not better than truncation", n);
    end
    checks++;
    if ((sum_e_fw / cnt) > 0.25 || (sum_e_fw / cnt) < -0.25) begin
      failures++;
      $display("FAIL n=%0d: mean error too large", n);
    end
  endtask

  initial begin
    stats_reset();
    for (int v = 0; v < 65536; v++) begin
      longint xs, ys;
      {x8, y8} = 16'(v);
      #1;
      xs = longint'($signed(x8)); ys = longint'($signed(y8));
      checks++;
      if (p8 !== 8'(fw_value(8, xs, ys))) begin
        failures++;
        if (failures < 10) $display("FAIL 8: %0d * %0d -> %0d expected %0d", xs, ys, $signed(p8), fw_value(8, xs, ys));
      end
      stats_add(8, xs, ys, 16'($signed(p8)));
    end
    stats_check(8);

    stats_reset();
    for (int t = 0; t < 50000; t++) begin
      longint xs, ys;
      x16 = 16'($urandom); y16 = 16'($urandom);
      if (t == 0) begin x16 = 16'h8000; y16 = 16'h8000; end
      if (t == 1) begin x16 = 16'h7FFF; y16 = 16'h8000; end
      #1;
      xs = longint'($signed(x16)); ys = longint'($signed(y16));
      checks++;
      if (p16 !== 16'(fw_value(16, xs, ys))) begin
        failures++;
        if (failures < 10) $display("FAIL 16: %0d * %0d -> %0d expected %0d", xs, ys, $signed(p16), fw_value(16, xs, ys));
      end
      stats_add(16, xs, ys, p16);
    end
    stats_check(16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
