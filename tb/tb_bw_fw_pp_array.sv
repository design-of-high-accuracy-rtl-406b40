// tb_bw_fw_pp_array: checks the fixed-width partial-product array. For all
// 8 x 8 operand pairs and for random 16 x 16 pairs, the sum of its rows
// (modulo 2^(n+2)) must equal the kept part of the exact product plus the
// MIC compensation and bias of the reference model, in units of 2^(n-2).
module tb_bw_fw_pp_array;
  import fw_ref_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [7:0]  x8, y8;
  logic [9:0]  r8 [9];
  logic [15:0] x16, y16;
  logic [17:0] r16 [17];

  bw_fw_pp_array #(.N(8)) dut8 (.x(x8), .y(y8), .rows(r8));
  bw_fw_pp_array dut16 (.x(x16), .y(y16), .rows(r16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expected_units(int n, longint xs, longint ys);
    longint kept, comp;
    int m;
    m    = n - 1;
    kept = (xs * ys - lsp_value(n, xs, ys)) >>> (n - 2);
    comp = longint'(bias_units(n));
    for (int k = 0; k < m / 2; k++) if (xs[n-2-k] && ys[k]) comp += 2;
    if (m % 2 == 1 && xs[n-2-m/2] && ys[m/2]) comp += 1;
    return kept + comp;
  endfunction

  initial begin
    for (int v = 0; v < 65536; v++) begin
      logic [9:0] s;
      {x8, y8} = 16'(v);
      #1;
      s = '0;
      foreach (r8[k]) s += r8[k];
      checks++;
      if (s !== 10'(expected_units(8, longint'($signed(x8)), longint'($signed(y8))))) begin
        failures++;
        if (failures < 10) $display("FAIL 8: x=%h y=%h rows sum %h", x8, y8, s);
      end
    end
    for (int t = 0; t < 20000; t++) begin
      logic [17:0] s;
      x16 = 16'($urandom); y16 = 16'($urandom);
      if (t == 0) begin x16 = 16'h8000; y16 = 16'h8000; end
      if (t == 1) begin x16 = 16'hFFFF; y16 = 16'hFFFF; end
      #1;
      s = '0;
      foreach (r16[k]) s += r16[k];
      checks++;
      if (s !== 18'(expected_units(16, longint'($signed(x16)), longint'($signed(y16))))) begin
        failures++;
        if (failures < 10) $display("FAIL 16: x=%h y=%h rows sum %h", x16, y16, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
