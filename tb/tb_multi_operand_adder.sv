// tb_multi_operand_adder: checks the carry-save multi-operand adder.
//  - default size (4 operands of 4 bits, 6-bit result): all 65536 inputs;
//  - 9 operands of 32 bits, result modulo 2^32: random;
//  - 2 operands (no carry-save row): random.
module tb_multi_operand_adder;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [3:0]  o4 [4];
  logic [5:0]  s4;
  logic [31:0] o9 [9];
  logic [31:0] s9;
  logic [7:0]  o2 [2];
  logic [8:0]  s2;

  multi_operand_adder dut_default (.ops(o4), .sum(s4));
  multi_operand_adder #(.W(32), .OPS(9), .OUT_W(32)) dut_nine (.ops(o9), .sum(s9));
  multi_operand_adder #(.W(8), .OPS(2)) dut_two (.ops(o2), .sum(s2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int e;
      e = 0;
      for (int k = 0; k < 4; k++) begin
        o4[k] = 4'(v >> (4 * k));
        e += int'(o4[k]);
      end
      #1;
      checks++;
      if (int'(s4) != e) begin
        failures++;
        $display("FAIL 4x4 v=%h sum=%0d expected %0d", v, s4, e);
      end
    end
    for (int t = 0; t < 3000; t++) begin
      logic [31:0] e;
      e = '0;
      for (int k = 0; k < 9; k++) begin
        o9[k] = (t < 3) ? 32'hFFFF_FFFF : $urandom;
        e += o9[k];
      end
      o2[0] = 8'($urandom); o2[1] = 8'($urandom);
      #1;
      checks++;
      if (s9 !== e) begin
        failures++;
        $display("FAIL 9x32 sum=%h expected %h", s9, e);
      end
      checks++;
      if (s2 !== 9'(o2[0]) + 9'(o2[1])) begin
        failures++;
        $display("FAIL 2x8 %h + %h = %h", o2[0], o2[1], s2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
