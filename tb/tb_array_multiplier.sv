// tb_array_multiplier: checks the unsigned carry-save array multiplier.
// Default size (16 x 16): corners and random operands; 4 x 4: all pairs.
module tb_array_multiplier;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;

  array_multiplier dut16 (.a(a16), .b(b16), .p(p16));
  array_multiplier #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] av, bv);
    a16 = av; b16 = bv;
    #1;
    checks++;
    if (p16 !== 32'(av) * 32'(bv)) begin
      failures++;
      $display("FAIL 16: %0d * %0d = %0d", av, bv, p16);
    end
  endtask

  initial begin
    check16('1, '1);
    check16('1, 16'h0001);
    check16(16'h8000, 16'h8000);
    check16('0, '1);
    for (int t = 0; t < 20000; t++) check16(16'($urandom), 16'($urandom));
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (p4 !== 8'(a4) * 8'(b4)) begin
        failures++;
        $display("FAIL 4: %0d * %0d = %0d", a4, b4, p4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
