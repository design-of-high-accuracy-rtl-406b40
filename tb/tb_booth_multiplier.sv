// tb_booth_multiplier: checks the radix-4 Booth multiplier against the signed
// product. Default size (16 x 16): corners and random operands; 8 x 8: all
// 65536 operand pairs. Counts how often each Booth digit -2..+2 was used.
module tb_booth_multiplier;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   digit_seen [5];

  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [7:0]  a8, b8;
  logic [15:0] p8;

  booth_multiplier dut16 (.a(a16), .b(b16), .p(p16));
  booth_multiplier #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Booth digits of b, computed directly from the definition
  // digit_k = -2 b[2k+1] + b[2k] + b[2k-1].
  task automatic count_digits(input logic [15:0] b);
    logic [16:0] bx;
    bx = {b, 1'b0};
    for (int k = 0; k < 8; k++) begin
      int d;
      d = -2 * int'(bx[2*k+2]) + int'(bx[2*k+1]) + int'(bx[2*k]);
      digit_seen[d + 2]++;
    end
  endtask

  task automatic check16(input logic [15:0] av, bv);
    logic [31:0] e;
    a16 = av; b16 = bv;
    #1;
    e = 32'(longint'($signed(av)) * longint'($signed(bv)));
    count_digits(bv);
    checks++;
    if (p16 !== e) begin
      failures++;
      $display("FAIL 16: %0d * %0d = %h expected %h", $signed(av), $signed(bv), p16, e);
    end
  endtask

  initial begin
    static logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF, 16'hAAAA};
    foreach (corner[i]) foreach (corner[j]) check16(corner[i], corner[j]);
    for (int t = 0; t < 20000; t++) check16(16'($urandom), 16'($urandom));
    for (int v = 0; v < 65536; v++) begin
      logic [15:0] e;
      {a8, b8} = 16'(v);
      #1;
      e = 16'(int'($signed(a8)) * int'($signed(b8)));
      checks++;
      if (p8 !== e) begin
        failures++;
        $display("FAIL 8: %0d * %0d = %h expected %h", $signed(a8), $signed(b8), p8, e);
      end
    end
    for (int d = 0; d < 5; d++) begin
      $display("Booth digit %0d used %0d times", d - 2, digit_seen[d]);
      checks++;
      if (digit_seen[d] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
