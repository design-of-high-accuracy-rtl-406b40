// tb_mbe_decoder: checks one Booth decoder row. For every legal select
// (digit -2..+2) and many multiplicands, the row plus its NEG bit must equal
// digit * A modulo 2^(N+1).
module tb_mbe_decoder;
  import mult_pkg::*;

  localparam int N = 16;

  logic         clk = 1'b0;
  int           checks = 0, failures = 0;
  logic [N-1:0] a;
  booth_sel_t   sel;
  logic [N:0]   pp;

  mbe_decoder #(.N(N)) dut (.a(a), .sel(sel), .pp(pp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] av, input int digit);
    logic [N:0] expv, got;
    a       = av;
    sel.neg = digit < 0;
    sel.one = (digit == 1) || (digit == -1);
    sel.two = (digit == 2) || (digit == -2);
    #1;
    expv = (N+1)'(longint'(digit) * longint'($signed(av)));
    got  = pp + (N+1)'(sel.neg);
    checks++;
    if (got !== expv) begin
      failures++;
      $display("FAIL a=%h digit=%0d pp=%h expected row+neg=%h", av, digit, pp, expv);
    end
  endtask

  initial begin
    for (int d = -2; d <= 2; d++) begin
      check('0, d);
      check('1, d);
      check({1'b1, {(N-1){1'b0}}}, d);
      check({1'b0, {(N-1){1'b1}}}, d);
      for (int t = 0; t < 2000; t++) check(N'($urandom), d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
