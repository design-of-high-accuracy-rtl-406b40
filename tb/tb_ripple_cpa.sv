// tb_ripple_cpa: checks the ripple carry-propagate adder against a + b + cin
// (sum and carry out), on random and carry-chain corner operands.
module tb_ripple_cpa;
  localparam int W = 16;

  logic         clk = 1'b0;
  int           checks = 0, failures = 0;
  logic [W-1:0] a, b, s;
  logic         cin, cout;

  ripple_cpa #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] av, bv, input logic ci);
    logic [W:0] expv;
    a = av; b = bv; cin = ci;
    #1;
    expv = (W+1)'(av) + (W+1)'(bv) + (W+1)'(ci);
    checks++;
    if ({cout, s} !== expv) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %h expected %h", av, bv, ci, {cout, s}, expv);
    end
  endtask

  initial begin
    check('1, '0, 1'b1);       // carry through every bit
    check('1, '1, 1'b1);
    check('0, '0, 1'b0);
    check({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}}, 1'b0);
    for (int t = 0; t < 5000; t++) check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
