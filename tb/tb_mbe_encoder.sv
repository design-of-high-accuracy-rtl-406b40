// tb_mbe_encoder: checks the Booth encoder against the eight rows of the
// radix-4 encoding table (digit and NEG/ONE/TWO), exhaustively.
module tb_mbe_encoder;
  import mult_pkg::*;

  logic       clk = 1'b0;
  int         checks = 0, failures = 0;
  logic [2:0] grp;
  booth_sel_t sel;

  mbe_encoder dut (.grp(grp), .sel(sel));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Table rows, indexed by {y[i+1], y[i], y[i-1]}: {NEG, ONE, TWO}
  localparam logic [2:0] TABLE [8] = '{3'b000, 3'b010, 3'b010, 3'b001,
                                       3'b101, 3'b110, 3'b110, 3'b000};
  // Booth digit of each row
  localparam int DIGIT [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  initial begin
    for (int g = 0; g < 8; g++) begin
      int d;
      grp = 3'(g);
      #1;
      checks++;
      if ({sel.neg, sel.one, sel.two} !== TABLE[g]) begin
        failures++;
        $display("FAIL grp=%b neg/one/two=%b%b%b expected %b", grp, sel.neg, sel.one, sel.two, TABLE[g]);
      end
      // The digit implied by the select signals must match the table's digit.
      d = (sel.one ? 1 : 0) + (sel.two ? 2 : 0);
      if (sel.neg) d = -d;
      checks++;
      if (d != DIGIT[g] || (sel.one && sel.two)) begin
        failures++;
        $display("FAIL grp=%b digit=%0d expected %0d", grp, d, DIGIT[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
