// tb_csa_row: checks a carry-save row: sum is the bitwise XOR of the three
// inputs, carry is their bitwise majority moved up one bit, and
// sum + carry == x + y + z modulo 2^W.
module tb_csa_row;
  localparam int W = 16;

  logic         clk = 1'b0;
  int           checks = 0, failures = 0;
  logic [W-1:0] x, y, z, s, c;

  csa_row #(.W(W)) dut (.x(x), .y(y), .z(z), .sum(s), .carry(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [W-1:0] maj;
      x = W'($urandom); y = W'($urandom); z = W'($urandom);
      if (t == 0) begin x = '1; y = '1; z = '1; end
      #1;
      maj = (x & y) | (x & z) | (y & z);
      checks++;
      if (s !== (x ^ y ^ z) || c !== {maj[W-2:0], 1'b0}) begin
        failures++;
        $display("FAIL x=%h y=%h z=%h sum=%h carry=%h", x, y, z, s, c);
      end
      checks++;
      if (W'(s + c) !== W'(x + y + z)) begin
        failures++;
        $display("FAIL total x=%h y=%h z=%h", x, y, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
