// tb_serializer: random words are loaded back to back; the line must carry
// each word MSB first, one bit per clock, with ready high again exactly 23
// clocks after a load, and stay 0 while idle.
module tb_serializer;
  import fei3_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, ready, dout;
  logic [22:0] word = 0;
  int checks = 0, failures = 0;

  serializer dut (.clk, .rst_n, .load, .word, .ready, .dout);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      logic [22:0] w;
      w = {1'b1, 22'($urandom)};
      checks++; if (!ready || dout) failures++;
      word = w; load = 1; @(negedge clk); load = 0;
      for (int b = 22; b >= 0; b--) begin
        checks++;
        if (dout !== w[b] || (b != 0 && ready)) failures++;
        @(negedge clk);
      end
      if (k % 2 == 0) begin @(negedge clk); checks++; if (dout) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
