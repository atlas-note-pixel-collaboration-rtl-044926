// tb_timestamp_gen: checks the binary count and its Gray code against a
// reference counter for more than one wrap of the 8-bit time stamp, and that
// successive Gray values differ in exactly one bit.
module tb_timestamp_gen;
  logic clk = 0, rst_n = 0;
  logic [7:0] ts_bin, ts_gray, prev_gray;
  int checks = 0, failures = 0;
  int unsigned ref_cnt;

  timestamp_gen dut (.clk, .rst_n, .ts_bin, .ts_gray);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++; if (ts_bin !== 8'd0 || ts_gray !== 8'd0) failures++;
    rst_n = 1;
    ref_cnt = 0;
    prev_gray = 0;
    repeat (600) begin
      @(posedge clk); #1;
      ref_cnt++;
      checks++;
      if (ts_bin !== 8'(ref_cnt)) begin failures++; $display("bin %0d exp %0d", ts_bin, 8'(ref_cnt)); end
      checks++;
      if (ts_gray !== (8'(ref_cnt) ^ (8'(ref_cnt) >> 1))) failures++;
      checks++;
      if ($countones(ts_gray ^ prev_gray) != 1) failures++;
      prev_gray = ts_gray;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
