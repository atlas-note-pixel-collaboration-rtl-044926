// tb_pixel_readout: drives discriminator pulses against a running Gray time
// stamp. Checks that LE/TE are the stamps at the rising and falling edges
// (so TE - LE equals the pulse length), that hit_ready appears one clock after
// the falling edge, that a pulse during a stored hit is ignored, that read
// frees the cell, and that MASK suppresses hits.
module tb_pixel_readout;
  import fei3_pkg::*;
  logic clk = 0, rst_n = 0;
  logic disc = 0, mask = 0, read = 0, hit_ready;
  logic [7:0] ts = 0, ts_gray, le_gray, te_gray;
  int checks = 0, failures = 0;

  assign ts_gray = bin2gray(ts);
  pixel_readout dut (.clk, .rst_n, .disc, .mask, .ts_gray, .read, .hit_ready, .le_gray, .te_gray);

  always #5 clk = ~clk;
  always @(posedge clk) ts <= ts + 1;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      int len;
      logic [7:0] t_le, t_te;
      len = int'($urandom_range(1, 60));
      @(negedge clk);
      disc = 1;
      t_le = ts;                       // value sampled at the next edge
      repeat (len) @(negedge clk);
      disc = 0;
      t_te = ts;
      @(negedge clk);
      checks++; if (!hit_ready) failures++;
      checks++; if (gray2bin(le_gray) !== t_le || gray2bin(te_gray) !== t_te) failures++;
      checks++; if (8'(gray2bin(te_gray) - gray2bin(le_gray)) != 8'(len)) failures++;
      // a second pulse while the hit is stored is ignored
      disc = 1; repeat (3) @(negedge clk); disc = 0; @(negedge clk);
      checks++; if (!hit_ready || gray2bin(le_gray) !== t_le) failures++;
      read = 1; @(negedge clk); read = 0;
      checks++; if (hit_ready) failures++;
      repeat (2) @(negedge clk);
    end
    mask = 1;
    disc = 1; repeat (4) @(negedge clk); disc = 0; repeat (3) @(negedge clk);
    checks++; if (hit_ready) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
