// tb_pixel_ctrl_reg: three registers in a chain. Checks reset values, that the
// one-bit stages shift in order, and that a latch strobe loads exactly the
// selected bit of every register, for all 14 bit positions.
module tb_pixel_ctrl_reg;
  import fei3_pkg::*;
  logic cfg_clk = 0, rst_n = 0;
  logic shift_en = 0, latch_stb = 0, sdi = 0;
  logic [3:0] latch_sel = 0;
  logic [3:0] ch;
  pix_cfg_t cfg [3];
  logic [13:0] expv [3];
  int checks = 0, failures = 0;

  assign ch[0] = sdi;
  for (genvar i = 0; i < 3; i++) begin : g
    pixel_ctrl_reg dut (.cfg_clk, .rst_n, .sdi(ch[i]), .shift_en, .latch_sel, .latch_stb,
                        .sdo(ch[i+1]), .cfg(cfg[i]));
  end

  always #10 cfg_clk = ~cfg_clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic shift3(input logic [2:0] v); // v[2] is shifted first -> ends in reg 2
    for (int k = 2; k >= 0; k--) begin
      sdi = v[k]; shift_en = 1;
      @(posedge cfg_clk); #1;
    end
    shift_en = 0;
  endtask

  initial begin
    #25 rst_n = 1;
    for (int i = 0; i < 3; i++) begin
      expv[i] = 14'b0_0_0_0_1000000_100;
      checks++; if (14'(cfg[i]) !== expv[i]) failures++;
    end
    for (int b = 0; b < 14; b++) begin
      logic [2:0] v;
      v = 3'($urandom);
      @(negedge cfg_clk);
      shift3(v);
      checks++; if (ch[3] !== v[2] || ch[1] !== v[0]) failures++;
      latch_sel = 4'(b); latch_stb = 1;
      @(posedge cfg_clk); #1;
      latch_stb = 0;
      for (int i = 0; i < 3; i++) begin
        expv[i][b] = v[i];
        checks++;
        if (14'(cfg[i]) !== expv[i]) begin
          failures++; $display("bit %0d reg %0d got %b exp %b", b, i, 14'(cfg[i]), expv[i]);
        end
      end
    end
    // index 15 changes nothing
    shift3(3'b111);
    latch_sel = 4'd15; latch_stb = 1;
    @(posedge cfg_clk); #1; latch_stb = 0;
    for (int i = 0; i < 3; i++) begin checks++; if (14'(cfg[i]) !== expv[i]) failures++; end
    checks++; if (cfg[1].tdac !== expv[1][9:3] || cfg[1].shutdown !== expv[1][13]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
