// tb_config_if: serial frames on data/clock/load. Checks the reset value of
// the global register, a full 231-bit write to this chip's address, that
// frames to another address or with a wrong length change nothing, read-back
// of the register on cfg_dout, and that a pixel frame forwards exactly the
// data bits to the pixel chain and ends with a latch strobe for the index
// sent.
module tb_config_if;
  import fei3_pkg::*;
  logic cfg_clk = 0, rst_n = 0, cfg_din = 0, cfg_load = 0, cfg_dout;
  logic [3:0] chip_addr = 4'd5;
  gcfg_t gcfg;
  logic pix_sdi, pix_shift_en, pix_latch_stb;
  logic [3:0] pix_latch_sel;
  int checks = 0, failures = 0;
  int nshift, nstb;
  logic [255:0] shifted;
  logic [3:0] stb_sel;
  logic [230:0] rb;
  int rbn;

  config_if dut (.cfg_clk, .rst_n, .chip_addr, .cfg_din, .cfg_load, .cfg_dout, .gcfg, .pix_sdi,
                 .pix_shift_en, .pix_latch_sel, .pix_latch_stb);

  always #100 cfg_clk = ~cfg_clk;

  always @(posedge cfg_clk) if (rst_n) begin
    if (pix_shift_en) begin shifted <= {shifted[254:0], pix_sdi}; nshift <= nshift + 1; end
    if (pix_latch_stb) begin nstb <= nstb + 1; stb_sel <= pix_latch_sel; end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [3:0] a, input logic [3:0] cmd, input logic [255:0] data,
                      input int n);
    logic [7:0] h;
    h = {a, cmd};
    @(negedge cfg_clk);
    cfg_load = 1;
    for (int i = 7; i >= 0; i--) begin cfg_din = h[i]; @(negedge cfg_clk); end
    rbn = 0;
    for (int i = n - 1; i >= 0; i--) begin
      cfg_din = data[i]; @(negedge cfg_clk);
      rb = {rb[229:0], cfg_dout}; rbn++;
    end
    cfg_load = 0; cfg_din = 0;
    repeat (2) @(negedge cfg_clk);
  endtask

  initial begin
    logic [230:0] v;
    nshift = 0; nstb = 0;
    #250 rst_n = 1;
    checks++; if (gcfg !== GCFG_RESET) failures++;
    checks++; if (gcfg.latency != 8'd128 || gcfg.ceu_speed != 2'd2) failures++;
    for (int k = 0; k < 8; k++) v[k*32 +: 32] = $urandom;
    send(4'd5, CMD_WR_GLOBAL, 256'(v), 231);
    checks++; if (231'(gcfg) !== v) failures++;
    send(4'd4, CMD_WR_GLOBAL, '0, 231);                 // other chip
    checks++; if (231'(gcfg) !== v) failures++;
    send(4'd5, CMD_WR_GLOBAL, '0, 230);                 // wrong length
    checks++; if (231'(gcfg) !== v) failures++;
    send(4'd5, CMD_RD_GLOBAL, '0, 231);
    checks++; if (rb !== v) begin failures++; $display("rb %h", rb); end
    checks++; if (231'(gcfg) !== v) failures++;
    send(4'd5, CMD_WR_PIXEL, {236'd0, 4'd11, 16'hBEEF}, 20);
    checks++; if (nshift != 16 || shifted[15:0] != 16'hBEEF) begin failures++; $display("n=%0d %h", nshift, shifted[15:0]); end
    checks++; if (nstb != 1 || stb_sel != 4'd11) failures++;
    send(4'd3, CMD_WR_PIXEL, {236'd0, 4'd11, 16'hBEEF}, 20);
    checks++; if (nshift != 16 || nstb != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
