// pixel_cell: one 50 x 400 um readout cell: control register, analog front
// end (behavioural) and digital readout logic wired together. The
// discriminator output also feeds the hit bus when EnHitBus is set.
module pixel_cell
  import fei3_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_clk,
  input  logic            sdi,
  input  logic            shift_en,
  input  logic [3:0]      latch_sel,
  input  logic            latch_stb,
  output logic            sdo,
  input  logic [Q_W-1:0]  q_sensor,
  input  logic            strobe,
  input  logic [4:0]      gtdac,
  input  logic [9:0]      vcal,
  input  logic [TS_W-1:0] ts_gray,
  input  logic            read,
  output logic            hit_ready,
  output logic [TS_W-1:0] le_gray,
  output logic [TS_W-1:0] te_gray,
  output logic            hitbus
);
  pix_cfg_t cfg;
  logic     disc;

  pixel_ctrl_reg u_reg (.cfg_clk, .rst_n, .sdi, .shift_en, .latch_sel, .latch_stb, .sdo, .cfg);

  pixel_analog u_ana (.clk, .rst_n, .q_sensor, .strobe, .select(cfg.select),
                      .shutdown(cfg.shutdown), .tdac(cfg.tdac), .fdac(cfg.fdac), .gtdac, .vcal,
                      .disc);

  pixel_readout u_ro (.clk, .rst_n, .disc, .mask(cfg.mask), .ts_gray, .read, .hit_ready,
                      .le_gray, .te_gray);

  assign hitbus = disc & cfg.enhitbus;
endmodule
