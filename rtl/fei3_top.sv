// fei3_top: FE-I3 pixel front-end readout chip.
//
// A 2*N_CP x N_ROWS pixel matrix (18 x 160) is organised as N_CP column pairs.
// A pixel measures the leading-edge time and the time over threshold of each
// discriminator pulse with the Gray-coded 40 MHz time stamp. Per column pair
// the CEU moves complete hits through the priority bus into DEPTH end-of-column
// buffers, computing ToT on the way. Buffered hits wait for the L1 latency:
// a hit whose age reaches the latency in the clock an L1 trigger arrives is
// tagged with that trigger's number, otherwise it is deleted. Triggers queue in
// a 16-deep FIFO; the chip-level controller reads each pending trigger's hits
// from all buffers and sends them serially, followed by an end-of-event word,
// in trigger order. Column pairs work independently and concurrently.
//
// Clocks: clk (40 MHz) for the data path; cfg_clk (5 MHz) for the serial
// configuration, which is assumed static while data is taken.
// Analog parts are behavioural models (pixel_analog); the bias and calibration
// DACs are not modelled and their codes are outputs. sensor_q stands in for
// the sensor bump of each pixel: a non-zero value deposits that many electrons
// in that clock.
module fei3_top
  import fei3_pkg::*;
#(
  parameter int unsigned N_CP       = 9,
  parameter int unsigned N_ROWS     = 160,
  parameter int unsigned EOC_DEPTH  = 64,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_clk,
  input  logic                   cfg_din,
  input  logic                   cfg_load,
  output logic                   cfg_dout,
  input  logic [3:0]             chip_addr,
  input  logic                   l1_trig,
  input  logic                   strobe,
  input  logic [Q_W-1:0]         sensor_q [2*N_CP][N_ROWS],
  output logic                   dout,
  output logic                   hitbus,
  output logic [N_BIAS-1:0][7:0] bias_dac,
  output logic [9:0]             vcal_dac
);
  gcfg_t             gcfg;
  logic [TS_W-1:0]   ts_bin, ts_gray;
  logic              pix_sdi, pix_shift_en, pix_latch_stb;
  logic [3:0]        pix_latch_sel;
  logic [N_CP:0]     chain;

  logic [N_CP-1:0]   hit_avail, col_read, wr_en, rd_avail, rd_ack, ovf, hb, filtered, dup, deleted;
  col_hit_t          bus    [N_CP];
  eoc_hit_t          wr_hit [N_CP];
  eoc_hit_t          rd_hit [N_CP];

  logic              accept, fifo_empty, fifo_full, fifo_pop;
  logic [L1ID_W-1:0] trig_id, fifo_id, rd_l1id;
  logic [TS_W-1:0]   fifo_bcid;
  logic [1:0]        fifo_flags;
  logic              ser_ready, ser_load, eoe_sent;
  logic [WORD_W-1:0] ser_word;

  config_if u_cfg (.cfg_clk, .rst_n, .chip_addr, .cfg_din, .cfg_load, .cfg_dout, .gcfg,
                   .pix_sdi, .pix_shift_en, .pix_latch_sel, .pix_latch_stb);

  timestamp_gen #(.TS_W(TS_W)) u_ts (.clk, .rst_n, .ts_bin, .ts_gray);

  assign chain[0] = pix_sdi;

  for (genvar c = 0; c < N_CP; c++) begin : g_cp
    column_pair #(.N_ROWS(N_ROWS)) u_col (
      .clk, .rst_n, .cfg_clk,
      .sdi(chain[c]), .shift_en(pix_shift_en), .latch_sel(pix_latch_sel),
      .latch_stb(pix_latch_stb), .sdo(chain[c+1]),
      .q_col0(sensor_q[2*c]), .q_col1(sensor_q[2*c+1]),
      .strobe, .gtdac(gcfg.gtdac), .vcal(gcfg.vcal), .ts_gray,
      .read(col_read[c]), .hit_avail(hit_avail[c]), .bus(bus[c]), .hitbus(hb[c])
    );

    ceu u_ceu (
      .clk, .rst_n, .enable(gcfg.col_enable[c % N_CP_MAX]), .speed(gcfg.ceu_speed),
      .en_tot_filter(gcfg.en_tot_filter), .tot_min(gcfg.tot_min),
      .en_timewalk(gcfg.en_timewalk), .tw_thr(gcfg.tw_thr),
      .hit_avail(hit_avail[c]), .bus(bus[c]), .read(col_read[c]),
      .wr_en(wr_en[c]), .wr_hit(wr_hit[c]), .filtered(filtered[c]), .dup(dup[c])
    );

    eoc_buffer #(.DEPTH(EOC_DEPTH)) u_eoc (
      .clk, .rst_n, .now(ts_bin), .latency(gcfg.latency),
      .wr_en(wr_en[c]), .wr_hit(wr_hit[c]),
      .trig(accept), .trig_id, .rd_l1id,
      .rd_avail(rd_avail[c]), .rd_hit(rd_hit[c]), .rd_ack(rd_ack[c]),
      .overflow(ovf[c]), .deleted(deleted[c]), .occupancy()
    );
  end

  trigger_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .l1(l1_trig), .bcid(ts_bin), .ovf_in(|ovf), .accept, .trig_id,
    .empty(fifo_empty), .full(fifo_full), .pop(fifo_pop),
    .rd_id(fifo_id), .rd_bcid(fifo_bcid), .rd_flags(fifo_flags)
  );

  readout_ctrl #(.N_CP(N_CP)) u_ro (
    .fifo_empty, .fifo_id, .fifo_bcid, .fifo_flags, .fifo_pop,
    .rd_l1id, .rd_avail, .rd_hit, .rd_ack, .ser_ready, .ser_load, .ser_word, .eoe_sent
  );

  serializer u_ser (.clk, .rst_n, .load(ser_load), .word(ser_word), .ready(ser_ready), .dout);

  assign hitbus   = gcfg.hitbus_en & (|hb);
  assign bias_dac = gcfg.bias_dac;
  assign vcal_dac = gcfg.vcal;
endmodule
