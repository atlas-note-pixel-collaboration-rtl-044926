// fei3_pkg: types, constants and helper functions shared by the FE-I3 pixel
// readout chip model.
//
// The 18 x 160 pixel matrix is read out as 9 column pairs. Each pixel keeps
// 8-bit Gray-coded leading- and trailing-edge time stamps; the end-of-column
// logic turns them into a leading-edge time and a time-over-threshold (ToT).
// Pending level-1 triggers are numbered with a 4-bit identifier (16-deep FIFO).
//
// The widths of time stamps (8), row number (8), L1 number (4), the 14-bit
// pixel register and the 231-bit global register follow the chip description.
// The order of fields inside the global register, the reset values, the serial
// command codes and the 23-bit output word layout are choices of this model.
package fei3_pkg;

  localparam int unsigned TS_W      = 8;   // time stamp width
  localparam int unsigned ROW_W     = 8;   // row address width
  localparam int unsigned COL_W     = 5;   // column number (0..17) in output words
  localparam int unsigned L1ID_W    = 4;   // trigger number width (16 pending)
  localparam int unsigned PIX_CFG_W = 14;  // per-pixel control bits
  localparam int unsigned GCFG_W    = 231; // global configuration bits
  localparam int unsigned N_BIAS    = 11;  // 8-bit bias current DACs
  localparam int unsigned N_CP_MAX  = 9;   // column pairs covered by the enable field
  localparam int unsigned WORD_W    = 23;  // serial output word length
  localparam int unsigned Q_W       = 16;  // charge in electrons (behavioural model)

  // Per-pixel control register, 14 bits. Latch index 0 is fdac[0] (LSB).
  typedef struct packed {
    logic       shutdown;  // 13: switch the preamplifier off
    logic       select;    // 12: enable test charge injection
    logic       enhitbus;  // 11: drive the wired-OR hit bus
    logic       mask;      // 10: switch off the digital discriminator output
    logic [6:0] tdac;      // 9..3: threshold trim
    logic [2:0] fdac;      // 2..0: feedback current trim
  } pix_cfg_t;

  localparam pix_cfg_t PIX_CFG_RESET = '{shutdown: 1'b0, select: 1'b0, enhitbus: 1'b0,
                                         mask: 1'b0, tdac: 7'd64, fdac: 3'd4};

  // Global configuration register, 231 bits, first bit shifted in ends as MSB.
  typedef struct packed {
    logic [N_BIAS-1:0][7:0] bias_dac;      // 88: analog bias current DACs
    logic [9:0]             vcal;          // 10: calibration voltage DAC
    logic [4:0]             gtdac;         // 5 : global threshold
    logic [7:0]             latency;       // 8 : L1 latency in 25 ns clocks
    logic [7:0]             tot_min;       // 8 : digital ToT threshold
    logic [7:0]             tw_thr;        // 8 : timewalk correction threshold
    logic                   en_tot_filter; // 1
    logic                   en_timewalk;   // 1
    logic [N_CP_MAX-1:0]    col_enable;    // 9 : column pair enables
    logic [1:0]             ceu_speed;     // 2 : 0=5 MHz 1=10 MHz 2,3=20 MHz
    logic                   hitbus_en;     // 1 : global hit-bus output enable
    logic [89:0]            spare;         // 90: remaining bits, no function here
  } gcfg_t;

  localparam gcfg_t GCFG_RESET = '{bias_dac: {N_BIAS{8'd128}}, vcal: 10'd0, gtdac: 5'd16,
                                   latency: 8'd128, tot_min: 8'd0, tw_thr: 8'd0,
                                   en_tot_filter: 1'b0, en_timewalk: 1'b0,
                                   col_enable: {N_CP_MAX{1'b1}}, ceu_speed: 2'd2,
                                   hitbus_en: 1'b1, spare: '0};

  // Serial configuration commands (4 bits following the 4-bit chip address).
  typedef enum logic [3:0] {
    CMD_WR_GLOBAL = 4'b0001,
    CMD_RD_GLOBAL = 4'b0010,
    CMD_WR_PIXEL  = 4'b0100
  } cfg_cmd_e;

  // Hit as it leaves a column pair over the priority bus.
  typedef struct packed {
    logic             col;      // left (0) or right (1) column of the pair
    logic [ROW_W-1:0] row;
    logic [TS_W-1:0]  le_gray;
    logic [TS_W-1:0]  te_gray;
  } col_hit_t;

  // Formatted hit as stored in an end-of-column buffer.
  typedef struct packed {
    logic             col;
    logic [ROW_W-1:0] row;
    logic [TS_W-1:0]  le;       // binary leading-edge time
    logic [TS_W-1:0]  tot;
  } eoc_hit_t;

  // Readout hit offered by one column pair to the chip-level controller.
  typedef struct packed {
    logic [ROW_W-1:0] row;
    logic             col;
    logic [TS_W-1:0]  tot;
  } rd_hit_t;

  // Output words: start bit, type bit (0 hit, 1 end of event), payload.
  function automatic logic [WORD_W-1:0] hit_word(logic [COL_W-1:0] col, logic [ROW_W-1:0] row,
                                                 logic [TS_W-1:0] tot);
    return {1'b1, 1'b0, col, row, tot};
  endfunction

  function automatic logic [WORD_W-1:0] eoe_word(logic [L1ID_W-1:0] l1id, logic [TS_W-1:0] bcid,
                                                 logic [3:0] flags);
    return {1'b1, 1'b1, l1id, bcid, flags, 5'b00000};
  endfunction

  function automatic logic [TS_W-1:0] bin2gray(logic [TS_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [TS_W-1:0] gray2bin(logic [TS_W-1:0] g);
    logic [TS_W-1:0] b;
    b[TS_W-1] = g[TS_W-1];
    for (int i = TS_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
