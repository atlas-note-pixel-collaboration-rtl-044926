// column_pair: two pixel columns of N_ROWS readout cells sharing one readout
// bus to the end of column.
//
// Cells are numbered p = 2*row + col. Every cell holding a complete hit
// requests the bus; the priority chain grants it to the request with the
// highest p (the top row, left column before right), and inhibits all cells
// below. The granted cell's row, column and LE/TE time stamps appear on
// `bus` combinationally; a read pulse from the end-of-column controller frees
// exactly that cell, and on the next clock the next request has the bus. How
// often this may happen (the ripple speed) is set by the controller.
//
// The pixel control registers form one shift chain: sdi enters cell 0 and
// sdo leaves the last cell. The discriminator outputs of cells with EnHitBus
// set are ORed into hitbus.
// Top-row-first priority follows the chip description; the order between the
// two columns of a row is this model's choice.
module column_pair
  import fei3_pkg::*;
#(
  parameter int unsigned N_ROWS = 160
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_clk,
  input  logic            sdi,
  input  logic            shift_en,
  input  logic [3:0]      latch_sel,
  input  logic            latch_stb,
  output logic            sdo,
  input  logic [Q_W-1:0]  q_col0 [N_ROWS],
  input  logic [Q_W-1:0]  q_col1 [N_ROWS],
  input  logic            strobe,
  input  logic [4:0]      gtdac,
  input  logic [9:0]      vcal,
  input  logic [TS_W-1:0] ts_gray,
  input  logic            read,
  output logic            hit_avail,
  output col_hit_t        bus,
  output logic            hitbus
);
  localparam int unsigned NPIX = 2 * N_ROWS;

  logic [NPIX:0]     chain;
  logic [NPIX-1:0]   ready, rd, hb;
  logic [TS_W-1:0]   le [NPIX];
  logic [TS_W-1:0]   te [NPIX];
  logic [NPIX-1:0]   grant;

  assign chain[0] = sdi;
  assign sdo      = chain[NPIX];

  for (genvar p = 0; p < NPIX; p++) begin : g_pix
    pixel_cell u_cell (
      .clk, .rst_n, .cfg_clk,
      .sdi(chain[p]), .shift_en, .latch_sel, .latch_stb, .sdo(chain[p+1]),
      .q_sensor((p % 2 == 0) ? q_col0[p/2] : q_col1[p/2]),
      .strobe, .gtdac, .vcal, .ts_gray,
      .read(rd[p]), .hit_ready(ready[p]), .le_gray(le[p]), .te_gray(te[p]), .hitbus(hb[p])
    );
  end

  // Priority chain: a cell is granted if it is ready and nothing above is.
  always_comb begin
    logic inhibit;
    inhibit = 1'b0;
    for (int p = NPIX - 1; p >= 0; p--) begin
      grant[p] = ready[p] & ~inhibit;
      inhibit  = inhibit | ready[p];
    end
  end

  // Bus: OR of the (one-hot) granted cell's data.
  always_comb begin
    bus = '0;
    for (int p = 0; p < NPIX; p++) begin
      if (grant[p]) begin
        bus.col     = 1'(p % 2);
        bus.row     = ROW_W'(p / 2);
        bus.le_gray = le[p];
        bus.te_gray = te[p];
      end
    end
  end

  assign hit_avail = |ready;
  assign rd        = grant & {NPIX{read}};
  assign hitbus    = |hb;
endmodule
