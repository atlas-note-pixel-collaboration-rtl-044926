// pixel_readout: digital readout logic of one pixel.
//
// The discriminator output (gated off by MASK) is sampled on the 40 MHz
// clock. Its rising edge stores the Gray-coded time stamp as leading edge
// (LE); its falling edge stores the trailing edge (TE) and raises hit_ready.
// The hit then waits until the column priority bus selects this pixel and the
// end-of-column controller pulses read, which frees the cell. While a hit is
// stored or being measured, new discriminator pulses are ignored (the pixel is
// busy). Edge detection on the clock stands in for the short edge strobes of
// the chip. Timing: hit_ready rises one clock after disc falls; le/te are
// stable while hit_ready is high.
module pixel_readout
  import fei3_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            disc,
  input  logic            mask,
  input  logic [TS_W-1:0] ts_gray,
  input  logic            read,
  output logic            hit_ready,
  output logic [TS_W-1:0] le_gray,
  output logic [TS_W-1:0] te_gray
);
  typedef enum logic [1:0] {IDLE, ACTIVE, DONE} state_e;
  state_e state;
  logic   d, d_q;

  assign d = disc & ~mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      d_q     <= 1'b0;
      le_gray <= '0;
      te_gray <= '0;
    end else begin
      d_q <= d;
      unique case (state)
        IDLE:   if (d && !d_q) begin le_gray <= ts_gray; state <= ACTIVE; end
        ACTIVE: if (!d)        begin te_gray <= ts_gray; state <= DONE;   end
        DONE:   if (read)      state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign hit_ready = (state == DONE);
endmodule
