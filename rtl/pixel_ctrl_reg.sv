// pixel_ctrl_reg: the 14-bit control register of one pixel.
//
// Bits: FDAC (3, feedback current trim), TDAC (7, threshold trim), MASK,
// EnHitBus, Select (test injection) and Shutdown, as fei3_pkg::pix_cfg_t.
// Loading works bit-plane by bit-plane: a one-bit shift stage per pixel is
// chained through the whole matrix; after a full chain has been shifted in,
// latch_stb copies the stage into bit latch_sel (0..13) of every pixel at
// once. This keeps one shift flop per pixel instead of fourteen. The chain and
// the latches run on the configuration clock; the bits are static while the
// chip takes data. The bit-plane scheme and the reset values (TDAC 64, FDAC 4,
// all flags off) are choices of this model.
module pixel_ctrl_reg
  import fei3_pkg::*;
(
  input  logic     cfg_clk,
  input  logic     rst_n,
  input  logic     sdi,        // from the previous pixel of the chain
  input  logic     shift_en,
  input  logic [3:0] latch_sel,
  input  logic     latch_stb,
  output logic     sdo,        // to the next pixel
  output pix_cfg_t cfg
);
  logic sbit;
  logic [PIX_CFG_W-1:0] bits;

  always_ff @(posedge cfg_clk or negedge rst_n) begin
    if (!rst_n) begin
      sbit <= 1'b0;
      bits <= PIX_CFG_RESET;
    end else begin
      if (shift_en) sbit <= sdi;
      if (latch_stb && latch_sel < 4'(PIX_CFG_W)) bits[latch_sel] <= sbit;
    end
  end

  assign sdo = sbit;
  assign cfg = pix_cfg_t'(bits);
endmodule
