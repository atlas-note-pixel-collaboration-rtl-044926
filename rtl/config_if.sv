// config_if: serial configuration port and 231-bit global register.
//
// Three pins: cfg_din, cfg_clk (5 MHz) and cfg_load. A frame is the run of
// cfg_clk rising edges with cfg_load high; data is sampled on those edges.
// Frame layout (first bit first):
//   4-bit chip address (MSB first), compared with the chip_addr pins;
//   4-bit command (fei3_pkg::cfg_cmd_e);
//   WR_GLOBAL: 231 data bits, shifted into a staging register; the global
//              register is updated when the frame ends, only if exactly 231
//              bits were received;
//   RD_GLOBAL: the global register is copied to the staging register and
//              shifted out on cfg_dout, MSB first: cfg_dout changes just
//              after each data edge and holds until the next one;
//   WR_PIXEL : 4-bit latch index, then one bit per pixel pushed into the
//              pixel chain (pix_shift_en, pix_sdi); when the frame ends
//              pix_latch_stb copies the chain into latch `pix_latch_sel`.
// The end of a frame is seen at the first cfg_clk edge with cfg_load low, so
// one more clock edge must follow each frame. Frames for another address are
// ignored. The pin set, 5 MHz and the sending of the geographical address come
// from the chip description; frame layout and commands are this model's.
module config_if
  import fei3_pkg::*;
(
  input  logic       cfg_clk,
  input  logic       rst_n,
  input  logic [3:0] chip_addr,
  input  logic       cfg_din,
  input  logic       cfg_load,
  output logic       cfg_dout,
  output gcfg_t      gcfg,
  output logic       pix_sdi,
  output logic       pix_shift_en,
  output logic [3:0] pix_latch_sel,
  output logic       pix_latch_stb
);
  logic [15:0]       nbits;
  logic [7:0]        hdr;
  logic [GCFG_W-1:0] stage;
  logic              in_frame;
  logic [3:0]        sel_sr;

  wire              match = (hdr[7:4] == chip_addr);
  wire cfg_cmd_e    cmd   = cfg_cmd_e'(hdr[3:0]);
  // Data bits of a pixel frame start after the 4-bit latch index.
  assign pix_sdi       = cfg_din;
  assign pix_shift_en  = cfg_load && match && cmd == CMD_WR_PIXEL && nbits >= 16'd12;

  always_ff @(posedge cfg_clk or negedge rst_n) begin
    if (!rst_n) begin
      nbits         <= '0;
      hdr           <= '0;
      stage         <= '0;
      in_frame      <= 1'b0;
      sel_sr        <= '0;
      gcfg          <= GCFG_RESET;
      pix_latch_sel <= '0;
      pix_latch_stb <= 1'b0;
      cfg_dout      <= 1'b0;
    end else begin
      pix_latch_stb <= 1'b0;
      cfg_dout      <= 1'b0;
      if (cfg_load) begin
        in_frame <= 1'b1;
        if (nbits != 16'hFFFF) nbits <= nbits + 1'b1;
        if (nbits < 16'd8) begin
          hdr <= {hdr[6:0], cfg_din};
          if (nbits == 16'd7 && hdr[6:3] == chip_addr &&
              cfg_cmd_e'({hdr[2:0], cfg_din}) == CMD_RD_GLOBAL) stage <= gcfg;
        end else if (match) begin
          unique case (cmd)
            CMD_WR_GLOBAL: stage <= {stage[GCFG_W-2:0], cfg_din};
            CMD_RD_GLOBAL: begin
              cfg_dout <= stage[GCFG_W-1];
              stage    <= {stage[GCFG_W-2:0], 1'b0};
            end
            CMD_WR_PIXEL: if (nbits < 16'd12) sel_sr <= {sel_sr[2:0], cfg_din};
            default: ;
          endcase
        end
      end else if (in_frame) begin
        in_frame <= 1'b0;
        nbits    <= '0;
        if (match && nbits >= 16'd8) begin
          if (cmd == CMD_WR_GLOBAL && nbits == 16'(8 + GCFG_W)) gcfg <= gcfg_t'(stage);
          if (cmd == CMD_WR_PIXEL && nbits > 16'd12) begin
            pix_latch_sel <= sel_sr;
            pix_latch_stb <= 1'b1;
          end
        end
        hdr <= '0;
      end
    end
  end
endmodule
