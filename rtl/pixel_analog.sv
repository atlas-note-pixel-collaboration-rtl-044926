// pixel_analog: behavioural model of the analog part of one pixel (not
// synthesizable silicon: it stands in for the charge preamplifier, the two
// stage discriminator, the in-pixel threshold generator and the test charge
// injection).
//
// Real circuit: a folded-cascode charge amplifier whose feedback capacitor is
// discharged by a constant, saturating current, so the output returns to
// baseline linearly and the discriminator pulse is as long as the charge is
// large; a leakage compensation branch keeps sensor leakage out of that
// current. Per pixel, a 7-bit TDAC trims the threshold and a 3-bit FDAC trims
// the feedback current.
//
// Model, on the 40 MHz clock: a deposit is either q_sensor (non-zero, in
// electrons) or, on a rising strobe with Select set, VCal * VCAL_E_PER_LSB.
// If the pixel is not shut down and the charge exceeds the threshold, disc
// goes high on the next clock and stays high for
//   q * 12 / (500 * (8 + FDAC))  clocks (at least 1, at most 255),
// which gives 40 clocks (1 us) for 20 000 e at FDAC 4, the return time the
// chip description quotes. Threshold in electrons:
//   40 * TDAC + 80 * GTDAC + 160,  i.e. 4000 e at TDAC 64, GTDAC 16.
// Charge arriving while the pulse is high is ignored. All scale factors are
// this model's own.
module pixel_analog
  import fei3_pkg::*;
#(
  parameter int unsigned VCAL_E_PER_LSB = 25
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [Q_W-1:0] q_sensor,
  input  logic           strobe,
  input  logic           select,
  input  logic           shutdown,
  input  logic [6:0]     tdac,
  input  logic [2:0]     fdac,
  input  logic [4:0]     gtdac,
  input  logic [9:0]     vcal,
  output logic           disc
);
  logic        strobe_q;
  logic [7:0]  cnt;
  logic [31:0] q, thr, width;

  always_comb begin
    q = 32'(q_sensor);
    if (q_sensor == '0 && strobe && !strobe_q && select) q = 32'(vcal) * VCAL_E_PER_LSB;
    thr   = 40 * 32'(tdac) + 80 * 32'(gtdac) + 160;
    width = (q * 12) / (500 * (8 + 32'(fdac)));
    if (width == 0)  width = 1;
    if (width > 255) width = 255;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strobe_q <= 1'b0;
      cnt      <= '0;
    end else begin
      strobe_q <= strobe;
      if (cnt != 0) cnt <= cnt - 1'b1;
      else if (!shutdown && q > thr) cnt <= width[7:0];
    end
  end

  assign disc = (cnt != 0);
endmodule
