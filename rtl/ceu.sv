// ceu: controller end-of-column unit of one column pair.
//
// Transfer: while the column pair offers a hit, the CEU pulses `read` (which
// frees the granted cell) and captures the bus in the same clock. Captures are
// spaced by the programmed transfer period: 8, 4 or 2 clocks of 40 MHz
// (5, 10 or 20 MHz, speed code 0, 1, 2/3).
// Formatting: LE and TE are converted from Gray to binary and ToT = TE - LE
// (modulo 256). If the digital threshold is on, a hit with ToT < tot_min is
// dropped (`filtered` pulses). If timewalk correction is on, a hit with
// ToT < tw_thr is written twice, once with LE and once with LE-1 (`dup`
// pulses on the second write).
// Write: the formatted hit is written to the end-of-column buffer one clock
// after capture; consecutive writes are at least 2 clocks apart (20 MHz).
// A new capture waits until the previous hit is fully written.
// A disabled column pair is never read. The exact pipeline is this model's.
module ceu
  import fei3_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [1:0]  speed,
  input  logic        en_tot_filter,
  input  logic [7:0]  tot_min,
  input  logic        en_timewalk,
  input  logic [7:0]  tw_thr,
  input  logic        hit_avail,
  input  col_hit_t    bus,
  output logic        read,
  output logic        wr_en,
  output eoc_hit_t    wr_hit,
  output logic        filtered,
  output logic        dup
);
  logic [2:0] period_cnt;
  logic       pend_valid, pend_dup, pend_second, gap;
  eoc_hit_t   pend;
  logic [TS_W-1:0] le_bin, tot;
  logic       drop, need_dup;

  always_comb begin
    le_bin   = gray2bin(bus.le_gray);
    tot      = gray2bin(bus.te_gray) - le_bin;
    drop     = en_tot_filter && (tot < tot_min);
    need_dup = en_timewalk && (tot < tw_thr);
  end

  assign read     = enable && hit_avail && !pend_valid && period_cnt == 0;
  assign filtered = read && drop;
  assign wr_en    = pend_valid && !gap;
  assign wr_hit   = pend;
  assign dup      = wr_en && pend_second;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_cnt  <= '0;
      pend_valid  <= 1'b0;
      pend_dup    <= 1'b0;
      pend_second <= 1'b0;
      gap         <= 1'b0;
      pend        <= '0;
    end else begin
      gap <= wr_en;
      if (period_cnt != 0) period_cnt <= period_cnt - 1'b1;
      if (read) begin
        unique case (speed)
          2'd0:    period_cnt <= 3'd7;
          2'd1:    period_cnt <= 3'd3;
          default: period_cnt <= 3'd1;
        endcase
        if (!drop) begin
          pend_valid  <= 1'b1;
          pend_dup    <= need_dup;
          pend_second <= 1'b0;
          pend        <= '{col: bus.col, row: bus.row, le: le_bin, tot: tot};
        end
      end else if (wr_en) begin
        if (pend_dup) begin
          pend_dup    <= 1'b0;
          pend_second <= 1'b1;
          pend.le     <= pend.le - 1'b1;
        end else begin
          pend_valid  <= 1'b0;
          pend_second <= 1'b0;
        end
      end
    end
  end
endmodule
