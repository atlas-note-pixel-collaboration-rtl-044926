// eoc_buffer: the end-of-column hit buffers of one column pair.
//
// DEPTH entries, each holding a formatted hit (column, row, binary LE, ToT),
// a triggered flag and a 4-bit trigger number. A write from the CEU goes to
// the lowest free entry; with no entry free the hit is lost and `overflow`
// pulses.
// Every clock each untriggered hit compares its age, (now - LE) mod 256, with
// the programmed L1 latency. At age == latency it is tagged with trig_id if a
// trigger arrives in that clock and deleted otherwise (`deleted` pulses);
// a hit already older than the latency is deleted. The same check is applied
// to a hit in the clock it is written.
// Readout: the chip-level controller broadcasts rd_l1id; the lowest entry that
// is triggered with that number is offered on rd_avail/rd_hit; rd_ack frees it
// at the clock edge.
// The free-slot and readout priority orders (lowest index first) are this
// model's choice.
module eoc_buffer
  import fei3_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TS_W-1:0]   now,
  input  logic [7:0]        latency,
  input  logic              wr_en,
  input  eoc_hit_t          wr_hit,
  input  logic              trig,
  input  logic [L1ID_W-1:0] trig_id,
  input  logic [L1ID_W-1:0] rd_l1id,
  output logic              rd_avail,
  output eoc_hit_t          rd_hit,
  input  logic              rd_ack,
  output logic              overflow,
  output logic              deleted,
  output logic [$clog2(DEPTH+1)-1:0] occupancy
);
  typedef enum logic [1:0] {KEEP, TAG, DROP} age_e;

  logic [DEPTH-1:0]  valid, trg;
  logic [L1ID_W-1:0] l1id [DEPTH];
  eoc_hit_t          hit  [DEPTH];

  logic [DEPTH-1:0] free_sel, rd_sel;
  logic             any_free;

  function automatic age_e check(logic [TS_W-1:0] le);
    logic [TS_W-1:0] age;
    age = now - le;
    if (age == latency) return trig ? TAG : DROP;
    if (age > latency)  return DROP;
    return KEEP;
  endfunction

  always_comb begin
    logic found_f, found_r;
    found_f  = 1'b0;
    found_r  = 1'b0;
    free_sel = '0;
    rd_sel   = '0;
    rd_hit   = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (!valid[i] && !found_f) begin free_sel[i] = 1'b1; found_f = 1'b1; end
      if (valid[i] && trg[i] && l1id[i] == rd_l1id && !found_r) begin
        rd_sel[i] = 1'b1;
        rd_hit    = hit[i];
        found_r   = 1'b1;
      end
    end
    any_free = found_f;
    rd_avail = found_r;
  end

  always_comb begin
    occupancy = '0;
    for (int i = 0; i < DEPTH; i++) occupancy += ($clog2(DEPTH+1))'(valid[i]);
  end

  assign overflow = wr_en && !any_free;

  // A hit is deleted in this clock if it ages out untriggered, or if it is
  // already too old when written.
  logic del_now;
  always_comb begin
    del_now = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      if (valid[i] && !(rd_ack && rd_sel[i]) && !trg[i] && check(hit[i].le) == DROP)
        del_now = 1'b1;
      if (!valid[i] && wr_en && free_sel[i] && check(wr_hit.le) == DROP) del_now = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid   <= '0;
      trg     <= '0;
      deleted <= 1'b0;
      for (int i = 0; i < DEPTH; i++) begin
        l1id[i] <= '0;
        hit[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (valid[i]) begin
          if (rd_ack && rd_sel[i]) begin
            valid[i] <= 1'b0;
            trg[i]   <= 1'b0;
          end else if (!trg[i]) begin
            unique case (check(hit[i].le))
              TAG:  begin trg[i] <= 1'b1; l1id[i] <= trig_id; end
              DROP: valid[i] <= 1'b0;
              default: ;
            endcase
          end
        end else if (wr_en && free_sel[i]) begin
          hit[i] <= wr_hit;
          unique case (check(wr_hit.le))
            TAG:     begin valid[i] <= 1'b1; trg[i] <= 1'b1; l1id[i] <= trig_id; end
            DROP:    ;
            default: begin valid[i] <= 1'b1; trg[i] <= 1'b0; end
          endcase
        end
      end
      deleted <= del_now;
    end
  end
endmodule
