// trigger_fifo: queue of pending level-1 triggers.
//
// Each accepted trigger stores the bunch-crossing id (current time stamp) and
// the flags {lost trigger, buffer overflow} in a DEPTH-deep FIFO. The write
// pointer at the time of the trigger is the trigger's L1 number: it is given
// to the end-of-column buffers (trig_id) to tag the matching hits. The read
// side presents the oldest pending trigger (rd_id, rd_bcid, rd_flags) as long
// as `empty` is low; `pop` removes it.
// A trigger arriving with the FIFO full is not accepted (accept stays low);
// this sets the lost flag of the next accepted entry. ovf_in (hits lost in an
// end-of-column buffer since the last accepted trigger) is stored the same way.
// Depth 16 and the stored BCID/overflow bit follow the chip description; the
// lost-trigger flag is this model's addition for the end-of-event word.
module trigger_fifo
  import fei3_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     l1,
  input  logic [TS_W-1:0]          bcid,
  input  logic                     ovf_in,
  output logic                     accept,
  output logic [$clog2(DEPTH)-1:0] trig_id,
  output logic                     empty,
  output logic                     full,
  input  logic                     pop,
  output logic [$clog2(DEPTH)-1:0] rd_id,
  output logic [TS_W-1:0]          rd_bcid,
  output logic [1:0]               rd_flags
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [TS_W-1:0] bc_mem [DEPTH];
  logic [1:0]      fl_mem [DEPTH];
  logic [AW-1:0]   wp, rp;
  logic [AW:0]     count;
  logic            lost, ovf;
  logic            do_pop;

  assign do_pop = pop && !empty;

  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign accept  = l1 && !full;
  assign trig_id = wp;
  assign rd_id   = rp;
  assign rd_bcid = bc_mem[rp];
  assign rd_flags = fl_mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      lost  <= 1'b0;
      ovf   <= 1'b0;
      for (int i = 0; i < DEPTH; i++) begin
        bc_mem[i] <= '0;
        fl_mem[i] <= '0;
      end
    end else begin
      if (accept) begin
        bc_mem[wp] <= bcid;
        fl_mem[wp] <= {lost, ovf | ovf_in};
        wp   <= wp + 1'b1;
        lost <= 1'b0;
        ovf  <= 1'b0;
      end else begin
        if (l1)     lost <= 1'b1;
        if (ovf_in) ovf  <= 1'b1;
      end
      if (do_pop) rp <= rp + 1'b1;
      count <= count + (AW+1)'(accept) - (AW+1)'(do_pop);
    end
  end

  // A pop is only requested for a pending trigger.
  a_pop_not_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
