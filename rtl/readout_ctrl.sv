// readout_ctrl: chip-level readout controller.
//
// Whenever the trigger FIFO is not empty, the oldest trigger's L1 number is
// broadcast to the end-of-column buffers of all column pairs (rd_l1id). Each
// buffer offers its first hit with that number; the controller takes the one
// from the lowest-numbered column pair, turns it into a hit word (column
// 2*pair + col, row, ToT), hands it to the serializer and acknowledges it,
// which frees the buffer entry. This repeats while any buffer still offers a
// hit. Then an end-of-event word with the L1 number, bunch-crossing id and
// error flags {0, 0, lost trigger, buffer overflow} is sent and the trigger is
// popped. Events therefore leave in trigger order. A word is only issued when
// the serializer is ready, so the controller follows the output rate.
// The controller itself is combinational; its state lives in the FIFO
// pointers, the buffers and the serializer.
// The column-pair priority order and the word layout are this model's choice.
module readout_ctrl
  import fei3_pkg::*;
#(
  parameter int unsigned N_CP = 9
) (
  input  logic              fifo_empty,
  input  logic [L1ID_W-1:0] fifo_id,
  input  logic [TS_W-1:0]   fifo_bcid,
  input  logic [1:0]        fifo_flags,
  output logic              fifo_pop,
  output logic [L1ID_W-1:0] rd_l1id,
  input  logic [N_CP-1:0]   rd_avail,
  input  eoc_hit_t          rd_hit [N_CP],
  output logic [N_CP-1:0]   rd_ack,
  input  logic              ser_ready,
  output logic              ser_load,
  output logic [WORD_W-1:0] ser_word,
  output logic              eoe_sent
);
  logic     found;
  eoc_hit_t h;
  logic [COL_W-1:0] col;

  assign rd_l1id = fifo_id;

  always_comb begin
    found  = 1'b0;
    h      = '0;
    col    = '0;
    rd_ack = '0;
    for (int c = 0; c < N_CP; c++) begin
      if (rd_avail[c] && !found) begin
        found = 1'b1;
        h     = rd_hit[c];
        col   = COL_W'(2 * c) + COL_W'(rd_hit[c].col);
        rd_ack[c] = ser_ready && !fifo_empty;
      end
    end
    ser_load = ser_ready && !fifo_empty;
    fifo_pop = ser_load && !found;
    eoe_sent = fifo_pop;
    ser_word = found ? hit_word(col, h.row, h.tot)
                     : eoe_word(fifo_id, fifo_bcid, {2'b00, fifo_flags});
  end
endmodule
