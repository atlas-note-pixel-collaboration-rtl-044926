// serializer: parallel-to-serial output shift register.
//
// load (accepted only while ready) takes a WORD_W-bit word; it is sent most
// significant bit first, one bit per clock, starting on the clock after load,
// so a word occupies WORD_W clocks. The line is 0 when idle and every word
// starts with a 1. ready is high when a word may be loaded. Sending one bit
// per 40 MHz clock is this model's choice.
module serializer
  import fei3_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [WORD_W-1:0] word,
  output logic              ready,
  output logic              dout
);
  logic [WORD_W-1:0] sr;
  logic [$clog2(WORD_W+1)-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      left <= '0;
    end else if (load && ready) begin
      sr   <= word;
      left <= ($clog2(WORD_W+1))'(WORD_W);
    end else if (left != 0) begin
      sr   <= sr << 1;
      left <= left - 1'b1;
    end
  end

  assign ready = (left == 0);
  assign dout  = (left != 0) && sr[WORD_W-1];

  a_load_ready: assert property (@(posedge clk) disable iff (!rst_n) load |-> ready);
endmodule
