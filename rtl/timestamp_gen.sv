// timestamp_gen: the chip's bunch-crossing time stamp.
//
// An 8-bit binary counter advances on every 40 MHz clock. Its Gray-coded copy
// is what the pixels latch at the leading and trailing edges of a hit; Gray
// code changes one bit per step, so a pixel that samples it near a transition
// is off by at most one count. The binary value serves the end-of-column
// logic (hit age) and is stored as bunch-crossing id with every trigger.
// Both outputs are registered and change together one clock after each edge.
// Reset to zero is this model's choice.
module timestamp_gen #(
  parameter int unsigned TS_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [TS_W-1:0] ts_bin,
  output logic [TS_W-1:0] ts_gray
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts_bin  <= '0;
      ts_gray <= '0;
    end else begin
      ts_bin  <= ts_bin + 1'b1;
      ts_gray <= (ts_bin + 1'b1) ^ ((ts_bin + 1'b1) >> 1);
    end
  end
endmodule
