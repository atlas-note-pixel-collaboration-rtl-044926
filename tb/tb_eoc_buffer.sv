// tb_eoc_buffer: an 8-entry buffer with latency 20. Checks that a hit is
// tagged with the trigger number when the trigger comes exactly `latency`
// clocks after its LE, deleted when no trigger comes then, deleted at once if
// written too late, that readout returns exactly the hits of the broadcast
// trigger number in entry order and frees them, and that a write to a full
// buffer raises overflow.
module tb_eoc_buffer;
  import fei3_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  logic [7:0] now = 0;
  logic wr_en = 0, trig = 0, rd_avail, rd_ack = 0, overflow, deleted;
  logic [3:0] trig_id = 0, rd_l1id = 0;
  eoc_hit_t wr_hit = '0, rd_hit;
  logic [3:0] occupancy;
  int checks = 0, failures = 0, ndel = 0;

  eoc_buffer #(.DEPTH(D)) dut (.clk, .rst_n, .now, .latency(8'd20), .wr_en, .wr_hit, .trig,
    .trig_id, .rd_l1id, .rd_avail, .rd_hit, .rd_ack, .overflow, .deleted, .occupancy);

  always #5 clk = ~clk;
  always @(posedge clk) begin now <= now + 1; if (deleted) ndel++; end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic [7:0] le, input logic [7:0] row);
    wr_hit = '{col: 1'b0, row: row, le: le, tot: 8'd5};
    wr_en = 1; @(negedge clk); wr_en = 0;
  endtask

  initial begin
    logic [7:0] t;
    #12 rst_n = 1;
    @(negedge clk);
    // three hits with LE = t, one with LE = t+1; trigger (id 3) at t+20
    t = now;
    write(t, 8'd1); write(t - 8'd1, 8'd2); write(t - 8'd2, 8'd3);
    checks++; if (occupancy != 3) failures++;
    // hit 2 (LE t-1) ages out at t+19: no trigger -> deleted
    // hit 1 (LE t) tagged at t+20, hit 3 (LE t-2) deleted at t+18
    while (now != t + 8'd20) @(negedge clk);
    trig = 1; trig_id = 3; @(negedge clk); trig = 0;
    checks++; if (occupancy != 1) begin failures++; $display("occ %0d", occupancy); end
    checks++; if (ndel < 2) failures++;
    rd_l1id = 2; #1;
    checks++; if (rd_avail) failures++;
    rd_l1id = 3; #1;
    checks++; if (!rd_avail || rd_hit.row != 1) failures++;
    rd_ack = 1; @(negedge clk); rd_ack = 0;
    checks++; if (rd_avail || occupancy != 0) failures++;
    // a late hit (older than the latency) is dropped on write
    write(now - 8'd30, 8'd9);
    @(negedge clk);
    checks++; if (occupancy != 0) failures++;
    // fill the buffer with hits of the same LE, then overflow
    t = now;
    for (int i = 0; i < D; i++) begin
      checks++; if (overflow) failures++;
      write(t, 8'(10 + i));
    end
    wr_hit.le = t; wr_en = 1; #1;
    checks++; if (!overflow) failures++;
    @(negedge clk); wr_en = 0;
    while (now != t + 8'd20) @(negedge clk);
    trig = 1; trig_id = 7; @(negedge clk); trig = 0;
    rd_l1id = 7;
    for (int i = 0; i < D; i++) begin
      #1;
      checks++; if (!rd_avail || rd_hit.row != 8'(10 + i)) failures++;
      rd_ack = 1; @(negedge clk); rd_ack = 0;
    end
    #1;
    checks++; if (rd_avail || occupancy != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
