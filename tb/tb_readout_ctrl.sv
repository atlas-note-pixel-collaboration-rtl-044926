// tb_readout_ctrl: three column pairs are modelled as queues of triggered
// hits. For several events the testbench checks that the controller
// broadcasts the FIFO's L1 number, emits hit words from the lowest column
// pair first with column 2*pair+col, acknowledges only the hit it sent, waits
// for the serializer, and finishes each event with an end-of-event word that
// carries the L1 number, BCID and flags, popping the FIFO.
module tb_readout_ctrl;
  import fei3_pkg::*;
  localparam int N = 3;
  logic clk = 0;
  logic fifo_empty, fifo_pop, ser_ready, ser_load, eoe_sent;
  logic [3:0] fifo_id, rd_l1id;
  logic [7:0] fifo_bcid;
  logic [1:0] fifo_flags;
  logic [N-1:0] rd_avail, rd_ack;
  eoc_hit_t rd_hit [N];
  logic [22:0] ser_word;
  int checks = 0, failures = 0;

  eoc_hit_t cq [N][$];
  int busy;

  // queue heads as the buffers' readout ports; refreshed after every change
  task automatic upd();
    for (int c = 0; c < N; c++) begin
      rd_avail[c] = cq[c].size() != 0;
      rd_hit[c]   = rd_avail[c] ? cq[c][0] : '0;
    end
  endtask
  int nhits = 0;
  assign ser_ready = (busy == 0);

  readout_ctrl #(.N_CP(N)) dut (.fifo_empty, .fifo_id, .fifo_bcid, .fifo_flags, .fifo_pop,
    .rd_l1id, .rd_avail, .rd_hit, .rd_ack, .ser_ready, .ser_load, .ser_word, .eoe_sent);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [22:0] expw [$];
  always @(posedge clk) begin
    if (busy > 0) busy <= busy - 1;
    if (ser_load) begin
      checks++;
      if (!ser_ready) failures++;
      checks++;
      if (expw.size() == 0 || ser_word !== expw[0]) begin
        failures++; $display("word %h exp %h", ser_word, expw.size() ? expw[0] : 23'h0);
      end
      if (expw.size()) void'(expw.pop_front());
      busy <= 4;
    end
    for (int c = 0; c < N; c++) if (rd_ack[c]) begin void'(cq[c].pop_front()); nhits++; end
    upd();
    if (fifo_pop) fifo_empty <= 1'b1;
  end

  initial begin
    busy = 0;
    upd();
    fifo_empty = 1; fifo_id = 0; fifo_bcid = 0; fifo_flags = 0;
    repeat (3) @(negedge clk);
    checks++; if (ser_load || rd_ack != 0) failures++;
    for (int ev = 0; ev < 10; ev++) begin
      fifo_id = 4'($urandom); fifo_bcid = 8'($urandom); fifo_flags = 2'($urandom);
      for (int c = 0; c < N; c++) begin
        int n;
        n = int'($urandom_range(1, 3));
        for (int k = 0; k < n; k++) begin
          eoc_hit_t h;
          h = '{col: 1'($urandom), row: 8'($urandom_range(0, 159)), le: 8'($urandom), tot: 8'($urandom)};
          cq[c].push_back(h);
          expw.push_back({2'b10, 5'(2 * c + h.col), h.row, h.tot});
        end
      end
      upd();
      expw.push_back({2'b11, fifo_id, fifo_bcid, 2'b00, fifo_flags, 5'b0});
      @(negedge clk);
      checks++; if (rd_l1id != fifo_id) failures++;
      fifo_empty = 0;
      while (!fifo_empty) @(negedge clk);
      checks++; if (expw.size() != 0) failures++;
    end
    checks++; if (nhits < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
