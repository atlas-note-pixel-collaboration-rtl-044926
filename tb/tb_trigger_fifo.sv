// tb_trigger_fifo: 16 triggers fill the FIFO with their BCIDs and L1 numbers
// 0..15; a 17th is refused and marks the next accepted entry as following a
// lost trigger; the overflow input is carried into the next entry; pops return
// entries in order.
module tb_trigger_fifo;
  logic clk = 0, rst_n = 0;
  logic l1 = 0, ovf_in = 0, pop = 0, accept, empty, full;
  logic [7:0] bcid = 0, rd_bcid;
  logic [3:0] trig_id, rd_id;
  logic [1:0] rd_flags;
  int checks = 0, failures = 0;
  logic [7:0] bq [$];

  trigger_fifo dut (.clk, .rst_n, .l1, .bcid, .ovf_in, .accept, .trig_id, .empty, .full, .pop,
                    .rd_id, .rd_bcid, .rd_flags);

  always #5 clk = ~clk;
  always @(posedge clk) bcid <= bcid + 8'd3;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    @(negedge clk);
    checks++; if (!empty) failures++;
    for (int i = 0; i < 16; i++) begin
      l1 = 1; #1;
      checks++; if (!accept || trig_id != 4'(i)) failures++;
      bq.push_back(bcid);
      @(negedge clk); l1 = 0;
      if (i == 4) begin ovf_in = 1; @(negedge clk); ovf_in = 0; end
    end
    checks++; if (!full) failures++;
    l1 = 1; #1; checks++; if (accept) failures++;
    @(negedge clk); l1 = 0;
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (empty || rd_id != 4'(i) || rd_bcid != bq.pop_front() ||
          rd_flags != ((i == 5) ? 2'b01 : 2'b00)) begin
        failures++; $display("i=%0d id=%0d flags=%b", i, rd_id, rd_flags);
      end
      pop = 1; @(negedge clk); pop = 0;
      if (i == 0) begin
        l1 = 1; bq.push_back(bcid); @(negedge clk); l1 = 0;   // refill one: lost flag
      end
    end
    checks++; if (empty || rd_flags != 2'b10 || rd_id != 4'd0 || rd_bcid != bq.pop_front()) failures++;
    pop = 1; @(negedge clk); pop = 0;
    checks++; if (!empty) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
