// tb_ceu: a queue stands in for the column pair. For each speed setting the
// testbench checks the formatted hits written to the buffer (binary LE,
// ToT = TE - LE, row, column), the spacing of reads (8, 4, 2 clocks) and of
// writes (at least 2 clocks), the digital ToT threshold and the timewalk
// duplicate with LE-1, and that a disabled CEU reads nothing.
module tb_ceu;
  import fei3_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enable = 1, en_tot_filter = 0, en_timewalk = 0;
  logic [1:0] speed = 2;
  logic [7:0] tot_min = 0, tw_thr = 0;
  logic hit_avail, read, wr_en, filtered, dup;
  col_hit_t bus;
  eoc_hit_t wr_hit;
  int checks = 0, failures = 0;

  col_hit_t q [$];
  eoc_hit_t expq [$];
  int last_read, last_wr, cyc, nfilt, ndup;

  assign hit_avail = q.size() != 0;
  assign bus = hit_avail ? q[0] : '0;

  ceu dut (.clk, .rst_n, .enable, .speed, .en_tot_filter, .tot_min, .en_timewalk, .tw_thr,
           .hit_avail, .bus, .read, .wr_en, .wr_hit, .filtered, .dup);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int period;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (read) begin
      checks++;
      if (last_read >= 0 && cyc - last_read < period) begin
        failures++; $display("read spacing %0d", cyc - last_read);
      end
      last_read <= cyc;
      void'(q.pop_front());
    end
    if (filtered) nfilt <= nfilt + 1;
    if (dup) ndup <= ndup + 1;
    if (wr_en) begin
      eoc_hit_t e;
      checks++;
      if (last_wr >= 0 && cyc - last_wr < 2) failures++;
      last_wr <= cyc;
      e = expq.pop_front();
      checks++;
      if (wr_hit !== e) begin failures++; $display("wr %h exp %h", wr_hit, e); end
    end
  end

  task automatic batch(input int n);
    for (int k = 0; k < n; k++) begin
      logic [7:0] le, tot;
      col_hit_t h;
      le = 8'($urandom); tot = 8'($urandom_range(0, 40));
      h = '{col: 1'($urandom), row: 8'($urandom_range(0, 159)), le_gray: bin2gray(le),
            te_gray: bin2gray(le + tot)};
      if (!(en_tot_filter && tot < tot_min)) begin
        expq.push_back('{col: h.col, row: h.row, le: le, tot: tot});
        if (en_timewalk && tot < tw_thr) expq.push_back('{col: h.col, row: h.row, le: le - 8'd1, tot: tot});
      end
      q.push_back(h);
    end
    while (q.size() != 0 || expq.size() != 0) @(posedge clk);
    repeat (10) @(posedge clk);
  endtask

  initial begin
    int t0;
    cyc = 0; last_read = -1; last_wr = -1; nfilt = 0; ndup = 0;
    #12 rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      speed = 2'(s);
      period = (s == 0) ? 8 : (s == 1) ? 4 : 2;
      last_read = -1;
      t0 = cyc;
      batch(20);
      checks++; if (cyc - t0 < 20 * period) failures++;
    end
    en_tot_filter = 1; tot_min = 10;
    batch(30);
    checks++; if (nfilt == 0) failures++;
    en_tot_filter = 0; en_timewalk = 1; tw_thr = 15; speed = 2; period = 2;
    batch(30);
    checks++; if (ndup == 0) failures++;
    en_tot_filter = 1;
    batch(30);
    enable = 0;
    q.push_back('0);
    repeat (20) @(posedge clk);
    checks++; if (q.size() != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
