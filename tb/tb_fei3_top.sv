// tb_fei3_top: end-to-end test of the complete chip at its default size
// (18 x 160 pixels, 64 buffers per column pair, 16 pending triggers,
// L1 latency 128 clocks = 3.2 us).
//
// The chip is configured only through its serial pins: global register
// (timewalk and ToT filter on, VCal), read back, and three pixel latch planes
// (one masked pixel, one pixel selected for injection, one on the hit bus).
// Charges are then deposited through sensor_q and triggers sent on l1_trig.
// The serial output is decoded into events; each event's hit words are
// compared, as a set, with a reference model: a hit deposited at clock c0
// with charge q has ToT = q*12/(500*(8+FDAC)) and belongs to the trigger at
// c0 + latency; it is dropped if ToT < tot_min and also belongs to the trigger
// at c0 + latency - 1 if ToT < tw_thr. L1 numbers, BCIDs and flags of the
// end-of-event words are checked too.
// Mechanisms counted (each must occur): triggered readout, deletion of
// untriggered hits, timewalk duplicate, ToT filter, masked pixel, strobe
// injection, hit bus, column pair disable, 5 MHz transfer mode, buffer
// overflow flag, trigger FIFO full (lost trigger flag), global read-back.
module tb_fei3_top;
  import fei3_pkg::*;
  localparam int NCP = 9, NR = 160, NPIX = 2 * NCP * NR, LAT = 128;

  logic clk = 0, cfg_clk = 0, rst_n = 0;
  logic cfg_din = 0, cfg_load = 0, cfg_dout, l1_trig = 0, strobe = 0, dout, hitbus;
  logic [3:0] chip_addr = 4'd9;
  logic [15:0] sensor_q [2*NCP][NR];
  logic [N_BIAS-1:0][7:0] bias_dac;
  logic [9:0] vcal_dac;

  fei3_top dut (.clk, .rst_n, .cfg_clk, .cfg_din, .cfg_load, .cfg_dout, .chip_addr, .l1_trig,
                .strobe, .sensor_q, .dout, .hitbus, .bias_dac, .vcal_dac);

  always #12.5 clk = ~clk;           // 40 MHz
  always #100 cfg_clk = ~cfg_clk;    // 5 MHz

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  initial begin
    #20ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // ---------------- mechanism counters -----------------------------------
  int n_del = 0, n_dup = 0, n_filt = 0, n_ovf = 0;
  for (genvar c = 0; c < NCP; c++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_cp[c].u_eoc.deleted)  n_del++;
      if (dut.g_cp[c].u_ceu.dup)      n_dup++;
      if (dut.g_cp[c].u_ceu.filtered) n_filt++;
      if (dut.g_cp[c].u_eoc.overflow) n_ovf++;
    end
  end
  int n_hitbus = 0;
  // 5 MHz mode: spacing of reads from column pair 3
  int n_slow = 0, n_fast = 0, last_rd3 = -100;
  always @(posedge clk) if (rst_n && dut.col_read[3]) begin
    if (cyc - last_rd3 == 8) n_slow++;
    if (cyc - last_rd3 == 2) n_fast++;
    last_rd3 = cyc;
  end
  always @(posedge clk) if (rst_n && hitbus) n_hitbus++;

  // ---------------- serial output decoder --------------------------------
  int ev_l1 [$], ev_bc [$], ev_fl [$], ev_n [$];
  int hitw [$];                       // hit payloads, {col,row,tot}, all events
  int cur [$];
  logic [22:0] sh;
  int nb = 0;
  always @(posedge clk) if (rst_n) begin
    if (nb == 0) begin
      if (dout) begin sh = 23'd1; nb = 1; end
    end else begin
      sh = {sh[21:0], dout};
      nb++;
      if (nb == 23) begin
        nb = 0;
        if (sh[21] == 1'b0) cur.push_back(int'(sh[20:0]));
        else begin
          ev_l1.push_back(int'(sh[20:17])); ev_bc.push_back(int'(sh[16:9]));
          ev_fl.push_back(int'(sh[8:5]));   ev_n.push_back(cur.size());
          foreach (cur[i]) hitw.push_back(cur[i]);
          cur.delete();
        end
      end
    end
  end

  // ---------------- configuration helpers --------------------------------
  task automatic cfg_frame(input logic [3:0] cmd, input int nextra, input logic [3:0] sel,
                           input logic [GCFG_W-1:0] g, input logic pixbits [NPIX]);
    logic [7:0] h;
    h = {chip_addr, cmd};
    @(negedge cfg_clk);
    cfg_load = 1;
    for (int i = 7; i >= 0; i--) begin cfg_din = h[i]; @(negedge cfg_clk); end
    if (cmd == CMD_WR_PIXEL) begin
      for (int i = 3; i >= 0; i--) begin cfg_din = sel[i]; @(negedge cfg_clk); end
      for (int p = NPIX - 1; p >= 0; p--) begin cfg_din = pixbits[p]; @(negedge cfg_clk); end
    end else begin
      for (int i = GCFG_W - 1; i >= 0; i--) begin cfg_din = g[i]; @(negedge cfg_clk); end
    end
    cfg_load = 0; cfg_din = 0;
    repeat (2 + nextra) @(negedge cfg_clk);
  endtask

  logic nobits [NPIX];
  task automatic write_global(input gcfg_t g);
    cfg_frame(CMD_WR_GLOBAL, 0, 4'd0, GCFG_W'(g), nobits);
  endtask
  task automatic write_plane(input int latch, input int pix);
    logic b [NPIX];
    foreach (b[i]) b[i] = (i == pix);
    cfg_frame(CMD_WR_PIXEL, 0, 4'(latch), '0, b);
  endtask

  // ---------------- reference model --------------------------------------
  gcfg_t g;
  int gm, gs, gh;                      // masked, selected, hit-bus pixels
  int exp_ev_hits [$];                 // flattened expected hits, in trigger order
  int exp_ev_n [$], exp_ev_bc [$], exp_ev_fl [$];
  int n_trig_acc = 0;

  function automatic int tot_of(int q);
    int w;
    w = (q * 12) / (500 * 12);
    if (w < 1) w = 1;
    if (w > 255) w = 255;
    return w;
  endfunction
  function automatic int payload(int pix, int tot);
    int cp, r, cb;
    cp = pix / (2 * NR); r = (pix % (2 * NR)) / 2; cb = pix % 2;
    return ((2 * cp + cb) << 16) | (r << 8) | tot;
  endfunction

  int next_tr = 0;
  // Deposit charges (pix[i], q[i]) now, send triggers at the given offsets
  // from c0 + latency; record the expected events.
  task automatic round(input int pix [$], input int qs [$], input int troff [$],
                       input bit use_strobe, input int skip_cp);
    int c0;
    int evh [$];
    @(negedge clk);
    foreach (pix[i]) sensor_q[pix[i] / NR / 2 * 2 + pix[i] % 2][(pix[i] % (2 * NR)) / 2] = 16'(qs[i]);
    if (use_strobe) strobe = 1;
    c0 = cyc + 1;
    @(negedge clk);
    foreach (pix[i]) sensor_q[pix[i] / NR / 2 * 2 + pix[i] % 2][(pix[i] % (2 * NR)) / 2] = 0;
    strobe = 0;
    foreach (troff[k]) begin
      int t;
      t = c0 + LAT + troff[k];
      while (cyc != t) @(negedge clk);
      l1_trig = 1; @(negedge clk); l1_trig = 0;
      evh.delete();
      foreach (pix[i]) begin
        int tt;
        tt = tot_of(qs[i]);
        if (pix[i] == gm || pix[i] / (2 * NR) == skip_cp) continue;
        if (g.en_tot_filter && tt < g.tot_min) continue;
        if (troff[k] == 0) evh.push_back(payload(pix[i], tt));
        if (troff[k] == -1 && g.en_timewalk && tt < g.tw_thr) evh.push_back(payload(pix[i], tt));
      end
      if (use_strobe && troff[k] == 0) evh.push_back(payload(gs, tot_of(int'(g.vcal) * 25)));
      evh.sort();
      exp_ev_n.push_back(evh.size());
      foreach (evh[i]) exp_ev_hits.push_back(evh[i]);
      exp_ev_bc.push_back(t & 255);
      exp_ev_fl.push_back(0);
      n_trig_acc++;
    end
    repeat (300) @(negedge clk);
  endtask

  // Compare decoded events with the expected ones, in order.
  int ev_pos = 0, hw_pos = 0, ex_pos = 0, exh_pos = 0;
  task automatic compare_events();
    while (ex_pos < exp_ev_n.size()) begin
      int got [$];
      int want [$];
      if (ev_pos >= ev_n.size()) begin chk(0, "missing event"); ex_pos++; continue; end
      for (int i = 0; i < ev_n[ev_pos]; i++) got.push_back(hitw[hw_pos + i]);
      for (int i = 0; i < exp_ev_n[ex_pos]; i++) want.push_back(exp_ev_hits[exh_pos + i]);
      got.sort();
      chk(got == want, $sformatf("event %0d hits: got %0d want %0d", ex_pos, got.size(), want.size()));
      chk(ev_l1[ev_pos] == (ex_pos % 16), "event L1 number");
      chk(ev_bc[ev_pos] == exp_ev_bc[ex_pos], "event BCID");
      chk(ev_fl[ev_pos] == exp_ev_fl[ex_pos], "event flags");
      hw_pos += ev_n[ev_pos]; exh_pos += exp_ev_n[ex_pos];
      ev_pos++; ex_pos++;
    end
    chk(ev_pos == ev_n.size(), "no extra events");
  endtask

  int n_mask_seen = 0, n_inj_seen = 0;

  initial begin
    int pix [$];
    int qs [$];
    int tro [$];
    int hb_before, del_before, ovf_t;
    foreach (sensor_q[i, j]) sensor_q[i][j] = 0;
    foreach (nobits[i]) nobits[i] = 0;
    repeat (4) @(negedge cfg_clk);     // both clock domains see the reset
    rst_n = 1;

    // ---- configuration ----
    chk(vcal_dac == 10'd0 && bias_dac[3] == 8'd128, "reset DAC codes");
    g = GCFG_RESET;
    g.en_timewalk = 1; g.tw_thr = 8'd14;
    g.en_tot_filter = 1; g.tot_min = 8'd10;
    g.vcal = 10'd400;                  // 10 000 e
    g.bias_dac[3] = 8'd77;
    write_global(g);
    chk(vcal_dac == 10'd400 && bias_dac[3] == 8'd77, "global write reaches DAC codes");
    begin
      logic [GCFG_W-1:0] rb;
      @(negedge cfg_clk);
      cfg_load = 1;
      for (int i = 7; i >= 0; i--) begin cfg_din = (i >= 4) ? chip_addr[i-4] : CMD_RD_GLOBAL[i]; @(negedge cfg_clk); end
      cfg_din = 0;
      for (int i = 0; i < GCFG_W; i++) begin @(negedge cfg_clk); rb = {rb[GCFG_W-2:0], cfg_dout}; end
      cfg_load = 0;
      repeat (2) @(negedge cfg_clk);
      chk(rb == GCFG_W'(g), "global read-back");
    end
    gm = 1 * 320 + 50 * 2 + 1;         // column 3, row 50
    gs = 4 * 320 + 77 * 2 + 0;         // column 8, row 77
    gh = 6 * 320 + 10 * 2 + 1;         // column 13, row 10
    write_plane(10, gm);               // MASK
    write_plane(12, gs);               // Select
    write_plane(11, gh);               // EnHitBus
    $display("configured at cycle %0d", cyc);

    // ---- triggered events with random hits ----
    for (int r = 0; r < 12; r++) begin
      pix.delete(); qs.delete(); tro.delete();
      for (int i = 0; i < 8; i++) begin
        int p;
        p = int'($urandom_range(0, 8 * 320 - 1));   // column pair 8 is kept for later
        if (p == gs || p == gh) continue;
        if (pix.size() != 0 && p inside {pix}) continue;
        pix.push_back(p);
        case (i % 4)
          0: qs.push_back(int'($urandom_range(4100, 4999)));    // filtered
          1: qs.push_back(int'($urandom_range(5000, 6999)));    // timewalk copy
          default: qs.push_back(int'($urandom_range(7000, 60000)));
        endcase
      end
      if (r == 3) pix.push_back(gm);
      if (r == 3) qs.push_back(20000);
      if (r % 3 != 2) begin tro.push_back(-1); tro.push_back(0); end
      else if (r == 5) tro.push_back(0);
      round(pix, qs, tro, r == 4, -1);
    end
    // hit bus: only the enabled pixel drives it
    hb_before = n_hitbus;
    pix.delete(); qs.delete(); tro.delete();
    pix.push_back(gh - 2); qs.push_back(20000);
    round(pix, qs, tro, 0, -1);
    chk(n_hitbus == hb_before, "hit bus quiet for other pixels");
    pix.delete(); qs.delete();
    pix.push_back(gh); qs.push_back(20000);
    round(pix, qs, tro, 0, -1);
    chk(n_hitbus - hb_before == 40, "hit bus high for the pulse of the enabled pixel");

    // ---- 5 MHz transfers, column pair 8 disabled ----
    g.ceu_speed = 2'd0; g.col_enable[8] = 1'b0;
    write_global(g);
    pix.delete(); qs.delete(); tro.delete();
    // 8 hits of ToT 40 at 8 clocks each all reach the buffers within the latency
    for (int i = 0; i < 8; i++) begin
      pix.push_back(3 * 320 + 300 - 2 * i); qs.push_back(20000);
    end
    pix.push_back(8 * 320 + 5); qs.push_back(30000);
    tro.push_back(0);
    round(pix, qs, tro, 0, 8);
    repeat (400) @(negedge clk);
    compare_events();

    // ---- buffer overflow: every pixel of column pair 2 at once ----
    g.ceu_speed = 2'd2;
    write_global(g);
    del_before = n_del;
    @(negedge clk);
    for (int i = 0; i < 320; i++) sensor_q[4 + i % 2][i / 2] = 16'd20000;
    @(negedge clk);
    for (int i = 0; i < 320; i++) sensor_q[4 + i % 2][i / 2] = 0;
    repeat (1000) @(negedge clk);
    chk(n_ovf > 0, "buffer overflow occurred");
    chk(n_del - del_before >= 64, "untriggered hits deleted");
    // the next trigger carries the overflow flag
    l1_trig = 1; ovf_t = cyc; @(negedge clk); l1_trig = 0;
    exp_ev_n.push_back(0); exp_ev_bc.push_back(ovf_t & 255); exp_ev_fl.push_back(1);
    n_trig_acc++;
    repeat (100) @(negedge clk);
    compare_events();

    // ---- trigger FIFO full: a burst of 24 triggers ----
    begin
      int first, nburst, t0;
      first = ev_n.size();
      t0 = cyc + 1;
      l1_trig = 1; repeat (24) @(negedge clk); l1_trig = 0;
      repeat (20) @(negedge clk);
      l1_trig = 1; ovf_t = cyc; @(negedge clk); l1_trig = 0;
      repeat (1200) @(negedge clk);
      nburst = ev_n.size() - first - 1;
      chk(nburst >= 16 && nburst < 24, $sformatf("burst accepted %0d of 24", nburst));
      for (int i = first; i < ev_n.size(); i++) begin
        chk(ev_n[i] == 0, "burst events empty");
        chk(ev_l1[i] == (n_trig_acc + i - first) % 16, "burst L1 numbers consecutive");
        if (i > first && i < ev_n.size() - 1) chk(ev_bc[i] > ev_bc[i-1] || ev_bc[i] < 20, "burst BCIDs ordered");
      end
      chk(ev_bc[ev_n.size() - 1] == (ovf_t & 255), "trigger after burst recorded");
      chk(ev_fl[ev_n.size() - 1] == 2, "lost-trigger flag after FIFO full");
    end

    // ---- mechanism coverage ----
    foreach (hitw[i]) begin
      if (hitw[i] >> 8 == payload(gm, 0) >> 8) n_mask_seen++;
      if (hitw[i] >> 8 == payload(gs, 0) >> 8) n_inj_seen++;
    end
    $display("events=%0d hits=%0d deleted=%0d dup=%0d filtered=%0d overflow=%0d hitbus=%0d inj=%0d",
             ev_n.size(), hitw.size(), n_del, n_dup, n_filt, n_ovf, n_hitbus, n_inj_seen);
    chk(hitw.size() > 0, "triggered hits read out");
    chk(n_del > 0, "hits deleted");
    chk(n_dup > 0, "timewalk duplicates");
    chk(n_filt > 0, "ToT filter drops");
    chk(n_mask_seen == 0, "masked pixel silent");
    chk(n_slow >= 7, "5 MHz transfers spaced by 8 clocks");
    chk(dut.hit_avail[8], "disabled column pair keeps its hit");
    chk(n_inj_seen == 1, "strobe injection read out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
