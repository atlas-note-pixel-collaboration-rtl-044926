// tb_column_pair: a column pair of 6 rows. Hits are deposited in several cells
// at once; the readout bus must present them top row first (left before right
// in a row), with correct row, column and ToT, one per read pulse. A mask bit
// loaded through the pixel register chain must suppress one cell, and the hit
// bus must follow the discriminator of a cell with EnHitBus.
module tb_column_pair;
  import fei3_pkg::*;
  localparam int R = 6;
  localparam int NP = 2 * R;
  logic clk = 0, cfg_clk = 0, rst_n = 0;
  logic sdi = 0, shift_en = 0, latch_stb = 0, sdo, strobe = 0, read = 0, hit_avail, hitbus;
  logic [3:0] latch_sel = 0;
  logic [15:0] q0 [R];
  logic [15:0] q1 [R];
  logic [7:0] ts = 0;
  col_hit_t bus;
  int checks = 0, failures = 0;

  column_pair #(.N_ROWS(R)) dut (.clk, .rst_n, .cfg_clk, .sdi, .shift_en, .latch_sel, .latch_stb,
    .sdo, .q_col0(q0), .q_col1(q1), .strobe, .gtdac(5'd16), .vcal(10'd0), .ts_gray(bin2gray(ts)),
    .read, .hit_avail, .bus, .hitbus);

  always #5 clk = ~clk;
  always #20 cfg_clk = ~cfg_clk;
  always @(posedge clk) ts <= ts + 1;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // load latch `sel` of every cell: bit for cell p is v[p]
  task automatic load_plane(input int sel, input logic [NP-1:0] v);
    @(negedge cfg_clk);
    for (int k = NP - 1; k >= 0; k--) begin   // last cell's bit goes first
      sdi = v[k]; shift_en = 1; @(negedge cfg_clk);
    end
    shift_en = 0; latch_sel = 4'(sel); latch_stb = 1; @(negedge cfg_clk); latch_stb = 0;
  endtask

  // deposit charges; expect readout in descending p, skipping masked cells
  task automatic run(input logic [NP-1:0] hitmask, input logic [NP-1:0] masked);
    int qq [NP];
    int n;
    for (int r = 0; r < R; r++) begin q0[r] = 0; q1[r] = 0; end
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      qq[p] = 5000 + 500 * int'($urandom_range(0, 80));
      if (hitmask[p]) begin
        if (p % 2 == 0) q0[p/2] = 16'(qq[p]); else q1[p/2] = 16'(qq[p]);
      end
    end
    @(negedge clk);
    for (int r = 0; r < R; r++) begin q0[r] = 0; q1[r] = 0; end
    repeat (120) @(negedge clk);     // all pulses over
    n = 0;
    for (int p = NP - 1; p >= 0; p--) begin
      if (hitmask[p] && !masked[p]) begin
        int w;
        w = (qq[p] * 12) / (500 * 12);
        checks++;
        if (!hit_avail || bus.row != 8'(p / 2) || bus.col != 1'(p % 2) ||
            8'(gray2bin(bus.te_gray) - gray2bin(bus.le_gray)) != 8'(w)) begin
          failures++;
          $display("p=%0d avail=%0d row=%0d col=%0d", p, hit_avail, bus.row, bus.col);
        end
        read = 1; @(negedge clk); read = 0;
        n++;
      end
    end
    checks++; if (hit_avail) failures++;
  endtask

  initial begin
    for (int r = 0; r < R; r++) begin q0[r] = 0; q1[r] = 0; end
    #22 rst_n = 1;
    for (int k = 0; k < 8; k++) run(NP'($urandom), '0);
    run('1, '0);
    // mask cell 7 (row 3, right column) through the chain, MASK is latch 10
    load_plane(10, NP'(1) << 7);
    checks++; if (sdo !== 1'b0) failures++;
    run('1, NP'(1) << 7);
    // EnHitBus (latch 11) on cell 2 only
    load_plane(11, NP'(1) << 2);
    @(negedge clk); q0[1] = 16'd20000; @(negedge clk); q0[1] = 0; @(negedge clk);
    checks++; if (!hitbus) failures++;
    @(negedge clk); q0[2] = 16'd20000; @(negedge clk); q0[2] = 0;
    repeat (60) @(negedge clk);
    checks++; if (hitbus) failures++;
    while (hit_avail) begin read = 1; @(negedge clk); read = 0; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
