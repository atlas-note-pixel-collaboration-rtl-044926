// tb_pixel_analog: checks the discriminator model: no pulse below threshold,
// pulse width q*12/(500*(8+FDAC)) clocks above it (40 clocks for 20 000 e at
// FDAC 4), threshold moving with TDAC and GTDAC, Shutdown, and test injection
// with Select on a rising strobe.
module tb_pixel_analog;
  logic clk = 0, rst_n = 0;
  logic [15:0] q = 0;
  logic strobe = 0, select = 0, shutdown = 0, disc;
  logic [6:0] tdac = 64;
  logic [2:0] fdac = 4;
  logic [4:0] gtdac = 16;
  logic [9:0] vcal = 0;
  int checks = 0, failures = 0;

  pixel_analog dut (.clk, .rst_n, .q_sensor(q), .strobe, .select, .shutdown, .tdac, .fdac,
                    .gtdac, .vcal, .disc);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Deposit q0 for one clock, then measure the pulse width.
  task automatic pulse(input int q0, input logic use_strobe, output int width);
    @(negedge clk);
    if (use_strobe) strobe = 1; else q = 16'(q0);
    @(negedge clk);
    q = 0; strobe = 0;
    width = 0;
    repeat (300) begin
      if (disc) width++;
      @(negedge clk);
    end
  endtask

  function automatic int expw(int qq, int f);
    int w;
    w = (qq * 12) / (500 * (8 + f));
    if (w < 1) w = 1;
    if (w > 255) w = 255;
    return w;
  endfunction

  initial begin
    int w;
    #12 rst_n = 1;
    pulse(20000, 0, w); checks++; if (w != 40) begin failures++; $display("w=%0d", w); end
    pulse(3900, 0, w);  checks++; if (w != 0) failures++;
    pulse(4100, 0, w);  checks++; if (w != expw(4100, 4)) failures++;
    for (int k = 0; k < 20; k++) begin
      int qq, f;
      qq = 4001 + int'($urandom_range(0, 60000));
      f = int'($urandom_range(0, 7));
      fdac = 3'(f);
      pulse(qq, 0, w);
      checks++; if (w != expw(qq, f)) begin failures++; $display("q=%0d f=%0d w=%0d", qq, f, w); end
    end
    fdac = 4;
    tdac = 0; gtdac = 0;             // threshold 160 e
    pulse(500, 0, w); checks++; if (w != 1) failures++;
    tdac = 127; gtdac = 31;          // threshold 7720 e
    pulse(7000, 0, w); checks++; if (w != 0) failures++;
    pulse(8000, 0, w); checks++; if (w != expw(8000, 4)) failures++;
    tdac = 64; gtdac = 16;
    shutdown = 1;
    pulse(20000, 0, w); checks++; if (w != 0) failures++;
    shutdown = 0;
    vcal = 400;                      // 10 000 e
    pulse(0, 1, w); checks++; if (w != 0) failures++;   // not selected
    select = 1;
    pulse(0, 1, w); checks++; if (w != expw(10000, 4)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
