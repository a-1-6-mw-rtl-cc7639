// tb_periodic_pixel: the periodic-background workload. One column processor
// watches a pixel whose level swings like swaying vegetation,
// P = 125 + 100*sin(2*pi*f/32), for 200 frames, with delta_open = 12,
// delta_close = 1 (quarter LSB) and delta_hot = 8. Frame 0 initialises the
// thresholds to P. Each frame is a full 256-cycle conversion through the
// ramp comparator. The testbench checks every frame's thresholds and hot bit
// against the update and detection rules, and checks that the thresholds
// open up to the oscillation so that the pixel is hot in the first periods
// and no longer hot at the end (the swing has become background).
module tb_periodic_pixel;
  localparam int FRAMES = 200, PERIOD = 32, DOPEN = 12, DCLOSE = 1, DHOT = 8;
  logic       clk = 0, rst_n = 0;
  logic       bg_init = 0, ld_min = 0, ld_max = 0, ramp_start = 0, ramp_active = 0, update = 0;
  logic [9:0] ld_data = 0, imin, imax;
  logic [7:0] code = 8'hFF, pix_code = 0;
  logic       comp = 0, hot, open_min, open_max;
  int checks = 0, failures = 0;

  column_processor #(.CW(8), .TW(10)) dut (
    .clk, .rst_n, .delta_open(8'(DOPEN)), .delta_close(8'(DCLOSE)), .delta_hot(8'(DHOT)),
    .bg_init, .ld_min, .ld_max, .ld_data, .ramp_start, .ramp_active, .code, .comp,
    .pix_code, .update, .imin, .imax, .hot, .open_min, .open_max);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mn, mx, p, lo, hi, hot_first = 0, hot_last = 0, last_hot_frame = -1;
    bit e_hot;
    real ang;
    mn = 0; mx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      ang = 6.283185307 * f / PERIOD;
      p = int'(125.0 + 100.0 * $sin(ang));
      // thresholds come back from the frame buffer
      ld_data = 10'(mn); ld_min = 1; @(posedge clk); #1; ld_min = 0;
      ld_data = 10'(mx); ld_max = 1; @(posedge clk); #1; ld_max = 0;
      ramp_start = 1; @(posedge clk); #1; ramp_start = 0;
      ramp_active = 1;
      for (int c = 255; c >= 0; c--) begin
        code = 8'(c); comp = (c <= p);
        @(posedge clk); #1;
      end
      ramp_active = 0; comp = 0;
      pix_code = 8'(p); bg_init = (f == 0);
      update = 1; @(posedge clk); #1; update = 0; bg_init = 0;
      lo = mn >> 2; hi = mx >> 2;
      if (f == 0) begin
        e_hot = 0; mn = 4 * p; mx = 4 * p;
      end else begin
        e_hot = ((lo - p) > DHOT) || ((p - hi) > DHOT);
        mn = (lo > p) ? mn - DOPEN : mn + DCLOSE;
        mx = (p > hi) ? mx + DOPEN : mx - DCLOSE;
        mn = (mn < 0) ? 0 : (mn > 1023) ? 1023 : mn;
        mx = (mx < 0) ? 0 : (mx > 1023) ? 1023 : mx;
      end
      check(hot == e_hot, $sformatf("frame %0d hot", f));
      check(imin == 10'(mn) && imax == 10'(mx), $sformatf("frame %0d thresholds", f));
      if (e_hot) last_hot_frame = f;
      if (f < 2 * PERIOD) hot_first += int'(e_hot);
      if (f >= FRAMES - 2 * PERIOD) hot_last += int'(e_hot);
    end
    $display("hot frames: first two periods %0d, last two periods %0d, last hot frame %0d",
             hot_first, hot_last, last_hot_frame);
    check(hot_first > 0, "pixel hot while the background is learnt");
    check(hot_last == 0, "oscillation absorbed into the background");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
