// tb_column_processor: runs one column processor through many conversions
// with random thresholds, pixels and settings, plus the corner cases of the
// timing diagram (delta_hot = 4, pixel just above/below the thresholds,
// saturation at 0 and full scale). The expected results come straight from
// the update and detection rules, evaluated on the integer parts of the
// thresholds:
//   open_min = I_MIN > P,  open_max = P > I_MAX
//   hot = (I_MIN - P > delta_hot) or (P - I_MAX > delta_hot)
// and the saturating +/- delta steps, and from the initialisation rule
// (I_MIN = I_MAX = P, not hot) when bg_init is set. The ramp must last 256
// cycles and the results must be ready one cycle after the update strobe.
module tb_column_processor;
  logic       clk = 0, rst_n = 0;
  logic [7:0] delta_open, delta_close, delta_hot;
  logic       bg_init = 0, ld_min = 0, ld_max = 0, ramp_start = 0, ramp_active = 0;
  logic [9:0] ld_data = 0;
  logic [7:0] code = 8'hFF, pix_code = 0;
  logic       comp = 0, update = 0;
  logic [9:0] imin, imax;
  logic       hot, open_min, open_max;
  int checks = 0, failures = 0;
  int n_hot = 0, n_open_min = 0, n_open_max = 0, n_sat = 0;

  column_processor #(.CW(8), .TW(10)) dut (
    .clk, .rst_n, .delta_open, .delta_close, .delta_hot, .bg_init, .ld_min, .ld_max,
    .ld_data, .ramp_start, .ramp_active, .code, .comp, .pix_code, .update,
    .imin, .imax, .hot, .open_min, .open_max);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(input int mn, input int mx, input int p, input bit init);
    int e_min, e_max, lo, hi, cyc;
    bit e_omin, e_omax, e_hot;
    ld_data = 10'(mn); ld_min = 1; @(posedge clk); #1; ld_min = 0;
    ld_data = 10'(mx); ld_max = 1; @(posedge clk); #1; ld_max = 0;
    ramp_start = 1; @(posedge clk); #1; ramp_start = 0;
    ramp_active = 1; cyc = 0;
    for (int c = 255; c >= 0; c--) begin
      code = 8'(c); comp = (c <= p);
      @(posedge clk); #1; cyc++;
    end
    ramp_active = 0; comp = 0; code = 8'hFF;
    pix_code = 8'(p); bg_init = init;
    update = 1; @(posedge clk); #1; update = 0;
    check(cyc == 256, "ramp of 256 cycles");
    lo = mn >> 2; hi = mx >> 2;
    e_omin = lo > p;
    e_omax = p > hi;
    e_hot  = ((lo - p) > int'(delta_hot)) || ((p - hi) > int'(delta_hot));
    e_min  = e_omin ? mn - int'(delta_open) : mn + int'(delta_close);
    e_max  = e_omax ? mx + int'(delta_open) : mx - int'(delta_close);
    if (e_min < 0 || e_min > 1023 || e_max < 0 || e_max > 1023) n_sat++;
    e_min = (e_min < 0) ? 0 : (e_min > 1023) ? 1023 : e_min;
    e_max = (e_max < 0) ? 0 : (e_max > 1023) ? 1023 : e_max;
    if (init) begin
      e_min = p * 4; e_max = p * 4; e_hot = 0;
    end
    check(open_min == e_omin, $sformatf("open_min min=%0d p=%0d", mn, p));
    check(open_max == e_omax, $sformatf("open_max max=%0d p=%0d", mx, p));
    check(hot == e_hot, $sformatf("hot min=%0d max=%0d p=%0d dh=%0d got %0d", mn, mx, p, delta_hot, hot));
    check(imin == 10'(e_min), $sformatf("imin %0d expected %0d", imin, e_min));
    check(imax == 10'(e_max), $sformatf("imax %0d expected %0d", imax, e_max));
    if (!init) begin
      n_hot += int'(e_hot); n_open_min += int'(e_omin); n_open_max += int'(e_omax);
    end
    bg_init = 0;
  endtask

  initial begin
    int mn, mx;
    delta_open = 8'd16; delta_close = 8'd1; delta_hot = 8'd4;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Timing-diagram case: pixel above I_MAX, margins around delta_hot = 4.
    for (int d = 0; d < 8; d++) convert(100 * 4, 120 * 4, 120 + d, 0);
    for (int d = 0; d < 8; d++) convert((100 + d) * 4 + 3, 130 * 4, 100, 0);
    // Inverted band (I_MIN above I_MAX) keeps the two windows apart.
    convert(150 * 4, 140 * 4, 145, 0);
    convert(160 * 4, 140 * 4, 150, 0);
    // Saturation and extreme codes.
    convert(3, 1022, 0, 0);
    convert(1020, 1021, 255, 0);
    convert(0, 1023, 128, 0);
    // Initialisation.
    convert(0, 0, 77, 1);
    for (int n = 0; n < 400; n++) begin
      delta_open  = 8'($urandom_range(0, 255));
      delta_close = 8'($urandom_range(0, 255));
      delta_hot   = 8'($urandom_range(0, 40));
      mn = int'($urandom_range(0, 1023));
      mx = int'($urandom_range(0, 1023));
      convert(mn, mx, int'($urandom_range(0, 255)), ($urandom_range(0, 19) == 0));
    end
    check(n_hot > 0 && n_open_min > 0 && n_open_max > 0 && n_sat > 0, "all cases exercised");
    $display("hot=%0d open_min=%0d open_max=%0d saturated=%0d", n_hot, n_open_min, n_open_max, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
