// tb_processor_bank: a reduced bank of 8 processors converts rows of random
// pixels against random reference rows. Each processor gets its own
// comparator (comp[k] = code <= P[k]) and its own SRAM word; the testbench
// checks every processor's new I_MIN, I_MAX and hot bit against the
// detection and update rules, which also checks the word slicing of the row
// buses.
module tb_processor_bank;
  localparam int N = 8;
  logic           clk = 0, rst_n = 0;
  logic [7:0]     delta_open = 8'd12, delta_close = 8'd2, delta_hot = 8'd6;
  logic           bg_init = 0, ld_min = 0, ld_max = 0, ramp_start = 0, ramp_active = 0;
  logic           update = 0;
  logic [N*10-1:0] ld_row = 0, imin_row, imax_row;
  logic [7:0]     code = 8'hFF;
  logic [N-1:0]   comp = 0, hot_row;
  logic [N*8-1:0] pix_codes = 0;
  int checks = 0, failures = 0;

  processor_bank #(.N_PROC(N), .CW(8), .TW(10)) dut (
    .clk, .rst_n, .delta_open, .delta_close, .delta_hot, .bg_init, .ld_min, .ld_max,
    .ld_row, .ramp_start, .ramp_active, .code, .comp, .pix_codes, .update,
    .imin_row, .imax_row, .hot_row);

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

  initial begin
    int mn[N], mx[N], p[N], e_min, e_max, lo, hi, n_hot;
    bit e_hot;
    n_hot = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      for (int k = 0; k < N; k++) begin
        p[k]  = int'($urandom_range(0, 255));
        mn[k] = int'($urandom_range(0, 1023));
        mx[k] = int'($urandom_range(0, 1023));
      end
      for (int k = 0; k < N; k++) ld_row[k*10 +: 10] = 10'(mn[k]);
      ld_min = 1; @(posedge clk); #1; ld_min = 0;
      for (int k = 0; k < N; k++) ld_row[k*10 +: 10] = 10'(mx[k]);
      ld_max = 1; @(posedge clk); #1; ld_max = 0;
      ramp_start = 1; @(posedge clk); #1; ramp_start = 0;
      ramp_active = 1;
      for (int c = 255; c >= 0; c--) begin
        code = 8'(c);
        for (int k = 0; k < N; k++) comp[k] = (c <= p[k]);
        @(posedge clk); #1;
      end
      ramp_active = 0; comp = '0;
      update = 1; @(posedge clk); #1; update = 0;
      for (int k = 0; k < N; k++) begin
        lo = mn[k] >> 2; hi = mx[k] >> 2;
        e_hot = ((lo - p[k]) > int'(delta_hot)) || ((p[k] - hi) > int'(delta_hot));
        e_min = (lo > p[k]) ? mn[k] - int'(delta_open) : mn[k] + int'(delta_close);
        e_max = (p[k] > hi) ? mx[k] + int'(delta_open) : mx[k] - int'(delta_close);
        e_min = (e_min < 0) ? 0 : (e_min > 1023) ? 1023 : e_min;
        e_max = (e_max < 0) ? 0 : (e_max > 1023) ? 1023 : e_max;
        n_hot += int'(e_hot);
        check(hot_row[k] == e_hot, $sformatf("row %0d proc %0d hot", r, k));
        check(imin_row[k*10 +: 10] == 10'(e_min), $sformatf("row %0d proc %0d imin", r, k));
        check(imax_row[k*10 +: 10] == 10'(e_max), $sformatf("row %0d proc %0d imax", r, k));
      end
    end
    check(n_hot > 0, "hot pixels occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
