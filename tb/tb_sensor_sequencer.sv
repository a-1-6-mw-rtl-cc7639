// tb_sensor_sequencer: runs the row sequencer at its full size (240 rows,
// 1111-clock rows) for two frames, with stand-ins for the ramp counter
// (done 256 clocks after start) and the column readout (done 320 clocks
// after start). Checked per row: the row period and the frame period
// (15 frames/s at 4 MHz), N pulses on S in each sampling phase with Phl and
// the pixel reset in the second one, the shutter reset row, a 256-clock
// ramp with LEN, a 24-clock update phase, SRAM loads and stores of I_MIN
// (word q) and I_MAX (word 120+q) on even rows only, the hot-row handoff with
// its first/last flags, and the bg_init frame flag.
module tb_sensor_sequencer;
  localparam int NR = 240, RC = 1111, UPD = 24, NS = 3, EXP = 10;
  logic       clk = 0, rst_n = 0, enable = 0, bg_init = 1;
  logic       ramp_done, readout_done;
  logic [7:0] rd_row, sh_row;
  logic       row_sel, pix_rst, sh_rst, amp_res, s, phl, pre_n, len, ramp_start;
  logic       proc_row, init_frame, ld_min, ld_max, proc_update;
  logic       sram_en, sram_we, sram_wr_max;
  logic [7:0] sram_addr;
  logic       hot_valid, hot_first, hot_last, readout_start, frame_start, frame_done;
  int         rc = 0, oc = 0;
  int checks = 0, failures = 0;

  sensor_sequencer dut (
    .clk, .rst_n, .enable, .n_samples(3'(NS)), .exposure_rows(8'(EXP)), .bg_init,
    .ramp_done, .readout_done, .rd_row, .row_sel, .pix_rst, .sh_row, .sh_rst,
    .amp_res, .s, .phl, .pre_n, .len, .ramp_start, .proc_row, .init_frame,
    .ld_min, .ld_max, .proc_update, .sram_en, .sram_we, .sram_wr_max, .sram_addr,
    .hot_valid, .hot_first, .hot_last, .readout_start, .frame_start, .frame_done);

  always #5 clk = ~clk;

  // Stand-ins for the ramp counter and the column readout.
  always @(posedge clk) begin
    if (ramp_start) rc <= 256; else if (rc > 0) rc <= rc - 1;
    if (readout_start) oc <= 320; else if (oc > 0) oc <= oc - 1;
  end
  assign ramp_done    = (rc == 1);
  assign readout_done = (oc == 1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-row monitor.
  longint cyc = 0, row_t0 = -1, frame_t0 = -1, ramp_end = 0;
  int s_sig, s_rst, len_n, ld_n, st_n, hot_n, frames = 0, rows = 0, upd_n = 0;
  logic s_d = 0;
  logic [7:0] cur_row = 0;
  bit init_exp = 1;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (amp_res) begin
      // close the previous row
      if (row_t0 >= 0) begin
        check(cyc - row_t0 == RC, $sformatf("row period %0d", cyc - row_t0));
        check(s_sig == NS && s_rst == NS, $sformatf("S pulses %0d/%0d", s_sig, s_rst));
        check(len_n == 256, $sformatf("LEN cycles %0d", len_n));
        check(ld_n == ((cur_row % 2 == 0) ? 2 : 0), "SRAM loads");
        check(st_n == ((cur_row % 2 == 0) ? 2 : 0), "SRAM stores");
        check(hot_n == ((cur_row % 2 == 0) ? 1 : 0), "hot row handoff");
        rows++;
      end
      row_t0 = cyc; s_sig = 0; s_rst = 0; len_n = 0; ld_n = 0; st_n = 0; hot_n = 0;
      cur_row = rd_row;
      check(sh_rst && sh_row == 8'((rd_row + EXP) % NR), "shutter reset row");
    end
    if (frame_start) begin
      if (frame_t0 >= 0) check(cyc - frame_t0 == NR * RC, $sformatf("frame period %0d", cyc - frame_t0));
      frame_t0 = cyc;
    end
    if (frame_start) init_exp = (frames == 0);  // bg_init is dropped after frame 0 starts
    if (s && !s_d && row_sel) begin
      if (phl) s_rst++; else s_sig++;
    end
    if (row_sel && phl) check(pix_rst, "pixel reset during reset sampling");
    if (!row_sel) check(!pix_rst, "pixel reset only with row select");
    if (len) begin
      len_n++;
      check(!pre_n && s, "ramp switches");
    end
    if (ramp_done) ramp_end = cyc;
    if (readout_start) check(cyc - ramp_end - 1 == UPD, $sformatf("update phase %0d", cyc - ramp_end - 1));
    if (sram_en && !sram_we) begin
      ld_n++;
      check(sram_addr == 8'(sram_wr_max ? cur_row / 2 + NR / 2 : cur_row / 2), "load address");
    end
    if (ld_min || ld_max) check(proc_row, "loads on processed rows");
    if (sram_en && sram_we) begin
      st_n++;
      check(sram_addr == 8'(sram_wr_max ? cur_row / 2 + NR / 2 : cur_row / 2), "store address");
    end
    if (proc_update) begin
      upd_n++;
      check(init_frame == init_exp, "bg_init frame flag");
    end
    if (hot_valid) begin
      hot_n++;
      check(hot_first == (cur_row == 0) && hot_last == (cur_row == NR - 2), "hot row flags");
    end
    if (frame_done) frames++;
    s_d <= s;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    enable = 1;
    @(posedge frame_start);
    bg_init = 0;
    wait (frames == 2);
    enable = 0;
    repeat (10) @(posedge clk);
    check(rows >= 2 * NR - 1, $sformatf("%0d rows", rows));
    check(upd_n == NR, $sformatf("%0d updates", upd_n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
