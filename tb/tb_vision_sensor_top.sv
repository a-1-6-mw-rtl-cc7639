// tb_vision_sensor_top: end-to-end test of the vision sensor at reduced size (32x16 pixels, 400-clock rows, 80 frames).
//
// A synthetic scene drives the behavioural column front end: a static
// gradient background, a "swaying" patch whose level oscillates between 70
// and 130 with a 20-frame period (like vegetation or water), and a bright
// 8x6-pixel object that moves right by four columns per frame. Frame 0 is an
// initialisation frame (bg_init). For every frame the testbench recomputes,
// independently of the RTL, the reference images, the hot-pixel bitmap of
// the sub-sampled grid (column 2k, row 2q) and its 3x3 erosion, and compares
// them with the bitmap rows the sensor emits; every gray-scale pixel of the
// stream is compared with the scene. It also checks the frame period, the N
// pulses on S, the shutter reset, and it counts the mechanisms: opening of
// I_MIN and I_MAX, closing, hot pixels, pixels removed by erosion, the
// initialisation frame and a switch of the erosion kernel to pass-through
// mid-run. Over a long run the swaying patch must be absorbed into the
// background (fewer hot pixels in the last frames than in the first ones).
module tb_vision_sensor_top;
  import vs_pkg::*;
  localparam int NC = 32, NR = 16, RC = 400, FRAMES = 80;
  localparam int NP = NC / 2, QR = NR / 2;
  localparam int RW = $clog2(NR), XW = $clog2(NC), QW = $clog2(QR);
  localparam int NS = 2, EXPO = 5, DOPEN = 12, DCLOSE = 1, DHOT = 4;

  logic          clk = 0, rst_n = 0, enable = 0;
  cfg_t          cfg;
  logic [NC-1:0] col_comp;
  logic [7:0]    ramp_code;
  logic [RW-1:0] rd_row, sh_row, pix_y;
  logic          row_sel, pix_rst, sh_rst, amp_res, s, phl, pre_n, len;
  logic          pix_valid, bm_valid, bm_last, frame_start, frame_done;
  logic [XW-1:0] pix_x;
  logic [7:0]    pix_data;
  logic [QW-1:0] bm_y;
  logic [NP-1:0] bm_row;
  logic [NC*8-1:0] vpix;

  int checks = 0, failures = 0;

  vision_sensor_top #(.N_COLS(NC), .N_ROWS(NR), .ROW_CYCLES(RC)) dut (
    .clk, .rst_n, .enable, .cfg, .col_comp, .ramp_code, .rd_row, .row_sel, .pix_rst,
    .sh_row, .sh_rst, .amp_res, .s, .phl, .pre_n, .len, .pix_valid, .pix_x, .pix_y,
    .pix_data, .bm_valid, .bm_last, .bm_y, .bm_row, .frame_start, .frame_done);

  column_afe_model #(.N_COLS(NC)) afe (.vpix, .ramp_code, .pre_n, .comp(col_comp));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(longint'(FRAMES + 2) * NR * RC * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- scene
  function automatic int scene(int f, int y, int x);
    int v, ph, ox;
    v = 60 + (3 * x + 5 * y) % 100;
    if (x < NC / 2 && y < NR / 2) begin
      ph = f % 20;
      v = 70 + 6 * ((ph < 10) ? ph : 20 - ph);
    end
    ox = (4 * f) % NC;
    if (y >= NR / 2 && y < NR / 2 + 6 && x >= ox && x < ox + 8) v = 240;
    return v;
  endfunction

  int fcur = -1;  // frame being read
  always_comb begin
    for (int x = 0; x < NC; x++) vpix[x*8 +: 8] = 8'(scene((fcur < 0) ? 0 : fcur, int'(rd_row), x));
  end

  // ------------------------------------------------------ reference model
  int          mn [QR][NP];
  int          mx [QR][NP];
  logic [NP-1:0] hot_exp [QR];
  logic [NP-1:0] ero_exp [QR];
  int n_open_min = 0, n_open_max = 0, n_close = 0, n_hot = 0, n_removed = 0;
  int n_init = 0, n_kernel_switch = 0, n_sh_rst = 0, n_gray = 0, n_bm = 0;
  int hot_sway_early = 0, hot_sway_late = 0;

  function automatic int sat(int v);
    return (v < 0) ? 0 : (v > 1023) ? 1023 : v;
  endfunction

  task automatic model_frame(int f, logic [8:0] kern);
    for (int q = 0; q < QR; q++)
      for (int k = 0; k < NP; k++) begin
        int p, lo, hi;
        bit om, ox;
        p = scene(f, 2 * q, 2 * k);
        if (f == 0) begin
          mn[q][k] = 4 * p; mx[q][k] = 4 * p; hot_exp[q][k] = 1'b0;
          n_init++;
        end else begin
          lo = mn[q][k] >> 2; hi = mx[q][k] >> 2;
          om = lo > p; ox = p > hi;
          hot_exp[q][k] = ((lo - p) > DHOT) || ((p - hi) > DHOT);
          mn[q][k] = sat(om ? mn[q][k] - DOPEN : mn[q][k] + DCLOSE);
          mx[q][k] = sat(ox ? mx[q][k] + DOPEN : mx[q][k] - DCLOSE);
          n_open_min += int'(om); n_open_max += int'(ox); n_close += int'(!om && !ox);
          n_hot += int'(hot_exp[q][k]);
          if (2 * k < NC / 2 && 2 * q < NR / 2) begin
            if (f >= 1 && f <= 20) hot_sway_early += int'(hot_exp[q][k]);
            if (f > FRAMES - 21)   hot_sway_late  += int'(hot_exp[q][k]);
          end
        end
      end
    for (int q = 0; q < QR; q++)
      for (int k = 0; k < NP; k++) begin
        logic v;
        v = 1'b1;
        for (int dy = 0; dy < 3; dy++)
          for (int dx = 0; dx < 3; dx++) begin
            int yy, xx;
            yy = q + dy - 1; xx = k + dx - 1;
            if (kern[3*dy+dx] && yy >= 0 && yy < QR && xx >= 0 && xx < NP)
              v = v & hot_exp[yy][xx];
          end
        ero_exp[q][k] = v;
        if (hot_exp[q][k] && !v) n_removed++;
      end
  endtask

  // ------------------------------------------------------------- monitors
  longint cyc = 0, frame_t0 = -1;
  int frames_done = 0, s_sig = 0, s_rst = 0;
  logic s_d = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (frame_start) begin
      if (frame_t0 >= 0) check(cyc - frame_t0 == longint'(NR) * RC, "frame period");
      frame_t0 = cyc;
      fcur = fcur + 1;
      model_frame(fcur, cfg.erode_kernel);
    end
    if (amp_res) begin
      if (fcur > 0 || rd_row != 0) check(s_sig == NS && s_rst == NS, "N pulses on S");
      s_sig = 0; s_rst = 0;
    end
    if (s && !s_d && row_sel) begin
      if (phl) s_rst++; else s_sig++;
    end
    s_d <= s;
    if (sh_rst) begin
      n_sh_rst++;
      check(32'(sh_row) == (32'(rd_row) + EXPO) % NR, "shutter row");
    end
    if (pix_valid) begin
      n_gray++;
      check(int'(pix_data) == scene(fcur, int'(pix_y), int'(pix_x)),
            $sformatf("gray pixel f%0d y%0d x%0d: %0d", fcur, pix_y, pix_x, pix_data));
    end
    if (bm_valid) begin
      n_bm++;
      check(bm_row == ero_exp[bm_y], $sformatf("bitmap f%0d row %0d", fcur, bm_y));
      check(bm_last == (32'(bm_y) == QR - 1), "bitmap last row");
    end
    if (frame_done) frames_done++;
  end

  // -------------------------------------------------------------- stimulus
  initial begin
    cfg = '0;
    cfg.delta_open    = 8'(DOPEN);
    cfg.delta_close   = 8'(DCLOSE);
    cfg.delta_hot     = 8'(DHOT);
    cfg.bg_init       = 1'b1;
    cfg.erode_kernel  = 9'h1FF;
    cfg.n_samples     = 3'(NS);
    cfg.exposure_rows = 8'(EXPO);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    enable = 1;
    wait (frame_start);
    @(posedge clk);
    cfg.bg_init = 1'b0;
    wait (frames_done == FRAMES / 2);
    @(posedge clk);
    cfg.erode_kernel = 9'h010;  // erosion switched to pass-through
    n_kernel_switch++;
    wait (frames_done == FRAMES);
    enable = 0;
    repeat (20) @(posedge clk);
    check(n_bm == FRAMES * QR, $sformatf("%0d bitmap rows", n_bm));
    check(n_gray == FRAMES * NR * NC, $sformatf("%0d gray pixels", n_gray));
    check(n_init > 0, "initialisation frame");
    check(n_open_min > 0, "I_MIN opening");
    check(n_open_max > 0, "I_MAX opening");
    check(n_close > 0, "closing");
    check(n_hot > 0, "hot pixels");
    check(n_removed > 0, "pixels removed by erosion");
    check(n_kernel_switch > 0, "kernel switch");
    check(n_sh_rst > 0, "shutter resets");
    if (FRAMES >= 60) check(hot_sway_late < hot_sway_early, "swaying patch absorbed");
    $display("frames=%0d init=%0d open_min=%0d open_max=%0d close=%0d hot=%0d eroded=%0d",
             FRAMES, n_init, n_open_min, n_open_max, n_close, n_hot, n_removed);
    $display("swaying patch hot pixels: first 20 frames %0d, last 20 frames %0d",
             hot_sway_early, hot_sway_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
