// vision_sensor_top: digital core of a QVGA vision sensor that rejects a
// moving background and flags anomalous motion.
//
// A rolling shutter reads the 320x240 pixel array row by row through 320
// column amplifiers that double as single-ramp comparators. While one global
// 8-bit counter drives the ramp, every column latch captures the counter code
// at its comparator edge (the gray-scale pixel), and 160 column processors,
// one per pair of columns, use the same ramp to compare the pixel of every
// second row against its two stored reference levels I_MIN and I_MAX. They
// flag hot pixels (outside the band by more than delta_hot) and move the
// levels by delta_open / delta_close, writing them back to a
// 240 x 160 x 10-bit SRAM. The 160-bit hot rows pass through a bank of
// programmable 3x3 erosion filters and leave as a 160x120 bitmap per frame.
//
// Interface: the analog pixel array, column amplifiers and ramp DAC are
// outside this module. `col_comp[c]` is comparator c's output (high once the
// ramp has fallen to the pixel level); `ramp_code` drives the DAC; the pixel
// row controls and amplifier switches are outputs. `cfg` holds the run-time
// settings. The gray image leaves as a pixel stream (pix_*), the bitmap as
// rows (bm_*), one row per output cycle.
//
// Timing: 4 MHz clock, ROW_CYCLES clocks per row (15 frames/s at the
// defaults), 256-clock ramp, 24-clock update. Processor k reads column
// SUB*k of rows 0, SUB, 2*SUB, ...; that sub-sampling is this design's
// choice, as is the pixel-stream format.
module vision_sensor_top #(
  parameter int unsigned N_COLS     = vs_pkg::N_COLS,
  parameter int unsigned N_ROWS     = vs_pkg::N_ROWS,
  parameter int unsigned SUB        = 2,
  parameter int unsigned N_PROC     = N_COLS / SUB,
  parameter int unsigned Q_ROWS     = N_ROWS / SUB,
  parameter int unsigned UPD_CYCLES = vs_pkg::UPD_CYCLES,
  parameter int unsigned ROW_CYCLES = vs_pkg::ROW_CYCLES,
  parameter int unsigned RW         = $clog2(N_ROWS),
  parameter int unsigned XW         = $clog2(N_COLS),
  parameter int unsigned QW         = $clog2(Q_ROWS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  vs_pkg::cfg_t      cfg,
  // analog front end
  input  logic [N_COLS-1:0] col_comp,
  output logic [7:0]        ramp_code,
  output logic [RW-1:0]     rd_row,
  output logic              row_sel,
  output logic              pix_rst,
  output logic [RW-1:0]     sh_row,
  output logic              sh_rst,
  output logic              amp_res,
  output logic              s,
  output logic              phl,
  output logic              pre_n,
  output logic              len,
  // gray-scale image stream
  output logic              pix_valid,
  output logic [XW-1:0]     pix_x,
  output logic [RW-1:0]     pix_y,
  output logic [7:0]        pix_data,
  // hot-pixel bitmap
  output logic              bm_valid,
  output logic              bm_last,
  output logic [QW-1:0]     bm_y,
  output logic [N_PROC-1:0] bm_row,
  output logic              frame_start,
  output logic              frame_done
);

  localparam int unsigned CW = vs_pkg::ADC_BITS;
  localparam int unsigned TW = vs_pkg::TH_BITS;
  localparam int unsigned AW = $clog2(2 * Q_ROWS);

  logic                 ramp_start, ramp_running, ramp_done;
  logic                 readout_start, readout_done, readout_busy;
  logic                 proc_row, init_frame, ld_min, ld_max, proc_update;
  logic                 sram_en, sram_we, sram_wr_max;
  logic [AW-1:0]        sram_addr;
  logic [N_PROC*TW-1:0] sram_rdata, imin_row, imax_row;
  logic [N_PROC-1:0]    hot_row;
  logic                 hot_valid, hot_first, hot_last;
  logic [N_COLS*CW-1:0] col_codes;
  logic [N_PROC-1:0]    proc_comp;
  logic [N_PROC*CW-1:0] proc_codes;

  sensor_sequencer #(
    .N_ROWS(N_ROWS), .SUB(SUB), .UPD_CYCLES(UPD_CYCLES), .ROW_CYCLES(ROW_CYCLES)
  ) u_seq (
    .clk, .rst_n, .enable,
    .n_samples     (cfg.n_samples),
    .exposure_rows (cfg.exposure_rows),
    .bg_init       (cfg.bg_init),
    .ramp_done, .readout_done,
    .rd_row, .row_sel, .pix_rst, .sh_row, .sh_rst,
    .amp_res, .s, .phl, .pre_n, .len, .ramp_start,
    .proc_row, .init_frame, .ld_min, .ld_max, .proc_update,
    .sram_en, .sram_we, .sram_wr_max, .sram_addr,
    .hot_valid, .hot_first, .hot_last,
    .readout_start, .frame_start, .frame_done
  );

  ramp_counter #(.WIDTH(CW)) u_ramp (
    .clk, .rst_n,
    .start   (ramp_start),
    .code    (ramp_code),
    .running (ramp_running),
    .done    (ramp_done)
  );

  for (genvar c = 0; c < N_COLS; c++) begin : g_col
    column_adc_latch #(.WIDTH(CW)) u_latch (
      .clk, .rst_n,
      .clear (ramp_start),
      .len   (ramp_running),
      .comp  (col_comp[c]),
      .code  (ramp_code),
      .q     (col_codes[c*CW +: CW]),
      .valid ()
    );
  end

  for (genvar k = 0; k < N_PROC; k++) begin : g_map
    assign proc_comp[k]            = col_comp[SUB*k];
    assign proc_codes[k*CW +: CW] = col_codes[SUB*k*CW +: CW];
  end

  processor_bank #(.N_PROC(N_PROC), .CW(CW), .TW(TW)) u_bank (
    .clk, .rst_n,
    .delta_open  (cfg.delta_open),
    .delta_close (cfg.delta_close),
    .delta_hot   (cfg.delta_hot),
    .bg_init     (init_frame),
    .ld_min, .ld_max,
    .ld_row      (sram_rdata),
    .ramp_start,
    .ramp_active (ramp_running && proc_row),
    .code        (ramp_code),
    .comp        (proc_comp),
    .pix_codes   (proc_codes),
    .update      (proc_update),
    .imin_row, .imax_row, .hot_row
  );

  ref_sram #(.DEPTH(2 * Q_ROWS), .WIDTH(N_PROC * TW)) u_sram (
    .clk,
    .en    (sram_en),
    .we    (sram_we),
    .addr  (sram_addr),
    .wdata (sram_wr_max ? imax_row : imin_row),
    .rdata (sram_rdata)
  );

  erosion_filter_bank #(.W(N_PROC), .YW(QW)) u_erode (
    .clk, .rst_n,
    .kernel    (cfg.erode_kernel),
    .in_valid  (hot_valid),
    .in_first  (hot_first),
    .in_last   (hot_last),
    .in_row    (hot_row),
    .out_valid (bm_valid),
    .out_last  (bm_last),
    .out_y     (bm_y),
    .out_row   (bm_row)
  );

  column_readout #(.N_COLS(N_COLS), .CW(CW)) u_readout (
    .clk, .rst_n,
    .start     (readout_start),
    .codes     (col_codes),
    .pix_valid (pix_valid),
    .pix_x     (pix_x),
    .pix_data  (pix_data),
    .busy      (readout_busy),
    .done      (readout_done)
  );

  assign pix_y = rd_row;

endmodule
