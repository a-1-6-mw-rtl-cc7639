// sensor_sequencer: the rolling-shutter row sequencer of the vision sensor.
//
// Rows are read top to bottom, one per ROW_CYCLES clocks (1111 clocks at
// 4 MHz gives 240 rows at 15 frames/s). Every row goes through these phases:
//   ROWSTART  1 cycle: column amplifiers reset (amp_res); the shutter row
//             exposure_rows ahead of the read row is reset (sh_rst), which
//             sets the exposure time (0 = a whole frame).
//   SAMP_SIG  2N cycles: row selected, Phl low, N pulses on S (the signal is
//             sampled on C1 and transferred to C2 N times, gain 2N).
//   SAMP_RST  2N cycles: the read row is reset (pix_rst), Phl high, N pulses
//             on S: the reset level is subtracted from the stored signal.
//   LOAD      3 cycles: on processed rows I_MIN, then I_MAX of the row are
//             read from the reference SRAM into the processors; the last
//             cycle starts the ramp counter and clears the column latches.
//   RAMP      2^8 cycles (64 us): C2 is switched to the ramp (pre_n low), S
//             high, column latches enabled (len); processors compare.
//   UPDATE    UPD_CYCLES (24 = 6 us): processors update; the new I_MIN and
//             I_MAX rows are written back; the hot row goes to the erosion
//             filters.
//   READOUT   the row's gray-scale codes are scanned out.
//   PAD       idle until the row period is over.
// Only every SUB-th row (rows 0, 2, 4, ... by default) is processed, giving
// the 160x120 bitmap; processed row q uses SRAM word q for I_MIN and Q_ROWS+q
// for I_MAX. `bg_init` is sampled at the start of each frame and held in
// `init_frame` for the whole frame.
//
// The ramp and update durations, the frame rate, the multiple sampling with
// gain 2N and the switch names (S, Phl, pre, res, LEN) come from the source.
// The phase order and lengths outside the ramp and update, the exposure
// control by a shutter row and the row sub-sampling are this design's
// choices.
module sensor_sequencer #(
  parameter int unsigned N_ROWS     = 240,
  parameter int unsigned SUB        = 2,
  parameter int unsigned UPD_CYCLES = 24,
  parameter int unsigned ROW_CYCLES = 1111,
  parameter int unsigned RW         = $clog2(N_ROWS),
  parameter int unsigned Q_ROWS     = N_ROWS / SUB,
  parameter int unsigned AW         = $clog2(2 * Q_ROWS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic [2:0]    n_samples,
  input  logic [7:0]    exposure_rows,
  input  logic          bg_init,
  input  logic          ramp_done,
  input  logic          readout_done,
  // pixel array
  output logic [RW-1:0] rd_row,
  output logic          row_sel,
  output logic          pix_rst,
  output logic [RW-1:0] sh_row,
  output logic          sh_rst,
  // column amplifier / ADC switches
  output logic          amp_res,
  output logic          s,
  output logic          phl,
  output logic          pre_n,
  output logic          len,
  output logic          ramp_start,
  // processors and reference SRAM
  output logic          proc_row,
  output logic          init_frame,
  output logic          ld_min,
  output logic          ld_max,
  output logic          proc_update,
  output logic          sram_en,
  output logic          sram_we,
  output logic          sram_wr_max,
  output logic [AW-1:0] sram_addr,
  // erosion filters and readout
  output logic          hot_valid,
  output logic          hot_first,
  output logic          hot_last,
  output logic          readout_start,
  output logic          frame_start,
  output logic          frame_done
);

  typedef enum logic [3:0] {
    S_IDLE, S_ROWSTART, S_SAMP_SIG, S_SAMP_RST, S_LOAD, S_RAMP, S_UPDATE,
    S_READOUT, S_PAD
  } state_t;

  state_t        state;
  logic [10:0]   t;        // cycle within phase
  logic [15:0]   row_t;    // cycle within row period
  logic [RW-1:0] q;        // processed-row index
  logic [3:0]    nsamp2;   // 2N
  logic [RW:0]   sh_sum;

  assign nsamp2   = (n_samples == 3'd0) ? 4'd2 : {n_samples, 1'b0};
  assign proc_row = (32'(rd_row) % SUB) == 0;
  assign sh_sum   = {1'b0, rd_row} + (RW+1)'(exposure_rows);
  assign sh_row   = (32'(sh_sum) >= N_ROWS) ? RW'(32'(sh_sum) - N_ROWS) : sh_sum[RW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      t          <= '0;
      row_t      <= '0;
      rd_row     <= '0;
      q          <= '0;
      init_frame <= 1'b0;
    end else begin
      row_t <= row_t + 1'b1;
      t     <= t + 1'b1;
      unique case (state)
        S_IDLE: begin
          t <= '0;
          if (enable) begin
            state      <= S_ROWSTART;
            row_t      <= '0;
            rd_row     <= '0;
            q          <= '0;
            init_frame <= bg_init;
          end
        end
        S_ROWSTART: begin
          state <= S_SAMP_SIG;
          t     <= '0;
        end
        S_SAMP_SIG: if (t == 11'(nsamp2) - 1) begin
          state <= S_SAMP_RST;
          t     <= '0;
        end
        S_SAMP_RST: if (t == 11'(nsamp2) - 1) begin
          state <= S_LOAD;
          t     <= '0;
        end
        S_LOAD: if (t == 11'd2) begin
          state <= S_RAMP;
          t     <= '0;
        end
        S_RAMP: if (ramp_done) begin
          state <= S_UPDATE;
          t     <= '0;
        end
        S_UPDATE: if (t == 11'(UPD_CYCLES) - 1) begin
          state <= S_READOUT;
          t     <= '0;
        end
        S_READOUT: if (readout_done) begin
          state <= S_PAD;
          t     <= '0;
        end
        S_PAD: ;
        default: state <= S_IDLE;
      endcase
      // End of the row period: next row, or next frame.
      if ((state == S_PAD) && (32'(row_t) >= ROW_CYCLES - 1)) begin
        t     <= '0;
        row_t <= '0;
        if (proc_row) q <= q + 1'b1;
        if (32'(rd_row) == N_ROWS - 1) begin
          rd_row <= '0;
          q      <= '0;
          if (enable) begin
            state      <= S_ROWSTART;
            init_frame <= bg_init;
          end else begin
            state <= S_IDLE;
          end
        end else begin
          rd_row <= rd_row + 1'b1;
          state  <= S_ROWSTART;
        end
      end
    end
  end

  always_comb begin
    row_sel       = (state == S_SAMP_SIG) || (state == S_SAMP_RST);
    pix_rst       = (state == S_SAMP_RST);
    sh_rst        = (state == S_ROWSTART) && (exposure_rows != 8'd0);
    amp_res       = (state == S_ROWSTART);
    phl           = (state == S_SAMP_RST);
    s             = (row_sel && !t[0]) || (state == S_RAMP);
    pre_n         = !(state == S_RAMP);
    len           = (state == S_RAMP);
    ramp_start    = (state == S_LOAD) && (t == 11'd2);
    ld_min        = proc_row && (state == S_LOAD) && (t == 11'd1);
    ld_max        = proc_row && (state == S_LOAD) && (t == 11'd2);
    proc_update   = proc_row && (state == S_UPDATE) && (t == 11'd0);
    sram_en       = proc_row && (((state == S_LOAD) && (t <= 11'd1)) ||
                                 ((state == S_UPDATE) && (t == 11'd1 || t == 11'd2)));
    sram_we       = (state == S_UPDATE);
    sram_wr_max   = ((state == S_LOAD) && (t == 11'd1)) || ((state == S_UPDATE) && (t == 11'd2));
    sram_addr     = sram_wr_max ? AW'(32'(q) + Q_ROWS) : AW'(q);
    hot_valid     = proc_row && (state == S_UPDATE) && (t == 11'd1);
    hot_first     = (q == '0);
    hot_last      = (32'(q) == Q_ROWS - 1);
    readout_start = (state == S_READOUT) && (t == 11'd0);
    frame_start   = (state == S_ROWSTART) && (rd_row == '0);
    frame_done    = (state == S_PAD) && (32'(row_t) >= ROW_CYCLES - 1) &&
                    (32'(rd_row) == N_ROWS - 1);
  end

  a_ramp_ends: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RAMP) |-> (t < 11'd300));

endmodule
