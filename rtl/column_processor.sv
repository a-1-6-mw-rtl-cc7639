// column_processor: one of the column-level processors that run the
// background-subtraction algorithm while the column ADC converts.
//
// Each processed pixel P has two 10-bit reference values, I_MIN and I_MAX
// (unsigned, two fractional bits). During the 256-cycle ramp the processor
// compares the falling ramp code with the integer parts of both thresholds
// and watches the column comparator `comp`, which rises in the cycle the ramp
// reaches the pixel voltage:
//   - OPEN_MAX: the comparator rises before the ramp reaches I_MAX (P > I_MAX).
//   - OPEN_MIN: the ramp reaches I_MIN before the comparator rises (I_MIN > P).
//   - WIDTH is high between the two crossings; a counter counts its clocks,
//     so it ends at P - I_MAX (or I_MIN - P). The pixel is HOT when the count
//     exceeds delta_hot. The counter restarts at the comparator edge, so the
//     I_MIN window and the I_MAX window are timed apart.
// In the update cycle the thresholds move:
//   I_MIN -= delta_open if OPEN_MIN, else I_MIN += delta_close
//   I_MAX += delta_open if OPEN_MAX, else I_MAX -= delta_close
// saturating at 0 and at full scale. With `bg_init` set, the update instead
// loads I_MIN = I_MAX = P (from the column ADC latch) and reports no hot pixel.
//
// Interface and timing: `ld_min`/`ld_max` load the thresholds from the SRAM
// word `ld_data` before the ramp; `ramp_start` (one cycle) clears the flags;
// `ramp_active` marks the 256 ramp cycles, with `code` and `comp` of the same
// cycle; `update` (one cycle, after the ramp) registers the new `imin`,
// `imax` and `hot`, valid from the next cycle.
//
// The ramp-time comparison, the WIDTH counter, HOT and the update rules come
// from the source; the single restartable counter, saturation and the
// initialisation frame are this design's choices.
module column_processor #(
  parameter int unsigned CW = 8,   // ramp / ADC code bits
  parameter int unsigned TW = 10   // threshold bits (CW integer + fraction)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [7:0]    delta_open,
  input  logic [7:0]    delta_close,
  input  logic [7:0]    delta_hot,
  input  logic          bg_init,
  input  logic          ld_min,
  input  logic          ld_max,
  input  logic [TW-1:0] ld_data,
  input  logic          ramp_start,
  input  logic          ramp_active,
  input  logic [CW-1:0] code,
  input  logic          comp,
  input  logic [CW-1:0] pix_code,
  input  logic          update,
  output logic [TW-1:0] imin,
  output logic [TW-1:0] imax,
  output logic          hot,
  output logic          open_min,
  output logic          open_max
);

  localparam int unsigned FR = TW - CW;

  logic          comp_seen;   // comparator has toggled in this ramp
  logic [7:0]    nwidth;      // WIDTH clock counter
  logic          hot_flag;
  logic          cross_max, cross_min, width;
  logic          comp_edge;
  logic [7:0]    nwidth_next;
  logic [TW:0]   min_up, max_up;
  logic [TW:0]   min_dn, max_dn;
  logic [TW-1:0] imin_next, imax_next;

  // Ramp-time comparisons against the integer part of the thresholds.
  always_comb begin
    cross_max = code <= imax[TW-1:FR];
    cross_min = code <= imin[TW-1:FR];
    comp_edge = comp && !comp_seen;
    width     = (comp && !cross_max) || (cross_min && !comp);
    if (comp_edge)
      nwidth_next = width ? 8'd1 : 8'd0;
    else if (width && nwidth != 8'hFF)
      nwidth_next = nwidth + 8'd1;
    else
      nwidth_next = nwidth;
  end

  // Saturating threshold steps.
  always_comb begin
    min_up = {1'b0, imin} + (TW+1)'(delta_close);
    min_dn = {1'b0, imin} - (TW+1)'(delta_open);
    max_up = {1'b0, imax} + (TW+1)'(delta_open);
    max_dn = {1'b0, imax} - (TW+1)'(delta_close);
    if (open_min) imin_next = min_dn[TW] ? '0 : min_dn[TW-1:0];
    else          imin_next = min_up[TW] ? '1 : min_up[TW-1:0];
    if (open_max) imax_next = max_up[TW] ? '1 : max_up[TW-1:0];
    else          imax_next = max_dn[TW] ? '0 : max_dn[TW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      imin      <= '0;
      imax      <= '0;
      hot       <= 1'b0;
      hot_flag  <= 1'b0;
      open_min  <= 1'b0;
      open_max  <= 1'b0;
      comp_seen <= 1'b0;
      nwidth    <= '0;
    end else begin
      if (ld_min) imin <= ld_data;
      if (ld_max) imax <= ld_data;
      if (ramp_start) begin
        hot_flag  <= 1'b0;
        open_min  <= 1'b0;
        open_max  <= 1'b0;
        comp_seen <= 1'b0;
        nwidth    <= '0;
      end else if (ramp_active) begin
        nwidth <= nwidth_next;
        if (comp) comp_seen <= 1'b1;
        if (comp_edge && !cross_max) open_max <= 1'b1;
        if (cross_min && !comp && !comp_seen) open_min <= 1'b1;
        if (width && nwidth_next > delta_hot) hot_flag <= 1'b1;
      end
      if (update) begin
        if (bg_init) begin
          imin <= {pix_code, FR'(0)};
          imax <= {pix_code, FR'(0)};
          hot  <= 1'b0;
        end else begin
          imin <= imin_next;
          imax <= imax_next;
          hot  <= hot_flag;
        end
      end
    end
  end

  // Loads and updates happen outside the conversion.
  a_no_update_in_ramp: assert property (@(posedge clk) disable iff (!rst_n)
    ramp_active |-> !(update || ld_min || ld_max));

endmodule
