// processor_bank: the row of column processors that process one pixel row
// in parallel during its A/D conversion.
//
// N_PROC processors share the ramp code, the phase strobes and the settings.
// Processor k takes the comparator output and the ADC code of one column
// (chosen by the top level) and word k of the reference-SRAM row bus. After
// the update strobe the bank presents the new I_MIN row, the new I_MAX row
// (each N_PROC*TW bits, processor k in bits [k*TW +: TW]) and the N_PROC-bit
// hot-pixel row that feeds the erosion filters.
//
// Timing is that of column_processor: loads before the ramp, 2^CW ramp
// cycles, one update cycle, results from the next cycle on. The bank of 160
// processors follows the source; the shared row buses are this design's
// choice. The per-processor OPEN flags are not needed outside the processor.
module processor_bank #(
  parameter int unsigned N_PROC = 160,
  parameter int unsigned CW     = 8,
  parameter int unsigned TW     = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0]           delta_open,
  input  logic [7:0]           delta_close,
  input  logic [7:0]           delta_hot,
  input  logic                 bg_init,
  input  logic                 ld_min,
  input  logic                 ld_max,
  input  logic [N_PROC*TW-1:0] ld_row,
  input  logic                 ramp_start,
  input  logic                 ramp_active,
  input  logic [CW-1:0]        code,
  input  logic [N_PROC-1:0]    comp,
  input  logic [N_PROC*CW-1:0] pix_codes,
  input  logic                 update,
  output logic [N_PROC*TW-1:0] imin_row,
  output logic [N_PROC*TW-1:0] imax_row,
  output logic [N_PROC-1:0]    hot_row
);

  for (genvar k = 0; k < N_PROC; k++) begin : g_proc
    column_processor #(.CW(CW), .TW(TW)) u_proc (
      .clk         (clk),
      .rst_n       (rst_n),
      .delta_open  (delta_open),
      .delta_close (delta_close),
      .delta_hot   (delta_hot),
      .bg_init     (bg_init),
      .ld_min      (ld_min),
      .ld_max      (ld_max),
      .ld_data     (ld_row[k*TW +: TW]),
      .ramp_start  (ramp_start),
      .ramp_active (ramp_active),
      .code        (code),
      .comp        (comp[k]),
      .pix_code    (pix_codes[k*CW +: CW]),
      .update      (update),
      .imin        (imin_row[k*TW +: TW]),
      .imax        (imax_row[k*TW +: TW]),
      .hot         (hot_row[k]),
      .open_min    (),
      .open_max    ()
    );
  end

endmodule
