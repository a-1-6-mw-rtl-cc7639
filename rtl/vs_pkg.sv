// vs_pkg: sizes, number formats and the run-time configuration shared by the
// blocks of the background-subtraction vision sensor.
//
// The sensor reads a 320x240 pixel array with 320 single-ramp 8-bit column
// ADCs. 160 column processors keep two 10-bit reference images (I_MIN, I_MAX)
// for a 160x120 sub-sampled grid and flag "hot" pixels that leave the band
// between them. Thresholds are stored with two fractional bits, so a 10-bit
// value v means v/4 ADC codes; comparisons against the 8-bit ADC code use the
// integer part v[9:2].
//
// The sizes (320, 240, 160, 8 and 10 bits, 4 MHz, 64 us ramp, 6 us update,
// 15 fps) follow the source. Field widths of the configuration and the
// quarter-LSB unit of delta_open/delta_close are this design's choices.
package vs_pkg;

  localparam int unsigned N_COLS      = 320;  // pixel columns / column ADCs
  localparam int unsigned N_ROWS      = 240;  // pixel rows
  localparam int unsigned N_PROC      = 160;  // column processors
  localparam int unsigned ADC_BITS    = 8;    // ADC and ramp-code resolution
  localparam int unsigned TH_BITS     = 10;   // reference-image resolution
  localparam int unsigned TH_FRAC     = TH_BITS - ADC_BITS;  // 2 fractional bits
  localparam int unsigned CLK_HZ      = 4_000_000;
  localparam int unsigned RAMP_CYCLES = 1 << ADC_BITS;       // 256 = 64 us
  localparam int unsigned UPD_CYCLES  = 24;                  // 6 us at 4 MHz
  localparam int unsigned FPS         = 15;
  // Row period that gives 15 frames/s at 4 MHz: 4e6 / (15 * 240) = 1111.
  localparam int unsigned ROW_CYCLES  = CLK_HZ / (FPS * N_ROWS);

  typedef logic [ADC_BITS-1:0] code_t;  // ramp / ADC code
  typedef logic [TH_BITS-1:0]  th_t;    // threshold, unsigned Q8.2

  // Run-time settings written by the host.
  typedef struct packed {
    logic [7:0] delta_open;   // threshold step on opening, quarter-LSB units
    logic [7:0] delta_close;  // threshold step on closing, quarter-LSB units
    logic [7:0] delta_hot;    // hot-pixel margin, whole ADC codes
    logic       bg_init;      // next frame loads I_MIN = I_MAX = pixel
    logic [8:0] erode_kernel; // 3x3 structuring element, bit 3*dy+dx
    logic [2:0] n_samples;    // N pulses on S per sampling phase (gain 2N)
    logic [7:0] exposure_rows;// shutter reset this many rows ahead of readout
  } cfg_t;

endpackage
