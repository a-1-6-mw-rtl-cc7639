// column_readout: sends one row of the gray-scale image off chip.
//
// After a conversion the N_COLS column latches hold the row's 8-bit codes.
// A `start` pulse makes the readout scan them left to right, one pixel per
// clock: `pix_valid` is high for N_COLS cycles with `pix_x` the column index
// and `pix_data` its code; `busy` is high while scanning and `done` pulses
// with the last pixel. The latches must hold their codes until `done`.
//
// The source only says the gray-scale image is delivered off chip; the
// one-pixel-per-clock scan is this design's choice.
module column_readout #(
  parameter int unsigned N_COLS = 320,
  parameter int unsigned CW     = 8,
  parameter int unsigned XW     = $clog2(N_COLS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [N_COLS*CW-1:0] codes,
  output logic                 pix_valid,
  output logic [XW-1:0]        pix_x,
  output logic [CW-1:0]        pix_data,
  output logic                 busy,
  output logic                 done
);

  logic [XW-1:0] x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      x    <= '0;
    end else if (start) begin
      busy <= 1'b1;
      x    <= '0;
    end else if (busy) begin
      if (32'(x) == N_COLS - 1) busy <= 1'b0;
      else                      x    <= x + 1'b1;
    end
  end

  assign pix_valid = busy;
  assign pix_x     = x;
  assign pix_data  = codes[32'(x)*CW +: CW];
  assign done      = busy && (32'(x) == N_COLS - 1);

endmodule
