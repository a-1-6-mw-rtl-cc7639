// column_afe_model: behavioural model of the analog column front end (pixel
// array row, switched-capacitor amplifier and comparator, ramp DAC) for
// simulation only; it is not synthesizable hardware of the sensor.
//
// `vpix` carries the selected row's pixel levels after correlated double
// sampling, expressed directly as 8-bit codes. While C2 is switched to the
// ramp (`pre_n` low) each comparator output is high once the ramp, set by
// `ramp_code`, has fallen to the pixel level, i.e. comp = (ramp_code <= vpix).
// Outside the ramp the amplifier is in closed loop and the outputs are low.
module column_afe_model #(
  parameter int unsigned N_COLS = 320
) (
  input  logic [N_COLS*8-1:0] vpix,
  input  logic [7:0]          ramp_code,
  input  logic                pre_n,
  output logic [N_COLS-1:0]   comp
);
  always_comb begin
    for (int c = 0; c < int'(N_COLS); c++)
      comp[c] = !pre_n && (ramp_code <= vpix[c*8 +: 8]);
  end
endmodule
