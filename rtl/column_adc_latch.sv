// column_adc_latch: the 8-bit output latch of one single-ramp column ADC.
//
// While the ramp runs (`len` high) the column comparator output `comp` goes
// high in the cycle the falling ramp reaches the pixel voltage. On that first
// high cycle the latch stores the global counter code, which is the pixel
// value; later cycles leave it unchanged. `clear` (one cycle, before a ramp)
// re-arms the latch. If the comparator never toggles the latch keeps 0.
//
// Timing: `q` holds the new code from the clock edge after the crossing until
// the next `clear`; `valid` says a crossing was seen in the current ramp.
// The latch-on-toggle behaviour follows the source; the synchronous capture
// and the clear/valid handshake are this design's choices.
module column_adc_latch #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             len,
  input  logic             comp,
  input  logic [WIDTH-1:0] code,
  output logic [WIDTH-1:0] q,
  output logic             valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      valid <= 1'b0;
    end else if (clear) begin
      q     <= '0;
      valid <= 1'b0;
    end else if (len && comp && !valid) begin
      q     <= code;
      valid <= 1'b1;
    end
  end

endmodule
