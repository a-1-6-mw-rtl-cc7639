// ramp_counter: the global 8-bit counter of the single-ramp column ADCs.
//
// The counter drives the ramp DAC and is the value every column latch stores
// when its comparator toggles. The ramp falls from Vh while the counter runs;
// here the code counts down from its maximum to zero, so that a larger code is
// a larger pixel voltage and the code latched at the crossing is directly the
// pixel value. One ramp lasts 2^WIDTH clocks (256 clocks = 64 us at 4 MHz).
//
// Interface: `start` (one cycle) loads the maximum code and raises `running`
// on the next edge; `code` then steps down once per clock and `running` falls
// after the clock in which code 0 was presented. `done` pulses in that last
// ramp cycle. While idle the code rests at the maximum (ramp parked at Vh).
// The 8-bit counter and the 4 MHz, 64 us ramp follow the source; the count
// direction and the start/done handshake are this design's choices.
module ramp_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [WIDTH-1:0] code,
  output logic             running,
  output logic             done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code    <= '1;
      running <= 1'b0;
    end else if (start) begin
      code    <= '1;
      running <= 1'b1;
    end else if (running) begin
      if (code == '0) begin
        running <= 1'b0;
        code    <= '1;
      end else begin
        code <= code - 1'b1;
      end
    end
  end

  assign done = running && (code == '0);

endmodule
