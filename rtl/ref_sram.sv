// ref_sram: the frame buffer that holds the two reference images.
//
// 2*ROWS_Q words deep and N_PROC*TW bits wide: one word is a full row of the
// 160 processors' 10-bit thresholds, so the whole bank loads or stores one
// reference row per access. With the default 120 processed rows the array is
// 240 x 160 x 10 bit = 384,000 bit (375 Kibit). Words 0..ROWS_Q-1 hold I_MIN,
// words ROWS_Q..2*ROWS_Q-1 hold I_MAX.
//
// The source builds this from 6T cells; here it is a synchronous single-port
// array. Interface: `en` with `we` writes `wdata` to `addr` at the clock edge;
// `en` without `we` reads, and `rdata` holds the word from the next cycle
// until the next read. The content is not reset.
module ref_sram #(
  parameter int unsigned DEPTH = 240,
  parameter int unsigned WIDTH = 1600,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

  a_addr_in_range: assert property (@(posedge clk) en |-> (32'(addr) < DEPTH));

endmodule
