// erosion_filter_bank: W parallel 3x3 binary erosion filters that clean the
// hot-pixel bitmap row by row before it leaves the chip.
//
// Rows of the hot-pixel bitmap arrive one at a time (`in_valid`, `in_row`,
// `in_first` on the top row of a frame, `in_last` on the bottom row). The bank
// keeps the two previous rows; when row y arrives it outputs eroded row y-1,
// and after the last row it spends one extra cycle flushing the bottom row.
// Output pixel k of row y is the AND of the neighbours (y+dy-1, k+dx-1) whose
// bit 3*dy+dx is set in the programmable 9-bit `kernel`; neighbours outside
// the frame are ignored (count as 1). Kernel 9'h1FF is the full 3x3 erosion,
// 9'h010 (centre only) passes the bitmap through unchanged.
//
// Timing: `out_valid` pulses one cycle after the input row that completes a
// neighbourhood; `out_last` marks the bottom row of the frame; `out_y` is the
// row index. Input rows must be at least two cycles apart after `in_last`.
// The 3x3 erosion per processor column follows the source; what is
// programmable (the structuring-element mask) and the border rule are this
// design's choices.
module erosion_filter_bank #(
  parameter int unsigned W  = 160,
  parameter int unsigned YW = 7      // row-index bits
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [8:0]    kernel,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_last,
  input  logic [W-1:0]  in_row,
  output logic          out_valid,
  output logic          out_last,
  output logic [YW-1:0] out_y,
  output logic [W-1:0]  out_row
);

  logic [W-1:0]  r1, r2;        // previous row, row before it
  logic          have2;         // r2 is inside the frame
  logic          flush;         // emit the bottom row next cycle
  logic [YW-1:0] y_next;
  logic          emit;
  logic          emit_last;
  logic [W-1:0]  above, centre, below;
  logic [W-1:0]  eroded;

  // Neighbourhood rows for the row being emitted this cycle.
  always_comb begin
    emit      = flush || (in_valid && !in_first);
    emit_last = flush;
    if (flush) begin
      above  = have2 ? r2 : '1;
      centre = r1;
      below  = '1;
    end else begin
      above  = have2 ? r2 : '1;
      centre = r1;
      below  = in_row;
    end
  end

  function automatic logic erode_px(input logic [W-1:0] a, input logic [W-1:0] c,
                                    input logic [W-1:0] b, input int k,
                                    input logic [8:0] m);
    logic res;
    res = 1'b1;
    for (int dy = 0; dy < 3; dy++) begin
      for (int dx = 0; dx < 3; dx++) begin
        int  x;
        logic v;
        x = k + dx - 1;
        if (x < 0 || x >= int'(W)) v = 1'b1;
        else if (dy == 0)          v = a[x];
        else if (dy == 1)          v = c[x];
        else                       v = b[x];
        if (m[3*dy+dx] && !v) res = 1'b0;
      end
    end
    return res;
  endfunction

  always_comb begin
    for (int k = 0; k < int'(W); k++) eroded[k] = erode_px(above, centre, below, k, kernel);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1        <= '0;
      r2        <= '0;
      have2     <= 1'b0;
      flush     <= 1'b0;
      y_next    <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_y     <= '0;
      out_row   <= '0;
    end else begin
      out_valid <= emit;
      out_last  <= emit_last;
      if (emit) begin
        out_row <= eroded;
        out_y   <= y_next;
        y_next  <= y_next + 1'b1;
      end
      flush <= 1'b0;
      if (flush) begin
        have2 <= 1'b0;
      end
      if (in_valid) begin
        r1    <= in_row;
        r2    <= r1;
        have2 <= !in_first;
        flush <= in_last;
        if (in_first) y_next <= '0;
      end
    end
  end

  a_no_row_during_flush: assert property (@(posedge clk) disable iff (!rst_n)
    flush |-> !in_valid);

endmodule
