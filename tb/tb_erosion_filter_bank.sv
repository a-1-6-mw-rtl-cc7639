// tb_erosion_filter_bank: streams random bitmaps (random density, random
// 3x3 kernel, frames of 1 to 7 rows, rows spaced by a random gap) into a
// 16-wide filter bank and compares every output row with an erosion computed
// by the testbench: a pixel stays 1 only if every neighbour selected by the
// kernel is 1, neighbours outside the frame being ignored. Also checks the
// row index, the last-row flag, that each frame yields as many rows as went
// in, and the full-kernel and pass-through cases.
module tb_erosion_filter_bank;
  localparam int W = 16, H_MAX = 7;
  logic         clk = 0, rst_n = 0;
  logic [8:0]   kernel = 9'h1FF;
  logic         in_valid = 0, in_first = 0, in_last = 0;
  logic [W-1:0] in_row = 0;
  logic         out_valid, out_last;
  logic [6:0]   out_y;
  logic [W-1:0] out_row;
  logic [W-1:0] img [H_MAX];
  logic [W-1:0] exp_row [H_MAX];
  int           h, got;
  int checks = 0, failures = 0, n_removed = 0;

  erosion_filter_bank #(.W(W), .YW(7)) dut (
    .clk, .rst_n, .kernel, .in_valid, .in_first, .in_last, .in_row,
    .out_valid, .out_last, .out_y, .out_row);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void reference();
    for (int y = 0; y < h; y++)
      for (int x = 0; x < W; x++) begin
        logic v;
        v = 1'b1;
        for (int dy = 0; dy < 3; dy++)
          for (int dx = 0; dx < 3; dx++) begin
            int yy, xx;
            yy = y + dy - 1; xx = x + dx - 1;
            if (kernel[3*dy+dx] && yy >= 0 && yy < h && xx >= 0 && xx < W)
              v = v & img[yy][xx];
          end
        exp_row[y][x] = v;
      end
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      check(out_y == 7'(got), $sformatf("row index %0d expected %0d", out_y, got));
      check(out_row == exp_row[got], $sformatf("row %0d: %h expected %h", got, out_row, exp_row[got]));
      check(out_last == (got == h - 1), "last flag");
      for (int x = 0; x < W; x++) if (img[got][x] && !out_row[x]) n_removed++;
      got++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 300; f++) begin
      int dens;
      h = (f < 3) ? 1 + 3 * f : int'($urandom_range(1, H_MAX));
      kernel = (f == 0) ? 9'h1FF : (f == 1) ? 9'h010 : 9'($urandom);
      dens = int'($urandom_range(1, 9));
      for (int y = 0; y < h; y++)
        for (int x = 0; x < W; x++) img[y][x] = ($urandom_range(0, 9) < dens);
      reference();
      got = 0;
      for (int y = 0; y < h; y++) begin
        @(negedge clk);
        in_valid = 1; in_row = img[y]; in_first = (y == 0); in_last = (y == h - 1);
        @(negedge clk);
        in_valid = 0; in_first = 0; in_last = 0;
        repeat ($urandom_range(1, 3)) @(negedge clk);
      end
      repeat (3) @(negedge clk);
      check(got == h, $sformatf("frame %0d: %0d rows out of %0d", f, got, h));
    end
    check(n_removed > 0, "erosion removed pixels");
    $display("pixels removed by erosion: %0d", n_removed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
