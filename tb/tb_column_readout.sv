// tb_column_readout: loads random column codes into a reduced readout and
// checks the pixel stream: one pixel per clock, columns in order, the right
// code, exactly N_COLS valid cycles and `done` with the last one.
module tb_column_readout;
  localparam int N = 20;
  logic           clk = 0, rst_n = 0, start = 0;
  logic [N*8-1:0] codes;
  logic           pix_valid, busy, done;
  logic [4:0]     pix_x;
  logic [7:0]     pix_data;
  int checks = 0, failures = 0;

  column_readout #(.N_COLS(N), .CW(8)) dut (.clk, .rst_n, .start, .codes, .pix_valid,
                                             .pix_x, .pix_data, .busy, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 10; r++) begin
      for (int c = 0; c < N; c++) codes[c*8 +: 8] = 8'($urandom);
      @(posedge clk); #1;
      check(!pix_valid, "idle");
      start = 1; @(posedge clk); #1; start = 0;
      n = 0;
      while (pix_valid) begin
        check(pix_x == 5'(n), $sformatf("column %0d expected %0d", pix_x, n));
        check(pix_data == codes[n*8 +: 8], $sformatf("data of column %0d", n));
        check(done == (n == N - 1), "done with last pixel");
        n++;
        @(posedge clk); #1;
      end
      check(n == N, $sformatf("%0d pixels", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
