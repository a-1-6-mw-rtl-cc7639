// tb_ramp_counter: checks the global ramp counter. After each start pulse the
// code must fall 255, 254, ... 0 on consecutive clocks with `running` high,
// `done` only with code 0, the ramp must last exactly 256 clocks (64 us at
// 4 MHz), and the counter must rest at the top code while idle.
module tb_ramp_counter;
  logic       clk = 0, rst_n = 0, start = 0;
  logic [7:0] code;
  logic       running, done;
  int checks = 0, failures = 0;

  ramp_counter #(.WIDTH(8)) dut (.clk, .rst_n, .start, .code, .running, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!running && code == 8'hFF, "idle after reset");
    for (int r = 0; r < 3; r++) begin
      start = 1; @(posedge clk); #1; start = 0;
      len = 0;
      while (running) begin
        check(code == 8'(255 - len), $sformatf("code %0d at step %0d", code, len));
        check(done == (code == 0), "done only at code 0");
        len++;
        @(posedge clk); #1;
      end
      check(len == 256, $sformatf("ramp length %0d", len));
      check(code == 8'hFF && !done, "parked at top code");
      repeat (5 + r) begin
        @(posedge clk); #1;
        check(!running && code == 8'hFF, "stays idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
