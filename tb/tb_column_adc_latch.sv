// tb_column_adc_latch: drives a falling ramp code and a comparator that rises
// when the code reaches a random pixel level (comp = code <= P), as the column
// amplifier does, and checks that the latch keeps exactly P, that it ignores
// the comparator outside the ramp and that clear re-arms it.
module tb_column_adc_latch;
  logic       clk = 0, rst_n = 0, clear = 0, len = 0, comp = 0;
  logic [7:0] code = 8'hFF, q;
  logic       valid;
  int checks = 0, failures = 0;

  column_adc_latch #(.WIDTH(8)) dut (.clk, .rst_n, .clear, .len, .comp, .code, .q, .valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      p = (n < 2) ? n * 255 : int'($urandom_range(0, 255));
      clear = 1; @(posedge clk); #1; clear = 0;
      check(!valid && q == 0, "cleared");
      // comparator activity outside the ramp must be ignored
      comp = 1; @(posedge clk); #1;
      check(!valid, "no capture without len");
      len = 1;
      for (int c = 255; c >= 0; c--) begin
        code = 8'(c);
        comp = (c <= p);
        @(posedge clk); #1;
      end
      len = 0; comp = 0; code = 8'hFF;
      check(valid, "crossing seen");
      check(q == 8'(p), $sformatf("latched %0d expected %0d", q, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
