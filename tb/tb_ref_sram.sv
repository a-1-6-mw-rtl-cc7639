// tb_ref_sram: writes random words to every address of a reduced reference
// SRAM, reads them back in random order against a copy kept by the
// testbench, and checks that reads have one cycle of latency and hold.
module tb_ref_sram;
  localparam int DEPTH = 24, WIDTH = 80;
  logic             clk = 0, en = 0, we = 0;
  logic [4:0]       addr = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  ref_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [WIDTH-1:0] rnd();
    return {$urandom, $urandom, $urandom};
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    @(posedge clk);
    for (int pass = 0; pass < 4; pass++) begin
      for (int i = 0; i < DEPTH; i++) begin
        en = 1; we = 1; addr = 5'(i); wdata = rnd(); model[i] = wdata;
        @(posedge clk); #1;
      end
      en = 0; we = 0;
      for (int i = 0; i < 3 * DEPTH; i++) begin
        a = int'($urandom_range(0, DEPTH - 1));
        en = 1; addr = 5'(a);
        @(posedge clk); #1;
        en = 0;
        check(rdata == model[a], $sformatf("read addr %0d", a));
        @(posedge clk); #1;
        check(rdata == model[a], "read data holds");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
