// tb_vmcore_wdt: self-checking test of the watchdog (8-bit instance). It
// must not fire while disabled or while cleared in time, and must fire
// exactly after 256 enabled strobes without a clear.
module tb_vmcore_wdt;
  logic clk = 0, rst_n = 0, en = 0, enable = 0, clr = 0, timeout;
  int checks = 0, failures = 0, fired = 0, strobes;

  vmcore_wdt #(.WDT_W(8)) dut (.clk, .rst_n, .en, .enable, .clr, .timeout);

  always #5 clk = ~clk;
  always @(posedge clk) if (timeout) fired++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fired = 0;
    // disabled: never fires
    repeat (600) begin @(negedge clk); en = 1; end
    check(fired == 0, "fired while disabled");
    // enabled, cleared every 200 strobes
    enable = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk); clr = (i % 200 == 199);
    end
    clr = 0;
    check(fired == 0, "fired although cleared");
    // enabled, no clear: fires after 256 strobes
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    strobes = 0;
    while (fired == 0 && strobes < 1000) begin @(negedge clk); strobes++; end
    // the pulse follows the 256th strobe and is seen one clock later
    check(strobes == 257, $sformatf("fired after %0d clocks", strobes));
    // strobe gaps stretch the time
    en = 0;
    repeat (10) @(negedge clk);
    check(fired == 1, "single pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
