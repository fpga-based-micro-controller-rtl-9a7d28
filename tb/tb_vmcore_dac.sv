// tb_vmcore_dac: self-checking test of the serial DAC controller with a
// behavioural 12-bit serial DAC. Every 9-bit sample must arrive as the code
// {sample, 000} in a 12-bit frame, busy must last 24*SCK_HALF+2 clocks, and
// a start while busy must be ignored.
module tb_vmcore_dac;
  localparam int HALF = 3;
  logic       clk = 0, rst_n = 0, start = 0, busy, sck, sdi, cs_ld;
  logic [8:0] data = '0;
  int checks = 0, failures = 0, busy_clks;

  vmcore_dac #(.SCK_HALF(HALF)) dut (.*);
  vmcore_dac_model u_model (.sck, .sdi, .cs_ld);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] s;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      s = 9'($urandom);
      @(negedge clk); start = 1; data = s;
      @(negedge clk); start = 0;
      busy_clks = 1;
      // a start in the middle of the frame is ignored
      repeat (5) begin @(negedge clk); busy_clks++; end
      start = 1; data = ~s;
      @(negedge clk); start = 0; busy_clks++;
      while (busy) begin @(negedge clk); busy_clks++; end
      check(busy_clks == 24 * HALF + 2, $sformatf("busy for %0d clocks", busy_clks));
      check(u_model.code == {s, 3'b000}, $sformatf("DAC code %03x, expected %03x", u_model.code, {s, 3'b000}));
      check(u_model.loads == n + 1 && u_model.bad_frames == 0, "one 12-bit frame per sample");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
