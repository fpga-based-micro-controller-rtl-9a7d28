// tb_vmcore_uart: self-checking test of the UART at 16 clocks per bit.
// Transmit: random bytes are decoded from txd by the testbench, bit by bit
// in the middle of each bit time, and the frame length is checked. Receive:
// frames driven on rxd must appear in rx_data with rx_ready; a second byte
// arriving before the first is read must set rx_overrun.
module tb_vmcore_uart;
  localparam int BIT = 16;
  logic       clk = 0, rst_n = 0;
  logic       tx_start = 0, tx_busy, txd, rxd = 1, rx_read = 0, rx_ready, rx_overrun;
  logic [7:0] tx_data = '0, rx_data;
  int checks = 0, failures = 0;

  vmcore_uart #(.CLK_HZ(1_600_000), .BAUD(100_000)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic drive_frame(input logic [7:0] b);
    rxd = 0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (BIT) @(posedge clk); end
    rxd = 1; repeat (BIT) @(posedge clk);
  endtask

  initial begin : watchdog
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, got;
    int busy_clks;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // transmit
    for (int n = 0; n < 20; n++) begin
      b = 8'($urandom);
      @(negedge clk); tx_data = b; tx_start = 1;
      @(negedge clk); tx_start = 0; tx_data = 8'($urandom);   // data is captured at start
      check(tx_busy && !txd, "start bit");
      repeat (BIT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); got[i] = txd; end
      repeat (BIT) @(posedge clk);
      check(txd == 1, "stop bit");
      check(got == b, $sformatf("sent %02x, line carried %02x", b, got));
      busy_clks = 0;
      while (tx_busy) begin @(posedge clk); busy_clks++; end
      check(busy_clks <= BIT / 2 + 1, "frame length 10 bits");
    end
    // receive
    for (int n = 0; n < 20; n++) begin
      b = 8'($urandom);
      drive_frame(b);
      check(rx_ready && rx_data == b && !rx_overrun, $sformatf("received %02x, expected %02x", rx_data, b));
      @(negedge clk); rx_read = 1; @(negedge clk); rx_read = 0;
      check(!rx_ready, "rx_ready cleared by read");
    end
    // overrun
    drive_frame(8'h5A);
    drive_frame(8'hA5);
    check(rx_ready && rx_overrun && rx_data == 8'h5A, "overrun keeps the first byte");
    @(negedge clk); rx_read = 1; @(negedge clk); rx_read = 0;
    check(!rx_ready && !rx_overrun, "read clears overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
