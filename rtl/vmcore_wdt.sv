// vmcore_wdt: watchdog timer.
//
// The source design names a watchdog only through its CWDT instruction,
// "(WDT) <- 0". Here it is a WDT_W-bit counter of machine cycles that runs
// while the enable bit INTCR.7 is set, is cleared by CWDT (clr) and, when it
// reaches its top value, raises timeout for one clock; the core turns that
// pulse into a reset of everything but the watchdog itself. The width, the
// enable bit and the reset action are choices made here. With the default
// 16 bits and a 250 ns machine cycle the program has about 16 ms to execute
// CWDT.
module vmcore_wdt #(
  parameter int unsigned WDT_W = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,       // machine-cycle strobe
  input  logic enable,   // INTCR.7
  input  logic clr,      // CWDT executed in this machine cycle
  output logic timeout
);

  logic [WDT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      timeout <= 1'b0;
    end else begin
      timeout <= 1'b0;
      if (!enable) begin
        cnt <= '0;
      end else if (en) begin
        if (clr) begin
          cnt <= '0;
        end else if (&cnt) begin
          cnt     <= '0;
          timeout <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
