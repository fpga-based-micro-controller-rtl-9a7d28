// tb_vmcore_porta: self-checking test of Port A. The latch must follow
// writes, drive enables must be its complement (a 1 releases the pin), and
// reads must return the pin levels two clocks later. The pins are modelled
// as a wired bus: driven low where enabled, otherwise the external level.
module tb_vmcore_porta;
  logic       clk = 0, rst_n = 0, wr = 0;
  logic [7:0] wdata = '0, rdata, pin_in, pin_out, pin_oe, ext = 8'hFF, latch_ref;
  int checks = 0, failures = 0;

  vmcore_porta dut (.*);
  assign pin_in = ext & ~pin_oe;   // open-drain low drive, external level otherwise

  always #5 clk = ~clk;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    latch_ref = 8'hFF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++; if (pin_oe != 8'h00) begin failures++; $display("pins driven after reset"); end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      wr = $urandom_range(0, 1); wdata = 8'($urandom); ext = 8'($urandom);
      @(posedge clk);
      if (wr) latch_ref = wdata;
      @(negedge clk); wr = 0;
      @(posedge clk); @(posedge clk); #1;
      checks++;
      if (pin_out != latch_ref || pin_oe != ~latch_ref || rdata != (ext & latch_ref)) begin
        failures++;
        if (failures < 10) $display("latch %02x oe %02x read %02x, expected %02x %02x %02x",
                                    pin_out, pin_oe, rdata, latch_ref, ~latch_ref, ext & latch_ref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
