// vmcore_porta: Port A, the bidirectional 8-bit parallel port.
//
// The port serves interactive (IVR) test applications. The source design
// gives it a single File Register address and calls it bidirectional, without
// a direction register, so each pin is made quasi-bidirectional here: the
// output latch drives a pin low where it holds 0 and releases it (oe low,
// an external pull-up makes it 1) where it holds 1. Writing 1 to a bit
// therefore turns it into an input. Reading returns the pin levels after a
// two-flip-flop synchroniser. The latch resets to all ones (all pins are
// inputs). wr is sampled at the clock edge; the caller qualifies it with
// the machine-cycle strobe.
module vmcore_porta (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  input  logic [7:0] pin_in,
  output logic [7:0] pin_out,
  output logic [7:0] pin_oe
);

  logic [7:0] latch;
  logic [7:0] sync1, sync2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch <= 8'hFF;
      sync1 <= 8'hFF;
      sync2 <= 8'hFF;
    end else begin
      if (wr) latch <= wdata;
      sync1 <= pin_in;
      sync2 <= sync1;
    end
  end

  assign pin_out = latch;
  assign pin_oe  = ~latch;
  assign rdata   = sync2;

endmodule
