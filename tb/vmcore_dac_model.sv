// vmcore_dac_model: behavioural model of a 12-bit serial DAC with a
// double buffer (input shift register and output register), such as the
// LTC1451. Not synthesizable logic. Bits are shifted in on rising sck while
// cs_ld is low; the rising edge of cs_ld moves the last 12 bits into the
// output register, counts the load and stores the code in a log.
module vmcore_dac_model (
  input logic sck,
  input logic sdi,
  input logic cs_ld
);
  logic [11:0] shreg = '0;
  logic [11:0] code  = '0;
  int unsigned nbits = 0;
  int unsigned loads = 0;
  int unsigned bad_frames = 0;
  logic [11:0] log_q [$];

  always @(posedge sck) if (!cs_ld) begin
    shreg = {shreg[10:0], sdi};
    nbits++;
  end

  always @(negedge cs_ld) nbits = 0;

  always @(posedge cs_ld) begin
    if (nbits != 0) begin   // a frame was sent (not a reset edge)
      if (nbits != 12) bad_frames++;
      code = shreg;
      loads++;
      log_q.push_back(shreg);
    end
  end
endmodule
