// vmcore_pm: program memory (PM) of VMCore.
//
// A read-only array of 2**PC_W sixteen-bit instruction words, as the source
// design builds it from embedded array blocks in a 16-bit ROM configuration.
// The read is combinational: the word addressed by the fetch address is
// captured by the instruction register at the end of the machine cycle, so
// the instruction register plays the part of the memory block's output
// register. Contents are set when the device is configured; here they come
// from the hex file named by INIT_FILE (one word per line), or stay zero
// (the NOP instruction) when INIT_FILE is empty.
module vmcore_pm #(
  parameter int unsigned PC_W      = 9,
  parameter string       INIT_FILE = ""
) (
  input  logic [PC_W-1:0] addr,
  output logic [15:0]     data
);

  logic [15:0] rom [2**PC_W];

  initial begin
    for (int i = 0; i < 2**PC_W; i++) rom[i] = 16'h0000;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign data = rom[addr];

endmodule
