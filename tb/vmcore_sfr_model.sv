// vmcore_sfr_model: behavioural model of the System Flash ROM bus.
// Not synthesizable logic: an array of 2**AW bytes (the upper address bits
// are ignored), initialised to the erased value FF. Reads are asynchronous:
// dout shows the addressed byte. A byte is written on the rising edge of
// we_n while ce_n is low; real flash needs a command sequence and an erase,
// which the model leaves out.
module vmcore_sfr_model #(
  parameter int unsigned AW = 16
) (
  input  logic [27:0] addr,
  input  logic [7:0]  din,
  output logic [7:0]  dout,
  input  logic        ce_n,
  input  logic        oe_n,
  input  logic        we_n
);
  logic [7:0] mem [2**AW];
  int unsigned writes = 0;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = 8'hFF;

  assign dout = mem[addr[AW-1:0]];

  always @(posedge we_n) begin
    if (!ce_n) begin
      mem[addr[AW-1:0]] = din;
      writes++;
    end
  end

  // the bus is never read and written at once
  always @(negedge oe_n) assert (we_n) else $error("SFR read during a write");
endmodule
