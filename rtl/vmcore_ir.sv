// vmcore_ir: the 16-bit instruction register, IR_H and IR_L.
//
// IR_H holds the operation code (and, for the Bit, Call and Goto formats,
// operands); IR_L holds an FR address or immediate data. On an advancing
// machine cycle the IR takes the prefetched program word, or a NOP (all
// zeros) when the control unit skips the prefetched instruction. While a
// multi-cycle address-register load runs, IR_H holds and IR_L counts up by
// one per machine cycle so that it addresses Rn, Rn+1, ... in turn, as the
// source design describes. Reset loads a NOP. All updates happen at the
// clock edge while en (the machine-cycle strobe) is high.
module vmcore_ir (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        load,     // take pm_data (or NOP when bubble)
  input  logic        bubble,
  input  logic        count,    // IR_L <- IR_L + 1, IR_H holds
  input  logic [15:0] pm_data,
  output logic [15:0] ir
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir <= 16'h0000;
    end else if (en) begin
      if (count)     ir[7:0] <= ir[7:0] + 8'd1;
      else if (load) ir <= bubble ? 16'h0000 : pm_data;
    end
  end

endmodule
