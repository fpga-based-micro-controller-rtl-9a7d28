// vmcore_alu: the VMCore arithmetic logic unit.
//
// A purely combinational 8-bit unit. Operand A comes through A_mux (the
// accumulator or the FR read bus DOUT), operand B through B_mux (DOUT, the
// immediate byte, the SFR data bus, #0 or #1). The result is the Data INput
// bus DIN that is written back into the File Register or an address register.
//
// Operations (as listed by the source design): pass B, 0, A+B, A+B+C, A-B,
// A-B-C, A+1, A-1, AND, OR, XOR, not B, rotate B left, rotate B right, set
// bit i of B, clear bit i of B. The skip flag SF is bit i of B; the control
// unit uses it for TBSS/TBSC/LDBF.
//
// Choices made here: the rotates go through the carry (as the instruction
// table says: ROL/ROR "through Carry"); after a subtraction C is the borrow
// (1 when the unsigned result went below zero); c_out of the logic
// operations is 0; z is set when DIN is zero. Which flags are actually kept
// is decided by the control unit. Timing: no clock, result within the same
// machine cycle.
module vmcore_alu
  import vmcore_pkg::*;
(
  input  alu_op_e      op,
  input  logic [7:0]   a,
  input  logic [7:0]   b,
  input  logic         cin,      // carry flag SR.C
  input  logic [2:0]   bit_sel,  // bit number i from the instruction
  output logic [7:0]   y,        // DIN
  output logic         c_out,
  output logic         z,
  output logic         sf        // skip flag: B[i]
);

  logic [8:0] sum;

  always_comb begin
    sum   = '0;
    y     = '0;
    c_out = 1'b0;
    unique case (op)
      ALU_PASS: y = b;
      ALU_ZERO: y = '0;
      ALU_ADD:  begin sum = {1'b0, a} + {1'b0, b};               y = sum[7:0]; c_out = sum[8]; end
      ALU_ADC:  begin sum = {1'b0, a} + {1'b0, b} + {8'd0, cin}; y = sum[7:0]; c_out = sum[8]; end
      ALU_SUB:  begin sum = {1'b0, a} - {1'b0, b};               y = sum[7:0]; c_out = sum[8]; end
      ALU_SBC:  begin sum = {1'b0, a} - {1'b0, b} - {8'd0, cin}; y = sum[7:0]; c_out = sum[8]; end
      ALU_INC:  begin sum = {1'b0, a} + 9'd1;                    y = sum[7:0]; c_out = sum[8]; end
      ALU_DEC:  begin sum = {1'b0, a} - 9'd1;                    y = sum[7:0]; c_out = sum[8]; end
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOT:  y = ~b;
      ALU_ROL:  begin y = {b[6:0], cin}; c_out = b[7]; end
      ALU_ROR:  begin y = {cin, b[7:1]}; c_out = b[0]; end
      ALU_SETB: y = b | (8'd1 << bit_sel);
      ALU_CLRB: y = b & ~(8'd1 << bit_sel);
      default:  y = b;
    endcase
  end

  assign z  = (y == 8'd0);
  assign sf = b[bit_sel];

endmodule
