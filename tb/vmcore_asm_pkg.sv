// vmcore_asm_pkg: instruction encoders for VMCore test programs.
//
// Each function returns the 16-bit word of one instruction so that a
// testbench can write its program as a list of calls, e.g.
//   prog[0] = i_op(OP_MOV_A_IMM, 8'h12);  prog[1] = i_goto(14'h10);
package vmcore_asm_pkg;
  import vmcore_pkg::*;

  // format 00: OPC in 13:8, FR address or immediate in 7:0
  function automatic logic [15:0] i_op(opc_e opc, logic [7:0] operand = 8'h00);
    return {FMT_OP, opc, operand};
  endfunction

  // format 01: bit operation in 13:11, bit number in 10:8, FR address in 7:0
  function automatic logic [15:0] i_bit(bop_e bop, logic [2:0] bitno, logic [7:0] fr);
    return {FMT_BIT, bop, bitno, fr};
  endfunction

  function automatic logic [15:0] i_call(logic [13:0] target);
    return {FMT_CALL, target};
  endfunction

  function automatic logic [15:0] i_goto(logic [13:0] target);
    return {FMT_GOTO, target};
  endfunction
endpackage
