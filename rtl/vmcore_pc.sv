// vmcore_pc: program counter with instruction prefetch.
//
// Instructions are fetched one machine cycle ahead: while the instruction in
// the IR executes, the program memory is read at the fetch address and the
// word is captured by the IR at the end of the cycle. The PC always holds the
// address that follows the last fetched word. The fetch address is chosen by
// the control unit among the four PC sources of the source design's block
// diagram: Prefetch (the PC itself), Goto/Call (the absolute address from the
// instruction), Pull (the top of the PC stack, for RET/RETI) and Int (the
// interrupt vector). On every advancing machine cycle PC <- fetch_addr + 1;
// with advance low (a multi-cycle instruction) the PC holds.
//
// The 9-bit width and the possibility to widen it to 14 bits follow the
// source design; the reset address 0 and the vector address INT_VECTOR are
// choices made here.
module vmcore_pc
  import vmcore_pkg::*;
#(
  parameter int unsigned     PC_W       = 9,
  parameter logic [PC_W-1:0] INT_VECTOR = PC_W'(4)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            advance,
  input  fetch_sel_e      sel,
  input  logic [13:0]     abs_addr,
  input  logic [PC_W-1:0] pull_addr,
  output logic [PC_W-1:0] fetch_addr,
  output logic [PC_W-1:0] pc
);

  always_comb begin
    unique case (sel)
      FETCH_PC:   fetch_addr = pc;
      FETCH_ABS:  fetch_addr = abs_addr[PC_W-1:0];
      FETCH_PULL: fetch_addr = pull_addr;
      FETCH_INT:  fetch_addr = INT_VECTOR;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       pc <= '0;
    else if (advance) pc <= fetch_addr + 1'b1;
  end

endmodule
