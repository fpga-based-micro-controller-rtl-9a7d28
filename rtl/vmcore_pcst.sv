// vmcore_pcst: PC stack (PCST).
//
// Return addresses of subroutine calls and interrupts are kept in DEPTH
// registers, four in the source design, which allows two nested calls and
// two nested interrupts. A push shifts every entry one place down and puts
// the new address on top; a pull shifts them up and the top is what RET/RETI
// jump to. Pushing onto a full stack loses the oldest entry; pulling from an
// empty stack returns whatever the bottom register holds (zero after reset).
// Those two cases, and the shift-register organisation, are choices made
// here. push and pull are sampled at the clock edge; the caller qualifies
// them with the machine-cycle strobe. count tells how many entries are valid.
module vmcore_pcst #(
  parameter int unsigned PC_W  = 9,
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic                     pull,
  input  logic [PC_W-1:0]          din,
  output logic [PC_W-1:0]          top,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                     full,
  output logic                     empty
);

  logic [PC_W-1:0] st [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) st[i] <= '0;
      count <= '0;
    end else if (push) begin
      st[0] <= din;
      for (int i = 1; i < DEPTH; i++) st[i] <= st[i-1];
      if (!full) count <= count + 1'b1;
    end else if (pull) begin
      for (int i = 0; i < DEPTH-1; i++) st[i] <= st[i+1];
      st[DEPTH-1] <= '0;
      if (!empty) count <= count - 1'b1;
    end
  end

  assign top   = st[0];
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty = (count == '0);

  // a call or interrupt never coincides with a return
  a_no_push_pull: assert property (@(posedge clk) disable iff (!rst_n) !(push && pull));

endmodule
