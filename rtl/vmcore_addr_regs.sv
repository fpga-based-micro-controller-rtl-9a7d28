// vmcore_addr_regs: the SFR address registers AR0 and AR1 and Addr_Mux.
//
// AR0 (28 bits) is a counter with parallel load; it points into the System
// Flash ROM (SFR) for indirect reads and for programming the flash. AR1
// (16 bits) is a shift register with parallel load; it points at the area of
// the SFR that holds the decompression error-correction coefficients.
// Both are loaded a byte at a time from DIN: byte i of AR0 (i = 0..3, the top
// byte only 4 bits wide) or of AR1 (i = 0..1) comes from FR register Rn+i,
// one byte per machine cycle, as the source design's timing of MOVE AR0,Rn
// shows (Rn -> bits 7:0, Rn+1 -> 15:8, Rn+2 -> 23:16, Rn+3 -> 27:24).
//
// The address bus shows the register's next value whenever the current
// instruction increments AR0 or shifts AR1, so "MOV Rn,(AR0+1)" reads
// SFR[AR0+1] and leaves AR0 incremented, and "MOV Rn,(AR1<<BF)" reads at the
// shifted AR1 and keeps it. AR1 shifts left with BF entering bit 0: the
// instruction table writes the operation as AR1<<BF, while the prose calls
// AR1 a right shift register; the instruction's own definition is followed.
// AR1 is placed in the 28-bit SFR space at AR1_BASE (a choice made here).
// Register updates happen at the clock edge while en (the machine-cycle
// strobe) is high.
module vmcore_addr_regs
  import vmcore_pkg::*;
#(
  parameter logic [27:0] AR1_BASE = 28'h0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [7:0]   din,
  input  logic         ar0_load,
  input  logic         ar1_load,
  input  logic [1:0]   idx,
  input  logic         ar0_inc,
  input  logic         ar1_shift,
  input  logic         bf,
  input  logic         sel_ar1,   // Addr_Mux: 0 = AR0, 1 = AR1
  output logic [27:0]  addr,      // external address bus
  output logic [27:0]  ar0,
  output logic [15:0]  ar1
);

  logic [27:0] ar0_next;
  logic [15:0] ar1_next;

  assign ar0_next = ar0_inc   ? ar0 + 28'd1      : ar0;
  assign ar1_next = ar1_shift ? {ar1[14:0], bf}  : ar1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar0 <= '0;
      ar1 <= '0;
    end else if (en) begin
      if (ar0_load) begin
        unique case (idx)
          2'd0: ar0[7:0]   <= din;
          2'd1: ar0[15:8]  <= din;
          2'd2: ar0[23:16] <= din;
          2'd3: ar0[27:24] <= din[3:0];
        endcase
      end else begin
        ar0 <= ar0_next;
      end
      if (ar1_load) begin
        if (idx[0]) ar1[15:8] <= din;
        else        ar1[7:0]  <= din;
      end else begin
        ar1 <= ar1_next;
      end
    end
  end

  assign addr = sel_ar1 ? (AR1_BASE | {12'd0, ar1_next}) : ar0_next;

endmodule
