// vmcore_file_reg: the VMCore File Register (FR) and its output mux Dout_mux.
//
// All system, I/O and general-purpose registers share one 512-byte address
// space:
//   000-003 R0-R3        004 accumulator A     005 status register SR
//   006 INTCR            007 R7                008 UART TxD (w) / RxD (r)
//   009 DAC (w) / IO_SR (r)  00A PORTA         00B-00E R0B-R0E
//   00F MADM decoder     010-0FF general-purpose registers (RAM)
//   100-1FF System RAM (reached only through the indirect RAM-scope moves)
// The registers at 000-00F are flip-flops; 010-1FF is one 512x8 RAM array
// (of which the lowest 16 bytes are unused) standing for the single embedded
// array block of the source design. The I/O registers at 008, 009, 00A and
// 00F live in the peripheral controllers: this module forwards their write
// and read strobes and multiplexes their read data into DOUT.
//
// Interface: one combinational read port (raddr -> dout) and one write port
// (we, waddr, wdata = DIN) that takes effect at the clock edge while we is
// high. The caller qualifies we, rd and the flag updates with the
// machine-cycle strobe. Flag updates from the ALU (C, Z, BF) and IEN
// set/clear from the control unit are separate inputs; a direct write of SR
// or INTCR in the same cycle wins over them.
//
// The map follows the source design; bit positions inside SR, INTCR and
// IO_SR, the reset values (all zero) and the write-wins priority are choices
// made here. The RAM has no reset.
module vmcore_file_reg
  import vmcore_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // read port (Dout_mux)
  input  logic [8:0]  raddr,
  input  logic        rd,          // strobe: the read is consumed this cycle
  output logic [7:0]  dout,
  // write port (DIN)
  input  logic        we,
  input  logic [8:0]  waddr,
  input  logic [7:0]  wdata,
  // flag updates
  input  logic        c_we,
  input  logic        c_in,
  input  logic        z_we,
  input  logic        z_in,
  input  logic        bf_we,
  input  logic        bf_in,
  input  logic        ien_set,
  input  logic        ien_clr,
  // system registers seen by the rest of the core
  output logic [7:0]  r0,
  output logic [7:0]  r1,
  output logic [7:0]  r2,
  output logic [7:0]  acc,
  output logic [7:0]  sr,
  output logic [7:0]  intcr,
  // I/O registers held in the peripherals
  input  logic [7:0]  uart_rdata,
  input  logic [7:0]  iosr_rdata,
  input  logic [7:0]  porta_rdata,
  input  logic [7:0]  madm_rdata,
  output logic        uart_wr,
  output logic        uart_rd,
  output logic        dac_wr,
  output logic        porta_wr,
  output logic        madm_wr
);

  logic [7:0] sysreg [16];      // 000-00F; entries 8,9,10,15 are unused
  logic [7:0] ram    [512];     // 010-1FF

  logic w_sys, w_ram;
  assign w_sys = we && (waddr[8:4] == 5'd0);
  assign w_ram = we && (waddr[8:4] != 5'd0);

  // flip-flop registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) sysreg[i] <= '0;
    end else begin
      if (w_sys) sysreg[waddr[3:0]] <= wdata;
      // flags and IEN unless SR / INTCR is written directly this cycle
      if (!(w_sys && waddr[3:0] == FR_SR[3:0])) begin
        if (c_we)  sysreg[FR_SR[3:0]][SR_C]  <= c_in;
        if (z_we)  sysreg[FR_SR[3:0]][SR_Z]  <= z_in;
        if (bf_we) sysreg[FR_SR[3:0]][SR_BF] <= bf_in;
      end
      if (!(w_sys && waddr[3:0] == FR_INTCR[3:0])) begin
        if (ien_clr)      sysreg[FR_INTCR[3:0]][INT_IEN] <= 1'b0;
        else if (ien_set) sysreg[FR_INTCR[3:0]][INT_IEN] <= 1'b1;
      end
    end
  end

  // RAM-based general registers and System RAM
  always_ff @(posedge clk) begin
    if (w_ram) ram[waddr] <= wdata;
  end

  // Dout_mux
  always_comb begin
    if (raddr[8:4] != 5'd0) begin
      dout = ram[raddr];
    end else begin
      unique case (raddr[3:0])
        FR_UART[3:0]:  dout = uart_rdata;
        FR_DAC[3:0]:   dout = iosr_rdata;
        FR_PORTA[3:0]: dout = porta_rdata;
        FR_MADM[3:0]:  dout = madm_rdata;
        default:       dout = sysreg[raddr[3:0]];
      endcase
    end
  end

  assign uart_wr  = w_sys && (waddr[3:0] == FR_UART[3:0]);
  assign dac_wr   = w_sys && (waddr[3:0] == FR_DAC[3:0]);
  assign porta_wr = w_sys && (waddr[3:0] == FR_PORTA[3:0]);
  assign madm_wr  = w_sys && (waddr[3:0] == FR_MADM[3:0]);
  assign uart_rd  = rd && (raddr == {1'b0, FR_UART});

  assign r0    = sysreg[FR_R0[3:0]];
  assign r1    = sysreg[FR_R1[3:0]];
  assign r2    = sysreg[FR_R2[3:0]];
  assign acc   = sysreg[FR_ACC[3:0]];
  assign sr    = sysreg[FR_SR[3:0]];
  assign intcr = sysreg[FR_INTCR[3:0]];

endmodule
