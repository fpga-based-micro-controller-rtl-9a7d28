// vmcore: VMCore, an FPGA microcontroller for voice-message synthesis.
//
// An 8-bit Harvard, accumulator-type RISC core with the peripherals a
// voice-message system needs. Messages are assembled from recorded words and
// phrases kept, compressed by adaptive delta modulation, in an external
// System Flash ROM (SFR). The host sends text over the UART; the program
// finds the primitives, reads them from the flash through the address
// registers AR0/AR1 and feeds them to the MADM decoder, which plays them
// through a serial DAC at 11025 samples/s. Port A is a general 8-bit port
// for interactive applications.
//
// Datapath (one instruction per machine cycle, next one prefetched):
//   PM --> IR --> CU        IR_L gives the FR address or immediate data
//   FR --DOUT--> A_mux/B_mux --> ALU --DIN--> FR, AR0, AR1
//   AR0/AR1 --Addr_Mux--> SFR address bus; SFR data bus --> B_mux;
//   DOUT --> SFR data bus for flash programming
//   PC <-- {PC, absolute address, PCST top, interrupt vector}
//
// Ports: clk (20 MHz in the source design) and an active-low asynchronous
// reset; the UART pins; Port A as separate input, output-latch and
// output-enable vectors (the pad is outside); the three DAC pins; and the SFR
// bus as address, data-in, data-out with its drive enable, and the active-low
// ce/oe/we strobes. The flash, the DAC chip and the pads are not part of
// this module.
//
// Lint notes: step, ar0, ar1 and the decoder's sample outputs are kept as
// named signals for observation and drive nothing; the PC stack's count,
// full and empty outputs and a few control-word fields are not needed by
// this core and are left open. core_rst_n is both the asynchronous reset
// and the disable condition of the stack's push/pull assertion, which is
// why a linter sees it used both ways.
//
// The watchdog's timeout resets the rest of the core for one clock. The
// structure follows the source design's block diagram; the port list, the
// reset scheme and the default baud rate are choices made here.
module vmcore
  import vmcore_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 20_000_000,
  parameter int unsigned CLK_PER_MC = 5,
  parameter int unsigned PC_W       = 9,
  parameter int unsigned PCST_DEPTH = 4,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned FS_HZ      = 11_025,
  parameter int unsigned WDT_W      = 16,
  parameter string       PM_INIT    = ""
) (
  input  logic        clk,
  input  logic        rst_n,
  // serial port
  input  logic        uart_rxd,
  output logic        uart_txd,
  // Port A
  input  logic [7:0]  porta_in,
  output logic [7:0]  porta_out,
  output logic [7:0]  porta_oe,
  // serial DAC
  output logic        dac_sck,
  output logic        dac_sdi,
  output logic        dac_cs_ld,
  // System Flash ROM bus
  output logic [27:0] sfr_addr,
  input  logic [7:0]  sfr_din,
  output logic [7:0]  sfr_dout,
  output logic        sfr_drive,
  output logic        sfr_ce_n,
  output logic        sfr_oe_n,
  output logic        sfr_we_n
);

  // ------------------------------------------------------------- reset
  logic wdt_timeout;
  logic core_rst_n;
  assign core_rst_n = rst_n && !wdt_timeout;

  // ---------------------------------------------------------- signals
  ctrl_t            ctrl;
  seq_t             seq;
  logic             mc_en;
  logic [1:0]       step;
  logic [15:0]      ir;
  logic [15:0]      pm_data;
  logic [PC_W-1:0]  pc, fetch_addr, pcst_top;
  logic [7:0]       dout, din, alu_a, alu_b;
  logic             alu_c, alu_z, alu_sf;
  logic [7:0]       r0, r1, r2, acc, sr, intcr;
  logic [8:0]       fr_raddr, fr_waddr;
  logic             advance;
  logic [7:0]       uart_rdata, iosr, porta_rdata, madm_status;
  logic             uart_wr, uart_rd, dac_wr, porta_wr, madm_wr;
  logic             tx_busy, rx_ready, rx_overrun;
  logic             madm_req, madm_running, dac_busy;
  logic             madm_sample_valid;
  logic [8:0]       madm_sample;
  logic [27:0]      ar0;
  logic [15:0]      ar1;

  assign advance = mc_en && !ctrl.hold;

  // ---------------------------------------------------------- control
  vmcore_cu #(.CLK_PER_MC(CLK_PER_MC)) u_cu (
    .clk       (clk),
    .rst_n     (core_rst_n),
    .ir        (ir),
    .alu_z     (alu_z),
    .sf        (alu_sf),
    .intcr     (intcr),
    .irq_rx    (rx_ready),
    .irq_tx    (!tx_busy),
    .irq_madm  (madm_req),
    .ctrl      (ctrl),
    .seq       (seq),
    .mc_en     (mc_en),
    .step      (step),
    .sfr_ce_n  (sfr_ce_n),
    .sfr_oe_n  (sfr_oe_n),
    .sfr_we_n  (sfr_we_n),
    .sfr_drive (sfr_drive)
  );

  // ------------------------------------------------------------ fetch
  vmcore_pc #(.PC_W(PC_W)) u_pc (
    .clk        (clk),
    .rst_n      (core_rst_n),
    .advance    (advance),
    .sel        (seq.fetch_sel),
    .abs_addr   (ir[13:0]),
    .pull_addr  (pcst_top),
    .fetch_addr (fetch_addr),
    .pc         (pc)
  );

  vmcore_pcst #(.PC_W(PC_W), .DEPTH(PCST_DEPTH)) u_pcst (
    .clk   (clk),
    .rst_n (core_rst_n),
    .push  (mc_en && seq.push),
    .pull  (mc_en && ctrl.pull),
    .din   (seq.push_abs ? ir[PC_W-1:0] : pc),
    .top   (pcst_top),
    .count (),
    .full  (),
    .empty ()
  );

  vmcore_pm #(.PC_W(PC_W), .INIT_FILE(PM_INIT)) u_pm (
    .addr (fetch_addr),
    .data (pm_data)
  );

  vmcore_ir u_ir (
    .clk     (clk),
    .rst_n   (core_rst_n),
    .en      (mc_en),
    .load    (!ctrl.hold),
    .bubble  (seq.bubble),
    .count   (ctrl.ir_count),
    .pm_data (pm_data),
    .ir      (ir)
  );

  // -------------------------------------------------- File Register
  always_comb begin
    unique case (ctrl.ra_sel)
      RA_R0_FR:  fr_raddr = {1'b0, r0};
      RA_R0_RAM: fr_raddr = {1'b1, r0};
      RA_R1A:    fr_raddr = {1'b0, r1 + acc};
      RA_R2_RAM: fr_raddr = {1'b1, r2};
      default:   fr_raddr = {1'b0, ir[7:0]};
    endcase
    unique case (ctrl.wa_sel)
      WA_ACC:    fr_waddr = {1'b0, FR_ACC};
      WA_R0:     fr_waddr = {1'b0, FR_R0};
      WA_R0_FR:  fr_waddr = {1'b0, r0};
      WA_R0_RAM: fr_waddr = {1'b1, r0};
      WA_R2_RAM: fr_waddr = {1'b1, r2};
      default:   fr_waddr = {1'b0, ir[7:0]};
    endcase
  end

  vmcore_file_reg u_fr (
    .clk         (clk),
    .rst_n       (core_rst_n),
    .raddr       (fr_raddr),
    .rd          (mc_en && ctrl.fr_rd),
    .dout        (dout),
    .we          (mc_en && ctrl.fr_we),
    .waddr       (fr_waddr),
    .wdata       (din),
    .c_we        (mc_en && ctrl.c_we),
    .c_in        (alu_c),
    .z_we        (mc_en && ctrl.z_we),
    .z_in        (alu_z),
    .bf_we       (mc_en && ctrl.bf_we),
    .bf_in       (alu_sf),
    .ien_set     (mc_en && ctrl.ien_set),
    .ien_clr     (mc_en && seq.ien_clr),
    .r0          (r0),
    .r1          (r1),
    .r2          (r2),
    .acc         (acc),
    .sr          (sr),
    .intcr       (intcr),
    .uart_rdata  (uart_rdata),
    .iosr_rdata  (iosr),
    .porta_rdata (porta_rdata),
    .madm_rdata  (madm_status),
    .uart_wr     (uart_wr),
    .uart_rd     (uart_rd),
    .dac_wr      (dac_wr),
    .porta_wr    (porta_wr),
    .madm_wr     (madm_wr)
  );

  // -------------------------------------------------------------- ALU
  always_comb begin
    alu_a = (ctrl.a_sel == AMUX_DOUT) ? dout : acc;
    unique case (ctrl.b_sel)
      BMUX_IMM:  alu_b = ir[7:0];
      BMUX_DBUS: alu_b = sfr_din;
      BMUX_ZERO: alu_b = 8'd0;
      BMUX_ONE:  alu_b = 8'd1;
      default:   alu_b = dout;
    endcase
  end

  vmcore_alu u_alu (
    .op      (ctrl.alu_op),
    .a       (alu_a),
    .b       (alu_b),
    .cin     (sr[SR_C]),
    .bit_sel (ir[10:8]),
    .y       (din),
    .c_out   (alu_c),
    .z       (alu_z),
    .sf      (alu_sf)
  );

  // ------------------------------------------------ address registers
  vmcore_addr_regs u_ar (
    .clk       (clk),
    .rst_n     (core_rst_n),
    .en        (mc_en),
    .din       (din),
    .ar0_load  (ctrl.ar0_load),
    .ar1_load  (ctrl.ar1_load),
    .idx       (ctrl.ar_idx),
    .ar0_inc   (ctrl.ar0_inc),
    .ar1_shift (ctrl.ar1_shift),
    .bf        (sr[SR_BF]),
    .sel_ar1   (ctrl.addr_ar1),
    .addr      (sfr_addr),
    .ar0       (ar0),
    .ar1       (ar1)
  );

  assign sfr_dout = dout;

  // ------------------------------------------------------ peripherals
  vmcore_uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk        (clk),
    .rst_n      (core_rst_n),
    .tx_start   (mc_en && uart_wr),
    .tx_data    (din),
    .tx_busy    (tx_busy),
    .txd        (uart_txd),
    .rxd        (uart_rxd),
    .rx_read    (uart_rd),
    .rx_data    (uart_rdata),
    .rx_ready   (rx_ready),
    .rx_overrun (rx_overrun)
  );

  vmcore_porta u_porta (
    .clk     (clk),
    .rst_n   (core_rst_n),
    .wr      (porta_wr),
    .wdata   (din),
    .rdata   (porta_rdata),
    .pin_in  (porta_in),
    .pin_out (porta_out),
    .pin_oe  (porta_oe)
  );

  vmcore_madm #(.CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ)) u_madm (
    .clk          (clk),
    .rst_n        (core_rst_n),
    .code_wr      (madm_wr),
    .dac_wr       (dac_wr),
    .wdata        (din),
    .status       (madm_status),
    .req          (madm_req),
    .running      (madm_running),
    .dac_busy     (dac_busy),
    .sample_valid (madm_sample_valid),
    .sample       (madm_sample),
    .dac_sck      (dac_sck),
    .dac_sdi      (dac_sdi),
    .dac_cs_ld    (dac_cs_ld)
  );

  always_comb begin
    iosr          = '0;
    iosr[IO_RXR]  = rx_ready;
    iosr[IO_TXB]  = tx_busy;
    iosr[IO_OVR]  = rx_overrun;
    iosr[IO_MREQ] = madm_req;
    iosr[IO_DACB] = dac_busy;
  end

  // ---------------------------------------------------------- watchdog
  vmcore_wdt #(.WDT_W(WDT_W)) u_wdt (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (mc_en),
    .enable  (intcr[INT_WDTE]),
    .clr     (ctrl.wdt_clr),
    .timeout (wdt_timeout)
  );

endmodule
