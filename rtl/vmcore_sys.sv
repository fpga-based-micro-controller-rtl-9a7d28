// vmcore_sys: the voice-message system: configuration controller plus
// microcontroller, sharing the System Flash ROM.
//
// At power-on (rst_n) the configuration controller owns the flash bus and
// loads the FPGA from the configuration file at the bottom of the flash,
// through the passive-serial port (nconfig, nstatus, dclk, data0,
// conf_done). The microcontroller is held in reset until the controller
// reports done; the controller then releases the flash bus to it for good.
// If configuration fails, cfg_error is set and the core stays in reset.
// After that the system behaves exactly as vmcore: its UART, Port A, DAC and
// flash pins are passed through.
//
// The split into a controller beside the FPGA and the microcontroller in it
// follows the source design's system picture. In hardware the two are
// separate chips on one flash bus; here the bus is shared through a
// multiplexer, and "the FPGA starts after configuration" is modelled by
// holding the core in reset until done. Those two modelling points, and the
// parameters of vmcore_cfg, are choices made here.
module vmcore_sys #(
  parameter int unsigned CLK_HZ     = 20_000_000,
  parameter int unsigned CLK_PER_MC = 5,
  parameter int unsigned PC_W       = 9,
  parameter int unsigned PCST_DEPTH = 4,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned FS_HZ      = 11_025,
  parameter int unsigned WDT_W      = 16,
  parameter string       PM_INIT    = "",
  parameter int unsigned CFG_BYTES  = 98_048,
  parameter logic [27:0] CFG_BASE   = 28'h0
) (
  input  logic        clk,
  input  logic        rst_n,       // power-on reset
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
  output logic        sfr_we_n,
  // FPGA configuration port
  output logic        cfg_nconfig,
  input  logic        cfg_nstatus,
  output logic        cfg_dclk,
  output logic        cfg_data0,
  input  logic        cfg_conf_done,
  // configuration status
  output logic        cfg_done,
  output logic        cfg_error
);

  logic        cfg_own, cfg_ce_n, cfg_oe_n;
  logic [27:0] cfg_addr;
  logic [27:0] core_addr;
  logic [7:0]  core_dout;
  logic        core_drive, core_ce_n, core_oe_n, core_we_n;
  logic        core_rst_n;

  vmcore_cfg #(
    .CFG_BYTES (CFG_BYTES),
    .CFG_BASE  (CFG_BASE)
  ) u_cfg (
    .clk,
    .rst_n,
    .bus_own   (cfg_own),
    .sfr_addr  (cfg_addr),
    .sfr_ce_n  (cfg_ce_n),
    .sfr_oe_n  (cfg_oe_n),
    .sfr_din,
    .nconfig   (cfg_nconfig),
    .nstatus   (cfg_nstatus),
    .dclk      (cfg_dclk),
    .data0     (cfg_data0),
    .conf_done (cfg_conf_done),
    .done      (cfg_done),
    .error     (cfg_error)
  );

  assign core_rst_n = rst_n && cfg_done;

  vmcore #(
    .CLK_HZ     (CLK_HZ),
    .CLK_PER_MC (CLK_PER_MC),
    .PC_W       (PC_W),
    .PCST_DEPTH (PCST_DEPTH),
    .BAUD       (BAUD),
    .FS_HZ      (FS_HZ),
    .WDT_W      (WDT_W),
    .PM_INIT    (PM_INIT)
  ) u_core (
    .clk,
    .rst_n     (core_rst_n),
    .uart_rxd,
    .uart_txd,
    .porta_in,
    .porta_out,
    .porta_oe,
    .dac_sck,
    .dac_sdi,
    .dac_cs_ld,
    .sfr_addr  (core_addr),
    .sfr_din,
    .sfr_dout  (core_dout),
    .sfr_drive (core_drive),
    .sfr_ce_n  (core_ce_n),
    .sfr_oe_n  (core_oe_n),
    .sfr_we_n  (core_we_n)
  );

  // flash bus: the controller until configuration ends, then the core
  always_comb begin
    if (cfg_own) begin
      sfr_addr  = cfg_addr;
      sfr_dout  = '0;
      sfr_drive = 1'b0;
      sfr_ce_n  = cfg_ce_n;
      sfr_oe_n  = cfg_oe_n;
      sfr_we_n  = 1'b1;
    end else begin
      sfr_addr  = core_addr;
      sfr_dout  = core_dout;
      sfr_drive = core_drive;
      sfr_ce_n  = core_ce_n;
      sfr_oe_n  = core_oe_n;
      sfr_we_n  = core_we_n;
    end
  end

endmodule
