// vmcore_cfg: the configuration controller (a small CPLD beside the FPGA).
//
// After power-on reset it copies the FPGA configuration file from the System
// Flash ROM into the FPGA's configuration port, then hands the flash bus to
// the running microcontroller. It owns the flash bus (bus_own = 1) from
// reset until configuration is done.
//
// Sequence:
//   1. nconfig is pulled low for NCFG_CLKS clocks, which clears the FPGA;
//      the controller then waits for the FPGA to release nstatus.
//   2. For each of the CFG_BYTES bytes, starting at flash address CFG_BASE:
//      the address is put on sfr_addr with sfr_ce_n/sfr_oe_n low, and after
//      RD_CLKS clocks the byte is taken from sfr_din. Its eight bits are then
//      sent least significant first on data0, each with one dclk period:
//      DCLK_HALF clocks low, then DCLK_HALF clocks high. The FPGA takes data0
//      on the rising dclk edge.
//   3. Up to INIT_CLKS further dclk periods are given while the controller
//      waits for conf_done (the FPGA's initialisation needs clocks).
//      conf_done high: done is set and the bus is released.
//      conf_done still low: error is set and the controller stops.
//   nstatus falling at any time during 2 or 3 reports a configuration error
//   from the FPGA; the controller starts again at step 1, up to RETRIES
//   times, then sets error.
//
// The controller's function (copy the configuration file from the flash into
// the FPGA after reset) follows the source design. The port protocol is the
// passive-serial scheme of the ACEX-family FPGA the design was built on; the
// file size default (98,048 bytes, the EP1K50 configuration bit-stream), its
// place at the bottom of the flash, the read timing and the retry count are
// choices made here. It runs from the board clock.
module vmcore_cfg #(
  parameter int unsigned  CFG_BYTES = 98_048,
  parameter logic [27:0]  CFG_BASE  = 28'h0,
  parameter int unsigned  NCFG_CLKS = 4,
  parameter int unsigned  RD_CLKS   = 2,
  parameter int unsigned  DCLK_HALF = 1,
  parameter int unsigned  INIT_CLKS = 64,
  parameter int unsigned  RETRIES   = 3
) (
  input  logic        clk,
  input  logic        rst_n,       // power-on reset
  // System Flash ROM bus (valid while bus_own)
  output logic        bus_own,
  output logic [27:0] sfr_addr,
  output logic        sfr_ce_n,
  output logic        sfr_oe_n,
  input  logic [7:0]  sfr_din,
  // FPGA passive-serial configuration port
  output logic        nconfig,
  input  logic        nstatus,
  output logic        dclk,
  output logic        data0,
  input  logic        conf_done,
  // status
  output logic        done,
  output logic        error
);

  typedef enum logic [2:0] {S_CLEAR, S_WAIT, S_READ, S_SHIFT, S_INIT, S_DONE, S_ERROR} state_e;

  localparam int unsigned CW = $clog2(NCFG_CLKS + RD_CLKS + 2 * DCLK_HALF + 2);
  localparam int unsigned NW = $clog2(CFG_BYTES + 1);
  localparam int unsigned IW = $clog2(INIT_CLKS + 1);
  localparam int unsigned RW = $clog2(RETRIES + 2);

  state_e        state;
  logic [CW-1:0] cnt;       // clocks within the current step
  logic [NW-1:0] nbytes;    // bytes sent
  logic [2:0]    nbit;      // bit of the current byte
  logic [7:0]    sh;        // byte being sent
  logic [IW-1:0] ninit;     // extra dclk periods given
  logic [RW-1:0] tries;

  assign bus_own  = (state != S_DONE) && (state != S_ERROR);
  assign sfr_addr = CFG_BASE + 28'(nbytes);
  assign sfr_ce_n = (state != S_READ);
  assign sfr_oe_n = (state != S_READ);
  assign nconfig  = (state != S_CLEAR);
  assign data0    = sh[0];
  assign done     = (state == S_DONE);
  assign error    = (state == S_ERROR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_CLEAR;
      cnt    <= '0;
      nbytes <= '0;
      nbit   <= '0;
      sh     <= '0;
      ninit  <= '0;
      tries  <= '0;
      dclk   <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      unique case (state)
        S_CLEAR: begin
          dclk   <= 1'b0;
          nbytes <= '0;
          ninit  <= '0;
          if (cnt == CW'(NCFG_CLKS - 1)) begin
            state <= S_WAIT;
            cnt   <= '0;
          end
        end
        S_WAIT: if (nstatus) begin
          state <= S_READ;
          cnt   <= '0;
        end
        S_READ: begin
          if (cnt == CW'(RD_CLKS - 1)) begin
            sh    <= sfr_din;
            nbit  <= '0;
            state <= S_SHIFT;
            cnt   <= '0;
          end
        end
        S_SHIFT: begin
          // dclk low for DCLK_HALF clocks, then high for DCLK_HALF clocks
          if (cnt == CW'(DCLK_HALF - 1)) dclk <= 1'b1;
          if (cnt == CW'(2 * DCLK_HALF - 1)) begin
            dclk <= 1'b0;
            cnt  <= '0;
            sh   <= {1'b0, sh[7:1]};
            nbit <= nbit + 1'b1;
            if (nbit == 3'd7) begin
              nbytes <= nbytes + 1'b1;
              state  <= (nbytes == NW'(CFG_BYTES - 1)) ? S_INIT : S_READ;
            end
          end
        end
        S_INIT: begin
          if (conf_done) begin
            state <= S_DONE;
            dclk  <= 1'b0;
          end else begin
            if (cnt == CW'(DCLK_HALF - 1)) dclk <= 1'b1;
            if (cnt == CW'(2 * DCLK_HALF - 1)) begin
              dclk  <= 1'b0;
              cnt   <= '0;
              ninit <= ninit + 1'b1;
              if (ninit == IW'(INIT_CLKS - 1)) state <= S_ERROR;
            end
          end
        end
        S_DONE, S_ERROR: begin
          cnt  <= cnt;
          dclk <= 1'b0;
        end
        default: state <= S_ERROR;
      endcase
      // the FPGA reports a bad bit-stream: start again or give up
      if (!nstatus && (state == S_READ || state == S_SHIFT || state == S_INIT)) begin
        cnt  <= '0;
        dclk <= 1'b0;
        if (tries == RW'(RETRIES)) begin
          state <= S_ERROR;
        end else begin
          tries <= tries + 1'b1;
          state <= S_CLEAR;
        end
      end
    end
  end

endmodule
