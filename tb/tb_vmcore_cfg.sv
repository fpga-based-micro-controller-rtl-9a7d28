// tb_vmcore_cfg: self-checking test of the configuration controller.
//
// A 40-byte bit-stream at flash address 0x123 is sent to the FPGA
// configuration-port model. The test checks: the nconfig pulse, that every
// byte arrives in order and least significant bit first, the number of
// clocks per byte (RD_CLKS + 8 dclk periods), that the flash is read only
// inside the bit-stream's address range, and that the bus is released and
// done is set at the end. A second run makes the FPGA report an error after
// byte 10: the controller must restart and then succeed. A third run never
// raises conf_done: the controller must stop with error set.
module tb_vmcore_cfg;
  localparam int NB = 40, RD = 2, DH = 1;
  localparam logic [27:0] BASE = 28'h123;

  logic clk = 0, rst_n = 0;
  logic bus_own, ce_n, oe_n, nconfig, nstatus, dclk, data0, conf_done, done, error;
  logic [27:0] addr;
  logic [7:0]  flash [1024];
  logic [7:0]  din;
  logic        block_done = 1'b0;   // hold conf_done low in the third run
  logic        m_nstatus, m_conf_done;
  int checks = 0, failures = 0;

  vmcore_cfg #(.CFG_BYTES(NB), .CFG_BASE(BASE), .NCFG_CLKS(4), .RD_CLKS(RD), .DCLK_HALF(DH),
               .INIT_CLKS(16), .RETRIES(3)) dut (
    .clk, .rst_n, .bus_own, .sfr_addr(addr), .sfr_ce_n(ce_n), .sfr_oe_n(oe_n), .sfr_din(din),
    .nconfig, .nstatus, .dclk, .data0, .conf_done, .done, .error);

  vmcore_fpga_cfg_model #(.NBYTES(NB), .NSTATUS_DLY(100ns)) u_fpga (
    .nconfig, .nstatus(m_nstatus), .dclk, .data0, .conf_done(m_conf_done));

  assign nstatus   = m_nstatus;
  assign conf_done = m_conf_done && !block_done;
  assign din       = flash[addr[9:0]];

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // flash reads stay inside the bit-stream
  int bad_reads = 0, reads_during_done = 0;
  always @(posedge clk) if (rst_n && !ce_n) begin
    if (addr < BASE || addr >= BASE + NB) bad_reads++;
    if (done) reads_during_done++;
  end

  initial begin : watchdog
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_check(input string tag, input int exp_nconfigs);
    check(done && !error && !bus_own, {tag, ": done, bus released"});
    check(u_fpga.bytes_q.size() == NB, $sformatf("%s: %0d bytes received", tag, u_fpga.bytes_q.size()));
    for (int i = 0; i < NB && i < u_fpga.bytes_q.size(); i++)
      check(u_fpga.bytes_q[i] == flash[BASE[9:0] + 10'(i)],
            $sformatf("%s: byte %0d = %02x, expected %02x", tag, i, u_fpga.bytes_q[i], flash[BASE[9:0] + 10'(i)]));
    check(u_fpga.nconfigs == exp_nconfigs, $sformatf("%s: %0d nconfig pulses", tag, u_fpga.nconfigs));
    check(bad_reads == 0, {tag, ": flash reads outside the bit-stream"});
  endtask

  initial begin
    time t0, t1;
    for (int i = 0; i < 1024; i++) flash[i] = 8'($urandom);
    // run 1: clean configuration, with timing
    repeat (3) @(posedge clk);
    rst_n = 1;
    // nconfig is low from reset and for NCFG_CLKS clocks after it
    check(nconfig == 1'b0, "nconfig low after reset");
    t0 = $time;
    wait (nconfig == 1'b1);
    check(($time - t0) >= 30 && ($time - t0) <= 40, $sformatf("nconfig low for %0t after reset", $time - t0));
    wait (u_fpga.bytes_q.size() == 1);
    t0 = $time;
    wait (u_fpga.bytes_q.size() == 2);
    t1 = $time;
    check((t1 - t0) == (RD + 8 * 2 * DH) * 10, $sformatf("one byte every %0t", t1 - t0));
    wait (done || error);
    repeat (20) @(posedge clk);
    run_check("run 1", 1);
    check(reads_during_done == 0 && ce_n && oe_n, "run 1: no flash access after done");

    // run 2: the FPGA flags an error at byte 10, the controller retries
    rst_n = 0;
    u_fpga.nconfigs = 0;
    for (int i = 0; i < 1024; i++) flash[i] = 8'($urandom);
    u_fpga.fail_at = 10;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done || error);
    repeat (5) @(posedge clk);
    run_check("run 2", 2);

    // run 3: conf_done never rises
    rst_n = 0;
    block_done = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done || error);
    repeat (5) @(posedge clk);
    check(error && !done && !bus_own, "run 3: error without conf_done");
    check(u_fpga.extra_clks == 16 && u_fpga.bytes_q.size() == NB,
          $sformatf("run 3: all bytes sent, then %0d init clocks", u_fpga.extra_clks));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
