// tb_vmcore_playback: real-time voice playback on the microcontroller at its
// default parameters (20 MHz, 5 clocks per machine cycle, 11025 samples/s).
//
// A program streams one compressed voice primitive of NBYTES code bytes
// from the flash into the MADM decoder, the way message synthesis works:
// the main program points AR0 just below the primitive, sends the first
// byte and enables the decoder's request interrupt; the interrupt routine
// sends the next byte with one MOV 00F,(AR0+1), counts with DSZ, and on the
// last byte switches its own interrupt off. Everything else is idle time.
//
// Checks: every one of the NBYTES*8 samples that reaches the DAC equals the
// output of a reference adaptive delta modulation decoder written here;
// consecutive samples are exactly round(CLK_HZ/FS_HZ) = 1814 clocks apart
// (so the core keeps up in real time); the decoder plays the whole
// primitive in one run, never running out of data before the end; and the
// number of interrupts equals the bytes sent by the routine.
module tb_vmcore_playback;
  import vmcore_pkg::*;
  import vmcore_asm_pkg::*;

  localparam int NBYTES = 200;
  localparam int DIVN   = 1814;
  localparam logic [15:0] PRIM = 16'h0200;   // primitive address in the flash

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        uart_txd;
  logic [7:0]  porta_out, porta_oe;
  logic        dac_sck, dac_sdi, dac_cs_ld;
  logic [27:0] sfr_addr;
  logic [7:0]  sfr_din, sfr_dout;
  logic        sfr_drive, sfr_ce_n, sfr_oe_n, sfr_we_n;
  int checks = 0, failures = 0;

  always #25ns clk = ~clk;

  vmcore dut (
    .clk, .rst_n, .uart_rxd(1'b1), .uart_txd, .porta_in(8'hFF), .porta_out, .porta_oe,
    .dac_sck, .dac_sdi, .dac_cs_ld,
    .sfr_addr, .sfr_din, .sfr_dout, .sfr_drive, .sfr_ce_n, .sfr_oe_n, .sfr_we_n
  );

  vmcore_sfr_model #(.AW(16)) u_sfr (
    .addr (sfr_addr), .din (sfr_dout), .dout (sfr_din),
    .ce_n (sfr_ce_n), .oe_n (sfr_oe_n), .we_n (sfr_we_n)
  );

  vmcore_dac_model u_dac (.sck (dac_sck), .sdi (dac_sdi), .cs_ld (dac_cs_ld));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (NBYTES * 8 * DIVN + 200_000) @(posedge clk);
    failures++;
    $display("timeout: %0d samples, %0d interrupts, pc %h, intcr %h, count %0d",
             n_samples, n_int, dut.pc, dut.intcr, dut.u_fr.ram[9'h024]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference decoder: step doubles on a repeated bit, halves on a change
  int ref_x = 0, ref_step = 8, ref_prev = 0;
  function automatic int ref_adm(int b);
    if (b == ref_prev) ref_step = (ref_step * 2 > 256) ? 256 : ref_step * 2;
    else               ref_step = (ref_step / 2 < 8) ? 8 : ref_step / 2;
    ref_prev = b;
    ref_x = b ? ref_x + ref_step : ref_x - ref_step;
    if (ref_x > 2047) ref_x = 2047;
    if (ref_x < -2048) ref_x = -2048;
    return (ref_x + 2048) / 8;
  endfunction

  // sample timing, interrupts and decoder runs
  longint n_clk = 0, last_sample = -1;
  int n_samples = 0, bad_period = 0, n_int = 0, n_runs = 0;
  logic run_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    n_clk++;
    if (dut.u_madm.sample_valid) begin
      if (last_sample >= 0 && n_clk - last_sample != DIVN) bad_period++;
      last_sample = n_clk;
      n_samples++;
    end
    if (dut.seq.int_taken && dut.mc_en) n_int++;
    if (dut.u_madm.running && !run_q) n_runs++;
    run_q = dut.u_madm.running;
  end

  int pa;
  task automatic emit(input logic [15:0] w);
    dut.u_pm.rom[pa] = w;
    pa++;
  endtask

  initial begin
    int exp_q [$];
    logic [7:0] prim [NBYTES];
    int mism = 0;

    for (int i = 0; i < NBYTES; i++) begin
      prim[i] = 8'($urandom);
      u_sfr.mem[PRIM + 16'(i)] = prim[i];
    end
    for (int i = 0; i < 512; i++) dut.u_pm.rom[i] = 16'h0000;
    dut.u_pm.rom[0] = i_goto(14'h010);
    dut.u_pm.rom[4] = i_goto(14'h080);
    // main: AR0 <- PRIM - 1 from FR 020..023, count in 024, first byte, enable
    pa = 'h010;
    emit(i_op(OP_MOV_A_IMM, 8'(PRIM - 1)));        emit(i_op(OP_MOV_RN_A, 8'h20));
    emit(i_op(OP_MOV_A_IMM, 8'((PRIM - 1) >> 8))); emit(i_op(OP_MOV_RN_A, 8'h21));
    emit(i_op(OP_CLR, 8'h22));
    emit(i_op(OP_CLR, 8'h23));
    emit(i_op(OP_MOV_AR0_RN, 8'h20));
    emit(i_op(OP_MOV_A_IMM, 8'(NBYTES - 1)));      emit(i_op(OP_MOV_RN_A, 8'h24));
    emit(i_op(OP_MOV_RN_AR0I, FR_MADM));             // first code byte starts playback
    emit(i_op(OP_MOV_A_IMM, 8'((1 << INT_IEN) | (1 << INT_EMD))));
    emit(i_op(OP_MOV_RN_A, FR_INTCR));
    emit(i_goto(14'(pa)));                           // idle
    // interrupt routine
    pa = 'h080;
    emit(i_op(OP_MOV_RN_AR0I, FR_MADM));             // next code byte
    emit(i_op(OP_DSZ, 8'h24));
    emit(i_goto(14'h084));
    emit(i_bit(BOP_CLRB, 3'(INT_EMD), FR_INTCR));    // last byte sent
    emit(i_op(OP_RETI));

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < NBYTES; i++)
      for (int j = 7; j >= 0; j--) exp_q.push_back(ref_adm(int'(prim[i][j])));

    wait (n_samples == NBYTES * 8);
    wait (!dut.u_madm.running);
    repeat (200) @(posedge clk);

    check(u_dac.log_q.size() == NBYTES * 8, $sformatf("%0d DAC loads", u_dac.log_q.size()));
    check(u_dac.bad_frames == 0, "DAC frames of 12 bits");
    for (int i = 0; i < NBYTES * 8 && i < u_dac.log_q.size(); i++) begin
      if (u_dac.log_q[i] != 12'(exp_q[i] * 8)) begin
        mism++;
        if (mism <= 5) $display("sample %0d: %03x, expected %03x", i, u_dac.log_q[i], exp_q[i] * 8);
      end
    end
    check(mism == 0, $sformatf("%0d samples differ from the reference decoder", mism));
    check(n_samples == NBYTES * 8, $sformatf("%0d samples decoded", n_samples));
    check(bad_period == 0, $sformatf("%0d sample periods not %0d clocks", bad_period, DIVN));
    check(n_runs == 1, $sformatf("decoder started %0d times (ran dry in between)", n_runs));
    check(n_int == NBYTES - 1, $sformatf("%0d interrupts for %0d bytes", n_int, NBYTES - 1));
    check(dut.u_fr.ram[9'h024] == 8'h00, "byte counter reached zero");
    check(dut.ar0 == 28'(PRIM + NBYTES - 1), $sformatf("AR0 = %h", dut.ar0));
    $display("playback: %0d bytes, %0d samples, %0d interrupts, %0d clocks", NBYTES, n_samples, n_int, n_clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
