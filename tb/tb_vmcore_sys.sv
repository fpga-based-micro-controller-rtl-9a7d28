// tb_vmcore_sys: end-to-end test of the whole voice-message system at its
// default parameters: configuration controller, microcontroller (20 MHz,
// 5 clocks per machine cycle, 115200 baud, 11025 samples/s, 16-bit
// watchdog) and the shared flash bus.
//
// Each power-on reset first runs a full configuration: the 98,048-byte
// bit-stream is read from the flash model and sent to an FPGA
// configuration-port model, and the test checks that every byte arrives,
// that it equals the flash contents, that the transfer takes
// 18 clocks per byte, and that the microcontroller starts only afterwards.
//
// Then, as in the core-level test:
// Phase 1 - instruction set. A random 512-word program (all 54 instructions,
// random operands, random jumps and calls) runs against an instruction-set
// model written here from the instruction table. At every completed
// instruction the model checks the instruction word the core executed, then
// the whole File Register (except the I/O registers), AR0, AR1 and every
// flash write. Values read from I/O registers and the decision to take an
// interrupt are taken from the core, everything else is computed here.
//
// Phase 2 - system. A directed program exercises Port A, the address
// registers, flash programming, nested calls, an interrupt-driven UART echo,
// direct DAC output, MADM playback of four code bytes from the flash, and a
// watchdog reset followed by a warm start (which does not reconfigure).
//
// Every mechanism (configuration, skip, interrupt, call nesting, multi-cycle
// loads, flash read/write, UART rx/tx, DAC, MADM playback, Port A, watchdog
// reset) is counted and must occur at least once.
module tb_vmcore_sys;
  import vmcore_pkg::*;
  import vmcore_asm_pkg::*;

  localparam int unsigned CLK_PER_MC = 5;
  localparam int unsigned BIT_CLKS   = 174;    // 20 MHz / 115200
  localparam int unsigned RANDOM_INSTRS = 6000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        uart_rxd = 1'b1;
  logic        uart_txd;
  logic [7:0]  porta_in = 8'hC3;
  logic [7:0]  porta_out, porta_oe;
  logic        dac_sck, dac_sdi, dac_cs_ld;
  logic [27:0] sfr_addr;
  logic [7:0]  sfr_din, sfr_dout;
  logic        sfr_drive, sfr_ce_n, sfr_oe_n, sfr_we_n;

  int checks = 0, failures = 0;

  always #25ns clk = ~clk;   // 20 MHz

  localparam int unsigned CFG_BYTES = 98_048;
  logic cfg_nconfig, cfg_nstatus, cfg_dclk, cfg_data0, cfg_conf_done, cfg_done, cfg_error;

  vmcore_sys dut (
    .clk, .rst_n, .uart_rxd, .uart_txd, .porta_in, .porta_out, .porta_oe,
    .dac_sck, .dac_sdi, .dac_cs_ld,
    .sfr_addr, .sfr_din, .sfr_dout, .sfr_drive, .sfr_ce_n, .sfr_oe_n, .sfr_we_n,
    .cfg_nconfig, .cfg_nstatus, .cfg_dclk, .cfg_data0, .cfg_conf_done, .cfg_done, .cfg_error
  );

  vmcore_fpga_cfg_model #(.NBYTES(CFG_BYTES)) u_fpga (
    .nconfig (cfg_nconfig), .nstatus (cfg_nstatus), .dclk (cfg_dclk), .data0 (cfg_data0),
    .conf_done (cfg_conf_done)
  );

  vmcore_sfr_model #(.AW(16)) u_sfr (
    .addr (sfr_addr), .din (sfr_dout), .dout (sfr_din),
    .ce_n (sfr_ce_n), .oe_n (sfr_oe_n), .we_n (sfr_we_n)
  );

  vmcore_dac_model u_dac (.sck (dac_sck), .sdi (dac_sdi), .cs_ld (dac_cs_ld));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ configuration
  int n_cfg = 0;
  task automatic configure();
    realtime t0;
    longint  clks;
    int mism = 0;
    t0 = $realtime;
    check(!dut.u_core.rst_n, "core held in reset during configuration");
    wait (cfg_done || cfg_error);
    clks = longint'(($realtime - t0) / 50ns);
    check(cfg_done && !cfg_error, "configuration done");
    check(u_fpga.bytes_q.size() == CFG_BYTES, $sformatf("%0d configuration bytes", u_fpga.bytes_q.size()));
    for (int i = 0; i < u_fpga.bytes_q.size(); i++)
      if (u_fpga.bytes_q[i] !== u_sfr.mem[16'(i)]) mism++;
    check(mism == 0, $sformatf("%0d configuration bytes differ from the flash", mism));
    // 18 clocks per byte plus the nconfig pulse and the wait for nstatus
    check(clks >= 18 * CFG_BYTES && clks <= 18 * CFG_BYTES + 20, $sformatf("configuration took %0d clocks", clks));
    n_cfg++;
  endtask

  // ------------------------------------------------------------ program
  logic [15:0] prog [512];

  task automatic load_program();
    for (int i = 0; i < 512; i++) dut.u_core.u_pm.rom[i] = prog[i];
  endtask

  // -------------------------------------------------- mechanism counters
  int n_skip = 0, n_int = 0, n_call = 0, n_ret = 0, n_reti = 0, max_depth = 0;
  int n_ar0_load = 0, n_ar1_load = 0, n_sfr_rd = 0, n_sfr_wr = 0;
  int n_ar0_inc = 0, n_ar1_shift = 0, n_wdt = 0, n_porta_wr = 0;
  int n_uart_tx = 0, n_uart_rx = 0, n_madm = 0;
  int n_bad_mc = 0;
  int hold_run = 0;
  int mc_gap = 0;

  always @(posedge clk) if (rst_n) begin
    // machine cycle length
    mc_gap++;
    if (dut.u_core.mc_en) begin
      if (mc_gap != CLK_PER_MC && n_wdt == 0 && mc_gap < 100) n_bad_mc++;
      mc_gap = 0;
      if (dut.u_core.seq.bubble)    n_skip++;
      if (dut.u_core.seq.int_taken) n_int++;
      if (dut.u_core.ctrl.ar0_inc)  n_ar0_inc++;
      if (dut.u_core.ctrl.ar1_shift) n_ar1_shift++;
      if (dut.u_core.ctrl.sfr_rd)   n_sfr_rd++;
      if (dut.u_core.ctrl.sfr_wr)   n_sfr_wr++;
      if (dut.u_core.ir[15:14] == FMT_CALL) n_call++;
      if (dut.u_core.ir[15:8] == {FMT_OP, OP_RET})  n_ret++;
      if (dut.u_core.ir[15:8] == {FMT_OP, OP_RETI}) n_reti++;
      if (int'(dut.u_core.u_pcst.count) > max_depth) max_depth = int'(dut.u_core.u_pcst.count);
      if (dut.u_core.porta_wr) n_porta_wr++;
      // multi-cycle address register loads: 4 and 2 machine cycles
      if (dut.u_core.ctrl.hold) hold_run++;
      else begin
        if (dut.u_core.ir[15:8] == {FMT_OP, OP_MOV_AR0_RN}) begin
          n_ar0_load++;
          check(hold_run == 3, $sformatf("MOV AR0,Rn took %0d machine cycles", hold_run + 1));
        end
        if (dut.u_core.ir[15:8] == {FMT_OP, OP_MOV_AR1_RN}) begin
          n_ar1_load++;
          check(hold_run == 1, $sformatf("MOV AR1,Rn took %0d machine cycles", hold_run + 1));
        end
        hold_run = 0;
      end
    end
    if (dut.u_core.u_wdt.timeout) n_wdt++;
    if (dut.u_core.u_madm.sample_valid) n_madm++;
  end

  // ====================================================================
  // Phase 1: instruction-set model
  // ====================================================================
  logic [7:0]  m_fr [512];
  logic [8:0]  m_pc;
  logic [27:0] m_ar0;
  logic [15:0] m_ar1;
  logic [8:0]  m_st [4];
  int          m_cnt;
  bit          m_bubble;
  bit          iss_on = 0;
  int          retired = 0;

  function automatic bit is_io(logic [8:0] a);
    return a == 9'h008 || a == 9'h009 || a == 9'h00A || a == 9'h00F;
  endfunction

  task automatic m_reset();
    for (int i = 0; i < 16; i++) m_fr[i] = 8'h00;
    m_pc = 0; m_ar0 = 0; m_ar1 = 0; m_cnt = 0; m_bubble = 1;
    for (int i = 0; i < 4; i++) m_st[i] = 0;
  endtask

  task automatic m_push(logic [8:0] v);
    m_st[3] = m_st[2]; m_st[2] = m_st[1]; m_st[1] = m_st[0]; m_st[0] = v;
    if (m_cnt < 4) m_cnt++;
  endtask

  task automatic m_pull(output logic [8:0] v);
    v = m_st[0];
    m_st[0] = m_st[1]; m_st[1] = m_st[2]; m_st[2] = m_st[3]; m_st[3] = 0;
    if (m_cnt > 0) m_cnt--;
  endtask

  // one completed instruction; io is the value the core read from an I/O
  // register in this machine cycle, take_int whether it accepted an interrupt
  task automatic m_step(input logic [15:0] w, input logic [7:0] io, input bit take_int);
    logic [7:0]  rn, imm, v, a, res;
    logic [8:0]  ra, wa, npc;
    logic [2:0]  bi;
    logic        c, z, bf;
    int          r;
    bit          skip, wr;
    logic [27:0] fa;

    npc = m_pc;
    skip = 0;
    if (m_bubble) begin
      check(w == 16'h0000, $sformatf("expected a skipped (NOP) cycle, core ran %04x", w));
      m_bubble = 0;
    end else begin
      // IR_L has counted through Rn..Rn+3 (AR0) or Rn..Rn+1 (AR1) by the last cycle
      if (prog[m_pc][15:8] == {FMT_OP, OP_MOV_AR0_RN})
        check(w == {prog[m_pc][15:8], 8'(prog[m_pc][7:0] + 3)}, $sformatf("pc %03x: core ran %04x", m_pc, w));
      else if (prog[m_pc][15:8] == {FMT_OP, OP_MOV_AR1_RN})
        check(w == {prog[m_pc][15:8], 8'(prog[m_pc][7:0] + 1)}, $sformatf("pc %03x: core ran %04x", m_pc, w));
      else
        check(w == prog[m_pc], $sformatf("pc %03x: core ran %04x, program has %04x", m_pc, w, prog[m_pc]));
      w = prog[m_pc];
      npc = m_pc + 1;
      imm = w[7:0]; rn = w[7:0]; bi = w[10:8];
      a = m_fr[4]; c = m_fr[5][SR_C]; z = m_fr[5][SR_Z]; bf = m_fr[5][SR_BF];
      case (w[15:14])
        2'b10: begin m_push(npc); npc = w[8:0]; end
        2'b11: npc = w[8:0];
        2'b01: begin
          ra = {1'b0, rn};
          v = is_io(ra) ? io : m_fr[ra];
          case (w[13:11])
            3'd0: begin v[bi] = 1'b1; if (!is_io(ra)) m_fr[ra] = v; end
            3'd1: begin v[bi] = 1'b0; if (!is_io(ra)) m_fr[ra] = v; end
            3'd2: skip = v[bi];
            3'd3: skip = !v[bi];
            3'd4: bf = v[bi];
            default: ;
          endcase
          if (w[13:11] == 3'd4) m_fr[5][SR_BF] = bf;
        end
        default: begin
          // source operand by addressing mode
          ra = {1'b0, rn};
          case (w[13:8])
            OP_MOV_RN_IR0:  ra = {1'b0, m_fr[0]};
            OP_MOV_RN_IR0M: ra = {1'b1, m_fr[0]};
            OP_MOV_RN_IR1A: ra = {1'b0, 8'(m_fr[1] + m_fr[4])};
            OP_MOV_RN_IR2:  ra = {1'b1, m_fr[2]};
            default: ;
          endcase
          v = is_io(ra) ? io : m_fr[ra];
          wa = {1'b0, rn};
          wr = 1; res = v;
          case (w[13:8])
            OP_MOV_A_RN:    begin wa = 4; z = (v == 0); end
            OP_MOV_RN_A:    begin res = a; z = (a == 0); end
            OP_MOV_A_IMM:   begin wa = 4; res = imm; z = (imm == 0); end
            OP_MOV_R0_IMM:  begin wa = 0; res = imm; z = (imm == 0); end
            OP_MOV_RN_IR0, OP_MOV_RN_IR0M, OP_MOV_RN_IR1A: z = (v == 0);
            OP_MOV_RN_IR2:  ;
            OP_MOV_IR0_RN:  begin wa = {1'b0, m_fr[0]}; z = (v == 0); end
            OP_MOV_IR0M_RN: begin wa = {1'b1, m_fr[0]}; z = (v == 0); end
            OP_MOV_IR2_RN:  wa = {1'b1, m_fr[2]};
            OP_CLR:         begin res = 0; z = 1; end
            OP_ADD_A_RN, OP_ADD_A_IMM, OP_ADD_RN_A, OP_ADDC_A_RN, OP_ADDC_RN_A: begin
              if (w[13:8] == OP_ADD_A_IMM) v = imm;
              r = int'(a) + int'(v) + ((w[13:8] == OP_ADDC_A_RN || w[13:8] == OP_ADDC_RN_A) ? int'(c) : 0);
              res = 8'(r); c = (r > 255); z = (res == 0);
              if (w[13:8] != OP_ADD_RN_A && w[13:8] != OP_ADDC_RN_A) wa = 4;
            end
            OP_SUB_A_RN, OP_SUB_A_IMM, OP_SUB_RN_A, OP_SUBC_A_RN, OP_SUBC_RN_A, OP_CMP_A_RN, OP_CMP_A_IMM: begin
              if (w[13:8] == OP_SUB_A_IMM || w[13:8] == OP_CMP_A_IMM) v = imm;
              r = int'(a) - int'(v) - ((w[13:8] == OP_SUBC_A_RN || w[13:8] == OP_SUBC_RN_A) ? int'(c) : 0);
              res = 8'(r); c = (r < 0); z = (res == 0);
              if (w[13:8] == OP_SUB_A_RN || w[13:8] == OP_SUB_A_IMM || w[13:8] == OP_SUBC_A_RN) wa = 4;
              if (w[13:8] == OP_CMP_A_RN || w[13:8] == OP_CMP_A_IMM) wr = 0;
            end
            OP_INC: begin res = v + 1; z = (res == 0); end
            OP_DEC: begin res = v - 1; z = (res == 0); end
            OP_DSZ: begin res = v - 1; z = (res == 0); skip = z; end
            OP_AND_A_RN, OP_AND_A_IMM: begin if (w[8]) v = imm; res = a & v; wa = 4; z = (res == 0); end
            OP_OR_A_RN,  OP_OR_A_IMM:  begin if (w[8]) v = imm; res = a | v; wa = 4; z = (res == 0); end
            OP_XOR_A_RN, OP_XOR_A_IMM: begin if (w[8]) v = imm; res = a ^ v; wa = 4; z = (res == 0); end
            OP_NOT: begin res = ~v; z = (res == 0); end
            OP_ROL: begin res = {v[6:0], c}; c = v[7]; z = (res == 0); end
            OP_ROR: begin res = {c, v[7:1]}; c = v[0]; z = (res == 0); end
            OP_RET:  begin wr = 0; m_pull(npc); end
            OP_RETI: begin wr = 0; m_pull(npc); m_fr[6][INT_IEN] = 1'b1; end
            OP_MOV_RN_AR0: res = u_sfr.mem[m_ar0[15:0]];
            OP_MOV_RN_AR0I: begin m_ar0 = m_ar0 + 1; res = u_sfr.mem[m_ar0[15:0]]; end
            OP_MOV_RN_AR1:  begin m_ar1 = {m_ar1[14:0], bf}; res = u_sfr.mem[m_ar1]; end
            OP_MOV_AR0_RN: begin
              wr = 0;
              m_ar0 = {m_fr[{1'b0, 8'(rn + 3)}][3:0], m_fr[{1'b0, 8'(rn + 2)}],
                       m_fr[{1'b0, 8'(rn + 1)}], m_fr[{1'b0, rn}]};
            end
            OP_MOV_AR1_RN: begin
              wr = 0;
              m_ar1 = {m_fr[{1'b0, 8'(rn + 1)}], m_fr[{1'b0, rn}]};
            end
            OP_MOV_AR0M_RN, OP_MOV_AR0IM_RN: begin
              wr = 0;
              if (w[13:8] == OP_MOV_AR0IM_RN) m_ar0 = m_ar0 + 1;
              fa = m_ar0;
              check(u_sfr.mem[fa[15:0]] == v, $sformatf("flash[%h] = %02x, expected %02x", fa, u_sfr.mem[fa[15:0]], v));
            end
            default: wr = 0;   // NOP, CWDT, unassigned
          endcase
          if (wr && !is_io(wa)) m_fr[wa] = res;
          // flags: written SR wins over flag updates
          if (!(wr && wa == 5)) begin
            case (w[13:8])
              OP_MOV_RN_IR2, OP_MOV_IR2_RN, OP_RET, OP_RETI, OP_CWDT, OP_NOP,
              OP_MOV_RN_AR0, OP_MOV_RN_AR0I, OP_MOV_RN_AR1, OP_MOV_AR0_RN,
              OP_MOV_AR1_RN, OP_MOV_AR0M_RN, OP_MOV_AR0IM_RN: ;
              default: if (w[13:8] <= 6'h28 && (w[13:8] <= 6'h0C || w[13:8] >= 6'h10) &&
                           !(w[13:8] > 6'h1E && w[13:8] < 6'h20)) begin
                m_fr[5][SR_Z] = z;
                m_fr[5][SR_C] = c;
              end
            endcase
          end
        end
      endcase
      if (skip) m_bubble = 1;
      m_pc = skip ? npc + 1 : npc;
    end
    if (take_int) begin
      m_push(m_pc);
      m_pc = 9'h004;
      m_fr[6][INT_IEN] = 1'b0;
    end
  endtask

  // compare the model with the core after an instruction has completed
  task automatic m_compare();
    for (int i = 0; i < 512; i++) begin
      if (is_io(9'(i)) || (i >= 16 && i < 16)) continue;
      if (i < 16) begin
        if (dut.u_core.u_fr.sysreg[i] != m_fr[i]) begin
          check(0, $sformatf("FR[%03x] = %02x, model %02x (after pc %03x)", i, dut.u_core.u_fr.sysreg[i], m_fr[i], m_pc));
          m_fr[i] = dut.u_core.u_fr.sysreg[i];
        end
      end else if (dut.u_core.u_fr.ram[i] != m_fr[i]) begin
        check(0, $sformatf("FR[%03x] = %02x, model %02x", i, dut.u_core.u_fr.ram[i], m_fr[i]));
        m_fr[i] = dut.u_core.u_fr.ram[i];
      end
    end
    check(dut.u_core.ar0 == m_ar0 && dut.u_core.ar1 == m_ar1,
          $sformatf("AR0/AR1 = %h/%h, model %h/%h", dut.u_core.ar0, dut.u_core.ar1, m_ar0, m_ar1));
  endtask

  // operand chooser: registers, a small RAM window, now and then I/O
  function automatic logic [7:0] rnd_fr();
    int k = $urandom_range(0, 99);
    if (k < 30) return 8'($urandom_range(0, 5));
    if (k < 35) return 8'h07;
    if (k < 45) return 8'($urandom_range(11, 14));
    if (k < 48) return 8'h0A;
    return 8'($urandom_range(16, 47));
  endfunction

  task automatic make_random_program();
    opc_e ops [47] = '{OP_NOP, OP_MOV_A_RN, OP_MOV_RN_A, OP_MOV_A_IMM, OP_MOV_R0_IMM,
      OP_MOV_RN_IR0, OP_MOV_RN_IR0M, OP_MOV_IR0_RN, OP_MOV_IR0M_RN, OP_MOV_RN_IR1A,
      OP_MOV_RN_IR2, OP_MOV_IR2_RN, OP_CLR, OP_ADD_A_RN, OP_ADDC_A_RN, OP_ADD_A_IMM,
      OP_ADD_RN_A, OP_ADDC_RN_A, OP_SUB_A_RN, OP_SUBC_A_RN, OP_SUB_A_IMM, OP_SUB_RN_A,
      OP_SUBC_RN_A, OP_CMP_A_RN, OP_CMP_A_IMM, OP_INC, OP_DEC, OP_DSZ, OP_AND_A_RN,
      OP_AND_A_IMM, OP_OR_A_RN, OP_OR_A_IMM, OP_XOR_A_RN, OP_XOR_A_IMM, OP_NOT, OP_ROL,
      OP_ROR, OP_RET, OP_RETI, OP_CWDT, OP_MOV_RN_AR0, OP_MOV_RN_AR0I, OP_MOV_RN_AR1,
      OP_MOV_AR0_RN, OP_MOV_AR1_RN, OP_MOV_AR0M_RN, OP_MOV_AR0IM_RN};
    for (int i = 0; i < 512; i++) begin
      int k = $urandom_range(0, 99);
      opc_e o;
      logic [7:0] operand;
      if (k < 3) prog[i] = i_goto(14'($urandom_range(0, 511)));
      else if (k < 5) prog[i] = i_call(14'($urandom_range(0, 511)));
      else if (k < 17) prog[i] = i_bit(bop_e'($urandom_range(0, 4)), 3'($urandom), rnd_fr());
      else begin
        o = ops[$urandom_range(0, 46)];
        if (o == OP_RET || o == OP_RETI) o = ($urandom_range(0, 3) == 0) ? o : OP_INC;
        operand = rnd_fr();
        if (o == OP_MOV_A_IMM || o == OP_MOV_R0_IMM || o == OP_ADD_A_IMM || o == OP_SUB_A_IMM ||
            o == OP_CMP_A_IMM || o == OP_AND_A_IMM || o == OP_OR_A_IMM || o == OP_XOR_A_IMM)
          operand = 8'($urandom);
        if (o == OP_MOV_R0_IMM) operand = 8'($urandom_range(16, 47));   // mostly RAM
        if (o == OP_MOV_AR0_RN || o == OP_MOV_AR1_RN) operand = 8'($urandom_range(16, 40));
        prog[i] = i_op(o, operand);
      end
    end
  endtask

  // sample the core at the end of every machine cycle that completes an instruction
  logic [15:0] s_ir;
  logic [7:0]  s_io;
  bit          s_int, s_ret;
  always @(posedge clk) begin
    if (iss_on && rst_n) begin
      if (dut.u_core.wdt_timeout) begin
        m_reset();              // watchdog reset: registers clear, RAM keeps
      end else if (dut.u_core.mc_en && !dut.u_core.ctrl.hold) begin
        s_ir  = dut.u_core.ir;
        s_io  = dut.u_core.dout;
        s_int = dut.u_core.seq.int_taken;
        #1;
        m_step(s_ir, s_io, s_int);
        m_compare();
        retired++;
      end
    end
  end

  // ====================================================================
  // Phase 2 helpers
  // ====================================================================
  byte rx_bytes [$];

  // host receiver: decode frames on uart_txd
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      if (!rst_n) continue;
      repeat (BIT_CLKS / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (BIT_CLKS) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (BIT_CLKS) @(posedge clk);
      check(uart_txd == 1'b1, "UART stop bit");
      rx_bytes.push_back(b);
      n_uart_tx++;
    end
  end

  task automatic host_send(input logic [7:0] b);
    uart_rxd = 1'b0;
    repeat (BIT_CLKS) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = b[i];
      repeat (BIT_CLKS) @(posedge clk);
    end
    uart_rxd = 1'b1;
    repeat (BIT_CLKS) @(posedge clk);
    n_uart_rx++;
  endtask

  // reference adaptive delta modulation decoder (12-bit, steps 8..256)
  int ref_x = 0, ref_step = 8, ref_prev = 0;
  function automatic int ref_adm(int b);
    if (b == ref_prev) ref_step = (ref_step * 2 > 256) ? 256 : ref_step * 2;
    else               ref_step = (ref_step / 2 < 8) ? 8 : ref_step / 2;
    ref_prev = b;
    ref_x = b ? ref_x + ref_step : ref_x - ref_step;
    if (ref_x > 2047) ref_x = 2047;
    if (ref_x < -2048) ref_x = -2048;
    return (ref_x + 2048) / 8;   // 9-bit offset binary
  endfunction

  int pa;
  task automatic emit(input logic [15:0] w);
    prog[pa] = w;
    pa++;
  endtask

  task automatic make_system_program();
    for (int i = 0; i < 512; i++) prog[i] = 16'h0000;
    prog[0] = i_goto(14'h010);
    prog[4] = i_goto(14'h100);
    pa = 'h010;
    // warm start?
    emit(i_op(OP_MOV_A_IMM, 8'hA5));
    emit(i_op(OP_XOR_A_RN, 8'h20));
    emit(i_bit(BOP_TBSC, 3'(SR_Z), FR_SR));
    emit(i_goto(14'h0E0));
    emit(i_op(OP_MOV_A_IMM, 8'hA5));
    emit(i_op(OP_MOV_RN_A, 8'h20));
    // interrupt save pointer, UART receive interrupt on
    emit(i_op(OP_MOV_A_IMM, 8'h10));
    emit(i_op(OP_MOV_RN_A, FR_R2));
    emit(i_op(OP_CLR, 8'h0C));
    emit(i_op(OP_MOV_A_IMM, 8'h03));     // IEN | EUR
    emit(i_op(OP_MOV_RN_A, FR_INTCR));
    // Port A
    emit(i_op(OP_MOV_A_IMM, 8'h5A));
    emit(i_op(OP_MOV_RN_A, FR_PORTA));
    emit(i_op(OP_MOV_A_RN, FR_PORTA));
    emit(i_op(OP_MOV_RN_A, 8'h30));
    // nested calls with a direct DAC write
    emit(i_call(14'h0C0));
    // AR0 <- 0x0000100 from RAM 40..43
    emit(i_op(OP_CLR, 8'h40));
    emit(i_op(OP_MOV_A_IMM, 8'h01));
    emit(i_op(OP_MOV_RN_A, 8'h41));
    emit(i_op(OP_CLR, 8'h42));
    emit(i_op(OP_CLR, 8'h43));
    emit(i_op(OP_MOV_AR0_RN, 8'h40));
    // first code byte: keep a copy and start the decoder
    emit(i_op(OP_MOV_RN_AR0, 8'h31));
    emit(i_op(OP_MOV_RN_AR0, FR_MADM));
    emit(i_op(OP_MOV_A_IMM, 8'h03));
    emit(i_op(OP_MOV_RN_A, 8'h0B));
    // loop: wait for the decoder's request, give it the next byte
    emit(i_bit(BOP_TBSS, 3'(IO_MREQ), FR_DAC));
    emit(i_goto(14'(pa - 1)));
    emit(i_op(OP_MOV_RN_AR0I, FR_MADM));
    emit(i_op(OP_DSZ, 8'h0B));
    emit(i_goto(14'(pa - 4)));
    // AR1 <- 0x0300, two BF-shift reads
    emit(i_op(OP_CLR, 8'h44));
    emit(i_op(OP_MOV_A_IMM, 8'h03));
    emit(i_op(OP_MOV_RN_A, 8'h45));
    emit(i_op(OP_MOV_AR1_RN, 8'h44));
    emit(i_bit(BOP_SETB, 3'd0, 8'h0D));
    emit(i_bit(BOP_LDBF, 3'd0, 8'h0D));
    emit(i_op(OP_MOV_RN_AR1, 8'h33));
    emit(i_bit(BOP_CLRB, 3'd0, 8'h0D));
    emit(i_bit(BOP_LDBF, 3'd0, 8'h0D));
    emit(i_op(OP_MOV_RN_AR1, 8'h34));
    // program the flash: two bytes after the voice data
    emit(i_op(OP_MOV_AR0IM_RN, 8'h33));
    emit(i_op(OP_MOV_AR0IM_RN, 8'h34));
    // wait for three echoed bytes, then report 'D'
    emit(i_op(OP_MOV_A_RN, 8'h0C));
    emit(i_op(OP_CMP_A_IMM, 8'h03));
    emit(i_bit(BOP_TBSS, 3'(SR_Z), FR_SR));
    emit(i_goto(14'(pa - 3)));
    emit(i_bit(BOP_TBSC, 3'(IO_TXB), FR_DAC));
    emit(i_goto(14'(pa - 1)));
    emit(i_op(OP_MOV_A_IMM, 8'h44));
    emit(i_op(OP_MOV_RN_A, FR_UART));
    // watchdog on, then hang without CWDT
    emit(i_op(OP_MOV_A_IMM, 8'h80));
    emit(i_op(OP_MOV_RN_A, FR_INTCR));
    emit(i_goto(14'(pa - 1)));
    // subroutines
    pa = 'h0C0;
    emit(i_op(OP_MOV_A_IMM, 8'h80));
    emit(i_call(14'h0C8));
    emit(i_op(OP_MOV_RN_A, 8'h32));
    emit(i_op(OP_RET));
    pa = 'h0C8;
    emit(i_op(OP_CWDT));
    emit(i_op(OP_MOV_RN_A, FR_DAC));
    emit(i_op(OP_ADD_A_IMM, 8'h01));
    emit(i_op(OP_RET));
    // warm start: send 'W', clear the marker, stop
    pa = 'h0E0;
    emit(i_op(OP_MOV_A_IMM, 8'h57));
    emit(i_op(OP_MOV_RN_A, FR_UART));
    emit(i_op(OP_CLR, 8'h20));
    emit(i_goto(14'(pa - 1)));
    // UART receive interrupt: echo byte+1, count in R0C
    pa = 'h100;
    emit(i_op(OP_MOV_IR2_RN, FR_ACC));
    emit(i_op(OP_MOV_A_RN, FR_UART));
    emit(i_op(OP_ADD_A_IMM, 8'h01));
    emit(i_op(OP_MOV_RN_A, FR_UART));
    emit(i_op(OP_INC, 8'h0C));
    emit(i_op(OP_MOV_RN_IR2, FR_ACC));
    emit(i_op(OP_RETI));
  endtask

  // ====================================================================
  initial begin
    logic [7:0] codes [4] = '{8'hF0, 8'h0F, 8'hAA, 8'h3C};
    logic [7:0] sent [3] = '{8'h41, 8'h62, 8'h7E};
    int exp_samples [$];
    int n_direct;

    // ---------------------------------------------------- phase 1
    make_random_program();
    load_program();
    for (int i = 0; i < 2**16; i++) u_sfr.mem[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    for (int i = 16; i < 512; i++) m_fr[i] = dut.u_core.u_fr.ram[i];
    rst_n = 1'b1;
    configure();
    m_reset();
    iss_on = 1;
    wait (retired >= RANDOM_INSTRS);
    @(negedge clk);
    iss_on = 0;
    $display("phase 1: %0d instructions, %0d skips, %0d calls, %0d interrupts, %0d flash writes",
             retired, n_skip, n_call, n_int, u_sfr.writes);
    check(n_bad_mc == 0, $sformatf("%0d machine cycles not %0d clocks long", n_bad_mc, CLK_PER_MC));

    // ---------------------------------------------------- phase 2
    rst_n = 1'b0;
    make_system_program();
    load_program();
    for (int i = 0; i < 2**16; i++) u_sfr.mem[i] = 8'hFF;
    for (int i = 0; i < 4; i++) u_sfr.mem[16'h100 + i] = codes[i];
    u_sfr.mem[16'h0601] = 8'h11;
    u_sfr.mem[16'h0C02] = 8'h22;
    dut.u_core.u_fr.ram[9'h020] = 8'h00;
    // let a byte the random program was still sending leave the monitor
    repeat (12 * BIT_CLKS) @(posedge clk);
    u_dac.log_q.delete();
    rx_bytes.delete();
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    configure();

    fork
      begin
        repeat (2000) @(posedge clk);
        for (int i = 0; i < 3; i++) begin
          host_send(sent[i]);
          repeat (3 * 10 * BIT_CLKS) @(posedge clk);
        end
      end
    join_none

    // report byte 'D' (0x44) after the three echoes
    wait (rx_bytes.size() >= 4);
    check(rx_bytes[0] == sent[0] + 1 && rx_bytes[1] == sent[1] + 1 && rx_bytes[2] == sent[2] + 1,
          $sformatf("UART echo %02x %02x %02x", rx_bytes[0], rx_bytes[1], rx_bytes[2]));
    check(rx_bytes[3] == 8'h44, $sformatf("report byte %02x", rx_bytes[3]));
    check(dut.u_core.u_fr.sysreg[12] == 8'd3, "three receive interrupts counted");
    check(porta_out == 8'h5A && porta_oe == 8'hA5, "Port A latch and drive");
    check(dut.u_core.u_fr.ram[9'h030] == 8'hC3, "Port A pins read");
    check(dut.u_core.u_fr.ram[9'h031] == codes[0], "flash read through AR0");
    check(dut.u_core.u_fr.ram[9'h032] == 8'h81, "nested call result");
    check(dut.u_core.u_fr.ram[9'h033] == 8'h11, "AR1<<BF read with BF=1");
    check(dut.u_core.u_fr.ram[9'h034] == 8'h22, "AR1<<BF read with BF=0");
    check(dut.u_core.ar1 == 16'h0C02, $sformatf("AR1 = %h", dut.u_core.ar1));
    check(u_sfr.mem[16'h0104] == 8'h11 && u_sfr.mem[16'h0105] == 8'h22, "flash programming");
    check(dut.u_core.ar0 == 28'h0000105, $sformatf("AR0 = %h", dut.u_core.ar0));
    check(max_depth >= 2, $sformatf("PC stack depth reached %0d", max_depth));

    // DAC: the direct write, then 32 decoded samples
    wait (u_dac.log_q.size() >= 33);
    exp_samples.push_back(8'h80 * 2);
    for (int i = 0; i < 4; i++)
      for (int j = 7; j >= 0; j--) exp_samples.push_back(ref_adm(int'(codes[i][j])));
    n_direct = 0;
    for (int i = 0; i < 33; i++) begin
      check(u_dac.log_q[i] == 12'(exp_samples[i] * 8),
            $sformatf("DAC code %0d = %03x, expected %03x", i, u_dac.log_q[i], exp_samples[i] * 8));
    end
    check(u_dac.bad_frames == 0, "DAC frames have 12 bits");

    // watchdog reset, warm start sends 'W'
    wait (rx_bytes.size() >= 5);
    check(rx_bytes[4] == 8'h57, $sformatf("warm start byte %02x", rx_bytes[4]));
    check(dut.u_core.u_fr.ram[9'h020] == 8'h00, "warm start cleared the marker");

    // every mechanism happened
    check(n_cfg == 2,      "two configurations");
    check(n_skip > 0,      "skip happened");
    check(n_int >= 3,      "interrupts happened");
    check(n_reti >= 3,     "RETI happened");
    check(n_call > 0 && n_ret > 0, "call and return happened");
    check(n_ar0_load > 0,  "MOV AR0,Rn happened");
    check(n_ar1_load > 0,  "MOV AR1,Rn happened");
    check(n_ar0_inc > 0,   "AR0 auto-increment happened");
    check(n_ar1_shift > 0, "AR1 shift happened");
    check(n_sfr_rd > 0 && n_sfr_wr > 0, "flash read and write happened");
    check(n_uart_rx >= 3 && n_uart_tx >= 5, "UART traffic happened");
    check(n_madm >= 32,    "MADM playback happened");
    check(n_porta_wr > 0,  "Port A write happened");
    check(n_wdt > 0,       "watchdog reset happened");
    $display("mechanisms: skip=%0d int=%0d reti=%0d call=%0d ret=%0d ar0_load=%0d ar1_load=%0d ar0_inc=%0d ar1_shift=%0d sfr_rd=%0d sfr_wr=%0d uart_rx=%0d uart_tx=%0d madm=%0d porta_wr=%0d wdt=%0d depth=%0d",
             n_skip, n_int, n_reti, n_call, n_ret, n_ar0_load, n_ar1_load, n_ar0_inc, n_ar1_shift,
             n_sfr_rd, n_sfr_wr, n_uart_rx, n_uart_tx, n_madm, n_porta_wr, n_wdt, max_depth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
