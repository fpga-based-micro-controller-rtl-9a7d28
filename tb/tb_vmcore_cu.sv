// tb_vmcore_cu: self-checking test of the control unit.
// For every instruction of the table the decoded control word is compared
// with the expected operation, destination, flag updates and PC source
// written here from the instruction definitions. It also checks the
// machine-cycle strobe period, the skip decisions of DSZ/TBSS/TBSC, the 4-
// and 2-cycle address-register loads, interrupt acceptance and its blocking
// cases, and the SFR strobes (we_n only inside the cycle).
module tb_vmcore_cu;
  import vmcore_pkg::*;
  import vmcore_asm_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [15:0] ir = '0;
  logic        alu_z = 0, sf = 0, irq_rx = 0, irq_tx = 0, irq_madm = 0;
  logic [7:0]  intcr = '0;
  ctrl_t       ctrl;
  seq_t        seq;
  logic        mc_en, sfr_ce_n, sfr_oe_n, sfr_we_n, sfr_drive;
  logic [1:0]  step;
  int checks = 0, failures = 0;

  vmcore_cu #(.CLK_PER_MC(5)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // expected: ALU op, destination (0 none, 1 A, 2 Rn, 3 R0, 4 indirect), C, Z
  task automatic expect_op(opc_e o, alu_op_e eop, int dest, bit ec, bit ez);
    ir = i_op(o, 8'h21);
    #1;
    check(ctrl.alu_op == eop, $sformatf("%s: ALU op %s", o.name(), ctrl.alu_op.name()));
    check(ctrl.fr_we == (dest != 0), $sformatf("%s: FR write %0d", o.name(), ctrl.fr_we));
    if (dest == 1) check(ctrl.wa_sel == WA_ACC, $sformatf("%s: destination A", o.name()));
    if (dest == 2) check(ctrl.wa_sel == WA_IRL, $sformatf("%s: destination Rn", o.name()));
    if (dest == 3) check(ctrl.wa_sel == WA_R0,  $sformatf("%s: destination R0", o.name()));
    check(ctrl.c_we == ec && ctrl.z_we == ez, $sformatf("%s: flags C%0d Z%0d", o.name(), ctrl.c_we, ctrl.z_we));
    check(seq.fetch_sel == FETCH_PC && !ctrl.hold && !seq.bubble, $sformatf("%s: sequential", o.name()));
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last_mc = -1, mc_bad = 0, n_mc = 0;
  always @(posedge clk) if (rst_n && mc_en) begin
    if (last_mc >= 0 && $time - last_mc != 50) mc_bad++;
    last_mc = $time;
    n_mc++;
  end

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ------------------------------------------------------- decoding
    expect_op(OP_MOV_A_RN,   ALU_PASS, 1, 0, 1);
    expect_op(OP_MOV_A_IMM,  ALU_PASS, 1, 0, 1);
    check(ctrl.b_sel == BMUX_IMM, "MOV A,#: immediate operand");
    expect_op(OP_MOV_R0_IMM, ALU_PASS, 3, 0, 1);
    expect_op(OP_CLR,        ALU_ZERO, 2, 0, 1);
    expect_op(OP_MOV_RN_IR2, ALU_PASS, 2, 0, 0);
    check(ctrl.ra_sel == RA_R2_RAM, "MOV Rn,(R2) reads System RAM at R2");
    expect_op(OP_MOV_IR2_RN, ALU_PASS, 4, 0, 0);
    check(ctrl.wa_sel == WA_R2_RAM, "MOV (R2),Rn writes System RAM at R2");
    expect_op(OP_MOV_RN_IR1A, ALU_PASS, 2, 0, 1);
    check(ctrl.ra_sel == RA_R1A, "MOV Rn,(R1+A) source");
    expect_op(OP_ADD_A_RN,  ALU_ADD, 1, 1, 1);
    expect_op(OP_ADDC_A_RN, ALU_ADC, 1, 1, 1);
    expect_op(OP_ADD_RN_A,  ALU_ADD, 2, 1, 1);
    expect_op(OP_SUB_A_RN,  ALU_SUB, 1, 1, 1);
    expect_op(OP_SUBC_RN_A, ALU_SBC, 2, 1, 1);
    expect_op(OP_CMP_A_IMM, ALU_SUB, 0, 1, 1);
    expect_op(OP_INC,       ALU_INC, 2, 0, 1);
    check(ctrl.a_sel == AMUX_DOUT, "INC operates on Rn");
    expect_op(OP_DEC,       ALU_DEC, 2, 0, 1);
    expect_op(OP_AND_A_IMM, ALU_AND, 1, 0, 1);
    expect_op(OP_OR_A_RN,   ALU_OR,  1, 0, 1);
    expect_op(OP_XOR_A_RN,  ALU_XOR, 1, 0, 1);
    expect_op(OP_NOT,       ALU_NOT, 2, 0, 1);
    expect_op(OP_ROL,       ALU_ROL, 2, 1, 1);
    expect_op(OP_ROR,       ALU_ROR, 2, 1, 1);
    expect_op(OP_NOP,       ALU_PASS, 0, 0, 0);
    expect_op(OP_MOV_RN_AR0, ALU_PASS, 2, 0, 0);
    check(ctrl.b_sel == BMUX_DBUS && ctrl.sfr_rd && !ctrl.ar0_inc && !ctrl.addr_ar1, "MOV Rn,(AR0)");
    expect_op(OP_MOV_RN_AR0I, ALU_PASS, 2, 0, 0);
    check(ctrl.sfr_rd && ctrl.ar0_inc, "MOV Rn,(AR0+1)");
    expect_op(OP_MOV_RN_AR1, ALU_PASS, 2, 0, 0);
    check(ctrl.sfr_rd && ctrl.ar1_shift && ctrl.addr_ar1, "MOV Rn,(AR1<<BF)");
    expect_op(OP_MOV_AR0IM_RN, ALU_PASS, 0, 0, 0);
    check(ctrl.sfr_wr && ctrl.ar0_inc && !ctrl.sfr_rd, "MOV (AR0+1),Rn");
    ir = i_op(OP_CWDT); #1; check(ctrl.wdt_clr, "CWDT clears the watchdog");
    // control flow
    ir = i_call(14'h123); #1;
    check(seq.fetch_sel == FETCH_ABS && seq.push, "CALL pushes and jumps");
    ir = i_goto(14'h055); #1;
    check(seq.fetch_sel == FETCH_ABS && !seq.push, "GOTO jumps");
    ir = i_op(OP_RET); #1;
    check(seq.fetch_sel == FETCH_PULL && ctrl.pull && !ctrl.ien_set, "RET pulls");
    ir = i_op(OP_RETI); #1;
    check(seq.fetch_sel == FETCH_PULL && ctrl.pull && ctrl.ien_set, "RETI pulls and sets IEN");
    // bit group and skips
    ir = i_bit(BOP_SETB, 3'd5, 8'h30); #1;
    check(ctrl.alu_op == ALU_SETB && ctrl.fr_we && !seq.bubble, "SETB");
    ir = i_bit(BOP_CLRB, 3'd5, 8'h30); #1;
    check(ctrl.alu_op == ALU_CLRB && ctrl.fr_we, "CLRB");
    ir = i_bit(BOP_LDBF, 3'd1, 8'h30); #1;
    check(ctrl.bf_we && !ctrl.fr_we, "LDBF");
    ir = i_bit(BOP_TBSS, 3'd1, 8'h30); sf = 1; #1; check(seq.bubble, "TBSS skips on 1");
    sf = 0; #1; check(!seq.bubble, "TBSS runs on 0");
    ir = i_bit(BOP_TBSC, 3'd1, 8'h30); #1; check(seq.bubble, "TBSC skips on 0");
    sf = 1; #1; check(!seq.bubble, "TBSC runs on 1");
    ir = i_op(OP_DSZ, 8'h30); alu_z = 1; #1; check(seq.bubble && ctrl.alu_op == ALU_DEC && ctrl.fr_we, "DSZ skips at zero");
    alu_z = 0; #1; check(!seq.bubble, "DSZ runs on non-zero");
    // ------------------------------------------------------ interrupts
    intcr = 8'h03; irq_rx = 1;
    ir = i_op(OP_ADD_A_RN, 8'h30); #1;
    check(seq.int_taken && seq.fetch_sel == FETCH_INT && seq.push && seq.ien_clr, "interrupt taken");
    intcr = 8'h02; #1; check(!seq.int_taken, "no interrupt with IEN clear");
    intcr = 8'h01; #1; check(!seq.int_taken, "no interrupt with the source disabled");
    intcr = 8'h09; irq_rx = 0; irq_madm = 1; #1; check(seq.int_taken, "MADM interrupt");
    intcr = 8'h05; irq_madm = 0; irq_tx = 1; #1; check(seq.int_taken, "UART transmitter interrupt");
    ir = i_call(14'h10); #1; check(!seq.int_taken && seq.fetch_sel == FETCH_ABS, "interrupt waits during CALL");
    ir = i_op(OP_RETI); #1; check(!seq.int_taken, "interrupt waits during RETI");
    ir = i_goto(14'h123); #1;
    check(seq.int_taken && seq.push && seq.push_abs && seq.fetch_sel == FETCH_INT, "interrupt on GOTO pushes the target");
    ir = i_op(OP_ADD_A_RN, 8'h30); #1; check(seq.int_taken && !seq.push_abs, "interrupt elsewhere pushes the PC");
    ir = i_op(OP_DSZ, 8'h30); alu_z = 1; #1; check(!seq.int_taken, "interrupt waits during a skip");
    alu_z = 0; irq_tx = 0; intcr = 0;
    // ------------------------------------------- multi-cycle AR loads
    @(negedge clk);
    wait (mc_en); @(negedge clk);
    ir = i_op(OP_MOV_AR0_RN, 8'h40);
    cyc = 0;
    do begin
      @(posedge clk);
      if (mc_en) begin
        check(ctrl.ar0_load && ctrl.ar_idx == 2'(cyc), $sformatf("AR0 byte %0d", cyc));
        cyc++;
      end
    end while (!(mc_en && !ctrl.hold));
    check(cyc == 4, $sformatf("MOV AR0,Rn took %0d machine cycles", cyc));
    @(negedge clk);
    ir = i_op(OP_MOV_AR1_RN, 8'h40);
    cyc = 0;
    do begin
      @(posedge clk);
      if (mc_en) begin check(ctrl.ar1_load && ctrl.ar_idx == 2'(cyc), "AR1 byte"); cyc++; end
    end while (!(mc_en && !ctrl.hold));
    check(cyc == 2, $sformatf("MOV AR1,Rn took %0d machine cycles", cyc));
    // ------------------------------------------------------ SFR strobes
    @(negedge clk);
    ir = i_op(OP_MOV_AR0M_RN, 8'h40);
    for (int k = 0; k < 10; k++) begin
      @(posedge clk); #1;
      check(!sfr_ce_n && sfr_oe_n && sfr_drive, "write cycle: ce low, oe high, bus driven");
      check(sfr_we_n == (mc_en || dut.phase == 0), "we_n low only inside the cycle");
    end
    @(negedge clk); ir = i_op(OP_MOV_RN_AR0, 8'h40); #1;
    check(!sfr_ce_n && !sfr_oe_n && sfr_we_n && !sfr_drive, "read cycle strobes");
    @(negedge clk); ir = i_op(OP_NOP); #1;
    check(sfr_ce_n && sfr_oe_n && sfr_we_n, "flash idle");
    check(mc_bad == 0 && n_mc > 5, $sformatf("machine cycle is 5 clocks (%0d bad of %0d)", mc_bad, n_mc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
