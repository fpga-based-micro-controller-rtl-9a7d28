// vmcore_cu: VMCore control unit.
//
// The control unit decodes the instruction in the IR into the control word
// ctrl (multiplexer selects for A_mux, B_mux, the FR read and write address,
// the ALU operation, write enables, PC source, stack and address-register
// controls), keeps the machine-cycle timing, sequences the multi-cycle
// instructions, decides skips and accepts interrupts. It also drives the
// SFR control bus.
//
// Timing. A machine cycle (MC) is CLK_PER_MC clocks; mc_en is high in its
// last clock, and every architectural register of the core changes only at
// that edge. The source design runs a 20 MHz clock with a 250 ns machine
// cycle, hence the default of 5. One instruction executes per MC, with the
// next one prefetched in parallel, except:
//   * DSZ, TBSS, TBSC take a second MC when they skip: the prefetched word is
//     replaced by a NOP (bubble);
//   * MOV AR0,Rn takes 4 MCs and MOV AR1,Rn 2 MCs: IR_H and the PC hold,
//     IR_L counts through Rn, Rn+1, ... and one address-register byte is
//     loaded per MC (step gives its number).
// SFR bus: during an MC that reads the flash, ce_n and oe_n are low for the
// whole MC and the data is taken at the closing edge; during an MC that
// writes it, the core drives the data bus for the whole MC and we_n is low
// from the second to the last-but-one clock, so address and data are
// stable around the we_n pulse (CLK_PER_MC must be at least 3).
//
// Interrupts: an interrupt is taken at the end of an MC when IEN (INTCR.0) is
// set and an enabled source is active (UART byte received, UART transmitter
// idle, MADM decoder buffer empty). The word about to be fetched is not
// loaded; its address is pushed on the PC stack, fetching continues at the
// vector and IEN is cleared. RETI sets IEN again. On a GOTO the interrupt is
// taken too, and the GOTO's target is pushed, so a program that waits in a
// jump loop can be interrupted. An interrupt waits while the current
// instruction uses the stack itself (CALL, RET, RETI), during a taken skip,
// and in the middle of a multi-cycle load.
//
// From the source design: the instruction set, the cycle counts, the skip
// behaviour, IEN and RETI, the four PC sources. Chosen here: the opcode
// numbers, which instructions change which flags (the document only says
// that the (R2) moves leave SR alone; here every data-transfer instruction
// except those and the address-register group updates Z, arithmetic also C,
// INC/DEC/DSZ only Z), the interrupt sources and enable bits, the vector and
// the bubble-based skip.
module vmcore_cu
  import vmcore_pkg::*;
#(
  parameter int unsigned CLK_PER_MC = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] ir,
  input  logic        alu_z,      // DSZ: result is zero
  input  logic        sf,         // skip flag from the ALU
  input  logic [7:0]  intcr,
  input  logic        irq_rx,     // UART byte received
  input  logic        irq_tx,     // UART transmitter idle
  input  logic        irq_madm,   // MADM decoder wants data
  output ctrl_t       ctrl,       // decoded control word
  output seq_t        seq,        // skip and interrupt decisions
  output logic        mc_en,      // last clock of the machine cycle
  output logic [1:0]  step,       // step of a multi-cycle instruction
  output logic        sfr_ce_n,
  output logic        sfr_oe_n,
  output logic        sfr_we_n,
  output logic        sfr_drive   // core drives the SFR data bus
);

  if (CLK_PER_MC < 3) begin : g_bad_mc
    $error("CLK_PER_MC must be at least 3");
  end

  localparam int unsigned PH_W = $clog2(CLK_PER_MC);
  logic [PH_W-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                phase <= '0;
    else if (phase == PH_W'(CLK_PER_MC - 1))  phase <= '0;
    else                                       phase <= phase + 1'b1;
  end
  assign mc_en = (phase == PH_W'(CLK_PER_MC - 1));

  fmt_e  fmt;
  opc_e  opc;
  bop_e  bop;
  assign fmt = fmt_e'(ir[15:14]);
  assign opc = opc_e'(ir[13:8]);
  assign bop = bop_e'(ir[13:11]);

  logic skip, flow, is_goto, irq;
  ctrl_t c;

  always_comb begin
    c         = '0;
    c.alu_op  = ALU_PASS;
    c.a_sel   = AMUX_ACC;
    c.b_sel   = BMUX_DOUT;
    c.ra_sel  = RA_IRL;
    c.wa_sel  = WA_IRL;
    c.fetch_sel = FETCH_PC;
    skip      = 1'b0;
    flow      = 1'b0;
    is_goto   = 1'b0;
    unique case (fmt)
      FMT_OP: begin
        unique case (opc)
          // ------------------------------------------------ data transfer
          OP_MOV_A_RN:    begin c.wa_sel = WA_ACC; c.fr_we = 1; c.fr_rd = 1; c.z_we = 1; end
          OP_MOV_RN_A:    begin c.alu_op = ALU_ADD; c.b_sel = BMUX_ZERO; c.fr_we = 1; c.z_we = 1; end
          OP_MOV_A_IMM:   begin c.b_sel = BMUX_IMM; c.wa_sel = WA_ACC; c.fr_we = 1; c.z_we = 1; end
          OP_MOV_R0_IMM:  begin c.b_sel = BMUX_IMM; c.wa_sel = WA_R0;  c.fr_we = 1; c.z_we = 1; end
          OP_MOV_RN_IR0:  begin c.ra_sel = RA_R0_FR;  c.fr_we = 1; c.fr_rd = 1; c.z_we = 1; end
          OP_MOV_RN_IR0M: begin c.ra_sel = RA_R0_RAM; c.fr_we = 1; c.fr_rd = 1; c.z_we = 1; end
          OP_MOV_IR0_RN:  begin c.wa_sel = WA_R0_FR;  c.fr_we = 1; c.fr_rd = 1; c.z_we = 1; end
          OP_MOV_IR0M_RN: begin c.wa_sel = WA_R0_RAM; c.fr_we = 1; c.fr_rd = 1; c.z_we = 1; end
          OP_MOV_RN_IR1A: begin c.ra_sel = RA_R1A;    c.fr_we = 1; c.fr_rd = 1; c.z_we = 1; end
          OP_MOV_RN_IR2:  begin c.ra_sel = RA_R2_RAM; c.fr_we = 1; c.fr_rd = 1; end
          OP_MOV_IR2_RN:  begin c.wa_sel = WA_R2_RAM; c.fr_we = 1; c.fr_rd = 1; end
          OP_CLR:         begin c.alu_op = ALU_ZERO; c.fr_we = 1; c.z_we = 1; end
          // --------------------------------------------------- arithmetic
          OP_ADD_A_RN:  begin c.alu_op = ALU_ADD; c.wa_sel = WA_ACC; c.fr_we = 1; c.fr_rd = 1; c.c_we = 1; c.z_we = 1; end
          OP_ADDC_A_RN: begin c.alu_op = ALU_ADC; c.wa_sel = WA_ACC; c.fr_we = 1; c.fr_rd = 1; c.c_we = 1; c.z_we = 1; end
          OP_ADD_A_IMM: begin c.alu_op = ALU_ADD; c.b_sel = BMUX_IMM; c.wa_sel = WA_ACC; c.fr_we = 1; c.c_we = 1; c.z_we = 1; end
          OP_ADD_RN_A:  begin c.alu_op = ALU_ADD; c.fr_we = 1; c.fr_rd = 1; c.c_we = 1; c.z_we = 1; end
          OP_ADDC_RN_A: begin c.alu_op = ALU_ADC; c.fr_we = 1; c.fr_rd = 1; c.c_we = 1; c.z_we = 1; end
          OP_SUB_A_RN:  begin c.alu_op = ALU_SUB; c.wa_sel = WA_ACC; c.fr_we = 1; c.fr_rd = 1; c.c_we = 1; c.z_we = 1; end
          OP_SUBC_A_RN: begin c.alu_op = ALU_SBC; c.wa_sel = WA_ACC; c.fr_we = 1; c.fr_rd = 1; c.c_we = 1; c.z_we = 1; end
          OP_SUB_A_IMM: begin c.alu_op = ALU_SUB; c.b_sel = BMUX_IMM; c.wa_sel = WA_ACC; c.fr_we = 1; c.c_we = 1; c.z_we = 1; end
          OP_SUB_RN_A:  begin c.alu_op = ALU_SUB; c.fr_we = 1; c.fr_rd = 1; c.c_we = 1; c.z_we = 1; end
          OP_SUBC_RN_A: begin c.alu_op = ALU_SBC; c.fr_we = 1; c.fr_rd = 1; c.c_we = 1; c.z_we = 1; end
          OP_CMP_A_RN:  begin c.alu_op = ALU_SUB; c.fr_rd = 1; c.c_we = 1; c.z_we = 1; end
          OP_CMP_A_IMM: begin c.alu_op = ALU_SUB; c.b_sel = BMUX_IMM; c.c_we = 1; c.z_we = 1; end
          OP_INC:       begin c.alu_op = ALU_INC; c.a_sel = AMUX_DOUT; c.fr_we = 1; c.fr_rd = 1; c.z_we = 1; end
          OP_DEC:       begin c.alu_op = ALU_DEC; c.a_sel = AMUX_DOUT; c.fr_we = 1; c.fr_rd = 1; c.z_we = 1; end
          OP_DSZ:       begin c.alu_op = ALU_DEC; c.a_sel = AMUX_DOUT; c.fr_we = 1; c.fr_rd = 1; c.z_we = 1;
                              skip = alu_z; end
          // -------------------------------------------------------- logic
          OP_AND_A_RN:  begin c.alu_op = ALU_AND; c.wa_sel = WA_ACC; c.fr_we = 1; c.fr_rd = 1; c.z_we = 1; end
          OP_AND_A_IMM: begin c.alu_op = ALU_AND; c.b_sel = BMUX_IMM; c.wa_sel = WA_ACC; c.fr_we = 1; c.z_we = 1; end
          OP_OR_A_RN:   begin c.alu_op = ALU_OR;  c.wa_sel = WA_ACC; c.fr_we = 1; c.fr_rd = 1; c.z_we = 1; end
          OP_OR_A_IMM:  begin c.alu_op = ALU_OR;  c.b_sel = BMUX_IMM; c.wa_sel = WA_ACC; c.fr_we = 1; c.z_we = 1; end
          OP_XOR_A_RN:  begin c.alu_op = ALU_XOR; c.wa_sel = WA_ACC; c.fr_we = 1; c.fr_rd = 1; c.z_we = 1; end
          OP_XOR_A_IMM: begin c.alu_op = ALU_XOR; c.b_sel = BMUX_IMM; c.wa_sel = WA_ACC; c.fr_we = 1; c.z_we = 1; end
          OP_NOT:       begin c.alu_op = ALU_NOT; c.fr_we = 1; c.fr_rd = 1; c.z_we = 1; end
          OP_ROL:       begin c.alu_op = ALU_ROL; c.fr_we = 1; c.fr_rd = 1; c.c_we = 1; c.z_we = 1; end
          OP_ROR:       begin c.alu_op = ALU_ROR; c.fr_we = 1; c.fr_rd = 1; c.c_we = 1; c.z_we = 1; end
          // ------------------------------------------------------ control
          OP_RET:       begin c.fetch_sel = FETCH_PULL; c.pull = 1; flow = 1; end
          OP_RETI:      begin c.fetch_sel = FETCH_PULL; c.pull = 1; c.ien_set = 1; flow = 1; end
          OP_CWDT:      c.wdt_clr = 1;
          // -------------------------------- address register data transfer
          OP_MOV_RN_AR0:   begin c.b_sel = BMUX_DBUS; c.fr_we = 1; c.sfr_rd = 1; end
          OP_MOV_RN_AR0I:  begin c.b_sel = BMUX_DBUS; c.fr_we = 1; c.sfr_rd = 1; c.ar0_inc = 1; end
          OP_MOV_RN_AR1:   begin c.b_sel = BMUX_DBUS; c.fr_we = 1; c.sfr_rd = 1; c.ar1_shift = 1; c.addr_ar1 = 1; end
          OP_MOV_AR0_RN:   begin c.fr_rd = 1; c.ar0_load = 1; c.ar_idx = step;
                                 c.hold = (step != 2'd3); c.ir_count = c.hold; end
          OP_MOV_AR1_RN:   begin c.fr_rd = 1; c.ar1_load = 1; c.ar_idx = step;
                                 c.hold = (step != 2'd1); c.ir_count = c.hold; end
          OP_MOV_AR0M_RN:  begin c.fr_rd = 1; c.sfr_wr = 1; end
          OP_MOV_AR0IM_RN: begin c.fr_rd = 1; c.sfr_wr = 1; c.ar0_inc = 1; end
          default: ;  // NOP and unassigned codes
        endcase
      end
      FMT_BIT: begin
        c.fr_rd = 1;
        unique case (bop)
          BOP_SETB: begin c.alu_op = ALU_SETB; c.fr_we = 1; end
          BOP_CLRB: begin c.alu_op = ALU_CLRB; c.fr_we = 1; end
          BOP_TBSS: skip = sf;
          BOP_TBSC: skip = !sf;
          BOP_LDBF: c.bf_we = 1;
          default: ;
        endcase
      end
      FMT_CALL: begin c.fetch_sel = FETCH_ABS; c.push = 1; flow = 1; end
      FMT_GOTO: begin c.fetch_sel = FETCH_ABS; flow = 1; is_goto = 1; end
    endcase

  end

  always_comb begin
    seq           = '0;
    seq.fetch_sel = c.fetch_sel;
    seq.push      = c.push;
    seq.bubble    = skip;
    irq = intcr[INT_IEN] &&
          ((irq_rx && intcr[INT_EUR]) || (irq_tx && intcr[INT_EUT]) || (irq_madm && intcr[INT_EMD]));
    if (irq && (!flow || is_goto) && !skip && !c.hold) begin
      seq.fetch_sel = FETCH_INT;
      seq.push      = 1'b1;
      seq.ien_clr   = 1'b1;
      seq.int_taken = 1'b1;
      seq.push_abs  = is_goto;
    end
  end

  assign ctrl = c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     step <= '0;
    else if (mc_en) step <= c.hold ? step + 2'd1 : 2'd0;
  end

  // SFR control bus
  logic we_window;
  assign we_window = (phase != '0) && (phase != PH_W'(CLK_PER_MC - 1));
  assign sfr_ce_n  = !(c.sfr_rd || c.sfr_wr);
  assign sfr_oe_n  = !c.sfr_rd;
  assign sfr_we_n  = !(c.sfr_wr && we_window);
  assign sfr_drive = c.sfr_wr;

endmodule
