// vmcore_pkg: types and constants shared by the VMCore voice-message
// microcontroller.
//
// VMCore is an 8-bit accumulator machine with a Harvard organisation: 16-bit
// instructions come from a program memory addressed by a 9-bit program
// counter, and all data lives in one 512-byte File Register (FR) address
// space. This package fixes the instruction word layout, the opcode
// numbering, the ALU operation codes, the FR address map and the bit
// positions inside the status, interrupt-control and I/O-status registers.
//
// Taken from the source design: the four instruction formats (bits 15:14
// select Data-transfer/Arithmetic/Logic/Control/ARDT, Bit, Call and Goto),
// the 8-bit FR_Address/Immediate field in bits 7:0, the sixteen ALU
// operations, and the FR map (R0-R3, A, SR, INTCR, R7, UART, DAC/IO_SR,
// PORTA, R0B-R0E, MADM decoder, general registers 010-0FF, System RAM
// 100-1FF). Chosen here: the numeric opcode values, the split of the Bit
// format into a 3-bit operation and a 3-bit bit number, and every bit
// position inside SR, INTCR and IO_SR.
package vmcore_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned DW     = 8;   // data path width
  localparam int unsigned FR_AW  = 9;   // File Register address (512 bytes)
  localparam int unsigned SFR_AW = 28;  // System Flash ROM address (AR0 width)
  localparam int unsigned AR1_W  = 16;  // coefficient address register width

  // ------------------------------------------------------ instruction word
  // [15:14] format, [13:8] OPC (format 00), [13:11] bit op + [10:8] bit
  // number (format 01), [13:0] absolute address (formats 10 and 11),
  // [7:0] FR address or immediate data.
  typedef enum logic [1:0] {
    FMT_OP   = 2'b00,
    FMT_BIT  = 2'b01,
    FMT_CALL = 2'b10,
    FMT_GOTO = 2'b11
  } fmt_e;

  typedef enum logic [5:0] {
    OP_NOP        = 6'h00,
    // data transfer
    OP_MOV_A_RN   = 6'h01,  // A <- Rn
    OP_MOV_RN_A   = 6'h02,  // Rn <- A
    OP_MOV_A_IMM  = 6'h03,  // A <- #data
    OP_MOV_R0_IMM = 6'h04,  // R0 <- #data
    OP_MOV_RN_IR0 = 6'h05,  // Rn <- FR[R0]
    OP_MOV_RN_IR0M= 6'h06,  // Rn <- RAM[R0]
    OP_MOV_IR0_RN = 6'h07,  // FR[R0] <- Rn
    OP_MOV_IR0M_RN= 6'h08,  // RAM[R0] <- Rn
    OP_MOV_RN_IR1A= 6'h09,  // Rn <- FR[R1+A]
    OP_MOV_RN_IR2 = 6'h0A,  // Rn <- RAM[R2]   (flags untouched)
    OP_MOV_IR2_RN = 6'h0B,  // RAM[R2] <- Rn   (flags untouched)
    OP_CLR        = 6'h0C,  // Rn <- 0
    // arithmetic
    OP_ADD_A_RN   = 6'h10,
    OP_ADDC_A_RN  = 6'h11,
    OP_ADD_A_IMM  = 6'h12,
    OP_ADD_RN_A   = 6'h13,
    OP_ADDC_RN_A  = 6'h14,
    OP_SUB_A_RN   = 6'h15,
    OP_SUBC_A_RN  = 6'h16,
    OP_SUB_A_IMM  = 6'h17,
    OP_SUB_RN_A   = 6'h18,
    OP_SUBC_RN_A  = 6'h19,
    OP_CMP_A_RN   = 6'h1A,
    OP_CMP_A_IMM  = 6'h1B,
    OP_INC        = 6'h1C,
    OP_DEC        = 6'h1D,
    OP_DSZ        = 6'h1E,
    // logic
    OP_AND_A_RN   = 6'h20,
    OP_AND_A_IMM  = 6'h21,
    OP_OR_A_RN    = 6'h22,
    OP_OR_A_IMM   = 6'h23,
    OP_XOR_A_RN   = 6'h24,
    OP_XOR_A_IMM  = 6'h25,
    OP_NOT        = 6'h26,
    OP_ROL        = 6'h27,
    OP_ROR        = 6'h28,
    // control (format 00)
    OP_RET        = 6'h30,
    OP_RETI       = 6'h31,
    OP_CWDT       = 6'h32,
    // address register data transfer
    OP_MOV_RN_AR0   = 6'h38,  // Rn <- SFR[AR0]
    OP_MOV_RN_AR0I  = 6'h39,  // AR0 <- AR0+1, Rn <- SFR[AR0]
    OP_MOV_RN_AR1   = 6'h3A,  // AR1 <- AR1<<BF, Rn <- SFR[AR1]
    OP_MOV_AR0_RN   = 6'h3B,  // AR0 byte i <- FR[Rn+i], i=0..3
    OP_MOV_AR1_RN   = 6'h3C,  // AR1 byte i <- FR[Rn+i], i=0..1
    OP_MOV_AR0M_RN  = 6'h3D,  // SFR[AR0] <- Rn
    OP_MOV_AR0IM_RN = 6'h3E   // AR0 <- AR0+1, SFR[AR0] <- Rn
  } opc_e;

  typedef enum logic [2:0] {
    BOP_SETB = 3'd0,
    BOP_CLRB = 3'd1,
    BOP_TBSS = 3'd2,   // skip next if bit set
    BOP_TBSC = 3'd3,   // skip next if bit clear
    BOP_LDBF = 3'd4    // BF <- bit
  } bop_e;

  // ------------------------------------------------------------------ ALU
  typedef enum logic [3:0] {
    ALU_PASS = 4'd0,   // B
    ALU_ZERO = 4'd1,   // 0
    ALU_ADD  = 4'd2,   // A + B
    ALU_ADC  = 4'd3,   // A + B + C
    ALU_SUB  = 4'd4,   // A - B
    ALU_SBC  = 4'd5,   // A - B - C
    ALU_INC  = 4'd6,   // A + 1
    ALU_DEC  = 4'd7,   // A - 1
    ALU_AND  = 4'd8,
    ALU_OR   = 4'd9,
    ALU_XOR  = 4'd10,
    ALU_NOT  = 4'd11,  // not B
    ALU_ROL  = 4'd12,  // rotate B left through carry
    ALU_ROR  = 4'd13,  // rotate B right through carry
    ALU_SETB = 4'd14,  // B with bit i set
    ALU_CLRB = 4'd15   // B with bit i cleared
  } alu_op_e;

  typedef enum logic {
    AMUX_ACC  = 1'b0,
    AMUX_DOUT = 1'b1
  } amux_e;

  typedef enum logic [2:0] {
    BMUX_DOUT = 3'd0,  // FR read data
    BMUX_IMM  = 3'd1,  // IR_L immediate
    BMUX_DBUS = 3'd2,  // SFR data bus
    BMUX_ZERO = 3'd3,  // #0
    BMUX_ONE  = 3'd4   // #1
  } bmux_e;

  // FR read address source
  typedef enum logic [2:0] {
    RA_IRL    = 3'd0,  // direct FR address from IR_L
    RA_R0_FR  = 3'd1,  // {0,R0}
    RA_R0_RAM = 3'd2,  // {1,R0}
    RA_R1A    = 3'd3,  // {0,R1+A}
    RA_R2_RAM = 3'd4   // {1,R2}
  } ra_sel_e;

  // FR write address source
  typedef enum logic [2:0] {
    WA_IRL    = 3'd0,
    WA_ACC    = 3'd1,
    WA_R0     = 3'd2,
    WA_R0_FR  = 3'd3,
    WA_R0_RAM = 3'd4,
    WA_R2_RAM = 3'd5
  } wa_sel_e;

  // next instruction fetch address source
  typedef enum logic [1:0] {
    FETCH_PC   = 2'd0,  // sequential prefetch
    FETCH_ABS  = 2'd1,  // Goto / Call absolute address
    FETCH_PULL = 2'd2,  // RET / RETI: top of the PC stack
    FETCH_INT  = 2'd3   // interrupt vector
  } fetch_sel_e;

  // ------------------------------------------------------------ FR map
  localparam logic [7:0] FR_R0    = 8'h00;
  localparam logic [7:0] FR_R1    = 8'h01;
  localparam logic [7:0] FR_R2    = 8'h02;
  localparam logic [7:0] FR_R3    = 8'h03;
  localparam logic [7:0] FR_ACC   = 8'h04;
  localparam logic [7:0] FR_SR    = 8'h05;
  localparam logic [7:0] FR_INTCR = 8'h06;
  localparam logic [7:0] FR_R7    = 8'h07;
  localparam logic [7:0] FR_UART  = 8'h08;  // write: TxD, read: RxD
  localparam logic [7:0] FR_DAC   = 8'h09;  // write: DAC, read: IO_SR
  localparam logic [7:0] FR_PORTA = 8'h0A;
  localparam logic [7:0] FR_MADM  = 8'h0F;  // write: code byte, read: status
  localparam logic [8:0] FR_RAM_BASE = 9'h100;  // System RAM

  // SR bits
  localparam int unsigned SR_C  = 0;
  localparam int unsigned SR_Z  = 1;
  localparam int unsigned SR_BF = 2;

  // INTCR bits
  localparam int unsigned INT_IEN  = 0;  // global interrupt enable
  localparam int unsigned INT_EUR  = 1;  // UART byte received
  localparam int unsigned INT_EUT  = 2;  // UART transmitter idle
  localparam int unsigned INT_EMD  = 3;  // MADM decoder wants a code byte
  localparam int unsigned INT_WDTE = 7;  // watchdog enable

  // IO_SR bits
  localparam int unsigned IO_RXR  = 0;  // received byte waiting
  localparam int unsigned IO_TXB  = 1;  // transmitter busy
  localparam int unsigned IO_OVR  = 2;  // receive overrun
  localparam int unsigned IO_MREQ = 3;  // MADM decoder buffer empty while playing
  localparam int unsigned IO_DACB = 4;  // DAC serial transfer in progress

  // MADM status register bits
  localparam int unsigned MD_FULL = 0;  // code buffer holds a byte
  localparam int unsigned MD_RUN  = 1;  // decoder is playing
  localparam int unsigned MD_REQ  = 2;  // decoder playing with an empty buffer

  // ------------------------------------------------- control unit outputs
  typedef struct packed {
    alu_op_e    alu_op;
    amux_e      a_sel;
    bmux_e      b_sel;
    ra_sel_e    ra_sel;
    wa_sel_e    wa_sel;
    logic       fr_we;      // write DIN into the FR
    logic       fr_rd;      // the instruction reads DOUT (I/O read side effects)
    logic       c_we;       // update C from the ALU
    logic       z_we;       // update Z from the ALU
    logic       bf_we;      // update BF from the skip flag
    fetch_sel_e fetch_sel;  // PC source chosen by the instruction itself
    logic       hold;       // keep IR_H and PC (multi-cycle instruction)
    logic       ir_count;   // IR_L <- IR_L + 1
    logic       push;       // PC stack push
    logic       pull;       // PC stack pull
    logic       ien_set;
    logic       ar0_load;   // load one byte of AR0 from DIN
    logic       ar1_load;   // load one byte of AR1 from DIN
    logic [1:0] ar_idx;     // which byte
    logic       ar0_inc;    // AR0 <- AR0 + 1 (address bus shows the new value)
    logic       ar1_shift;  // AR1 <- AR1<<BF (address bus shows the new value)
    logic       addr_ar1;   // Addr_Mux selects AR1
    logic       sfr_rd;
    logic       sfr_wr;
    logic       wdt_clr;
  } ctrl_t;

  // sequencing decisions that depend on the ALU result or on interrupts
  typedef struct packed {
    fetch_sel_e fetch_sel;  // final PC source
    logic       push;       // PC stack push (CALL or interrupt)
    logic       bubble;     // replace the prefetched word by a NOP (skip)
    logic       ien_clr;    // interrupt accepted: clear IEN
    logic       int_taken;
    logic       push_abs;   // push the GOTO target instead of the PC
  } seq_t;

endpackage
