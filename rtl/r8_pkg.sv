// r8_pkg: types and constants shared by the R8 processor modules.
//
// The R8 is a 16-bit load-store machine: 16 general registers of 16 bits,
// 16-bit word-addressed memory, fixed 16-bit instructions, and four status
// flags (n, z, c, v). This package holds
//   - the opcode values of IR[15:12] from the instruction set table,
//   - the 28 instruction classes the decoder produces (the 40 mnemonics with
//     the five relative, five absolute and five short-displacement jumps each
//     grouped into one class),
//   - the ALU operation codes,
//   - the 13 states of the control FSM,
//   - the microinstruction: the 18 control signals the control unit sends to
//     the datapath every cycle (8 write enables, ce and rw, 7 multiplexer
//     selects and the ALU operation).
// The class grouping, state names, multiplexer encodings and signal names
// follow the specification. The ALU operation encoding, the extra
// ALU_INC_B / ALU_PASS_A / ALU_DISP* operations and the decoding of opcode
// values the instruction table leaves unused (decoded as NOP) are this
// design's choices.
package r8_pkg;

  localparam int unsigned WORD_W = 16;
  typedef logic [WORD_W-1:0] word_t;

  // status flags, in the order n, z, c, v (bit 3 down to bit 0)
  typedef struct packed {
    logic n;
    logic z;
    logic c;
    logic v;
  } flags_t;

  // IR[15:12]
  localparam logic [3:0] OPC_ADD  = 4'h0;
  localparam logic [3:0] OPC_SUB  = 4'h1;
  localparam logic [3:0] OPC_AND  = 4'h2;
  localparam logic [3:0] OPC_OR   = 4'h3;
  localparam logic [3:0] OPC_XOR  = 4'h4;
  localparam logic [3:0] OPC_ADDI = 4'h5;
  localparam logic [3:0] OPC_SUBI = 4'h6;
  localparam logic [3:0] OPC_LDL  = 4'h7;
  localparam logic [3:0] OPC_LDH  = 4'h8;
  localparam logic [3:0] OPC_LD   = 4'h9;
  localparam logic [3:0] OPC_ST   = 4'hA;
  localparam logic [3:0] OPC_MISC = 4'hB;  // shifts, NOT, NOP, HALT, stack
  localparam logic [3:0] OPC_JREG = 4'hC;  // register jumps and calls
  localparam logic [3:0] OPC_JMPD = 4'hD;  // unconditional short jump
  localparam logic [3:0] OPC_JCD  = 4'hE;  // conditional short jumps
  localparam logic [3:0] OPC_JSRD = 4'hF;

  // The 28 instruction classes.
  typedef enum logic [4:0] {
    I_ADD, I_SUB, I_AND, I_OR, I_XOR,
    I_ADDI, I_SUBI, I_LDL, I_LDH,
    I_LD, I_ST,
    I_SL0, I_SL1, I_SR0, I_SR1, I_NOT,
    I_NOP, I_HALT, I_LDSP, I_RTS, I_POP, I_PUSH,
    I_JUMPR,   // PC <- PC + Rs1, conditions none/n/z/c/v
    I_JUMP,    // PC <- Rs1,      conditions none/n/z/c/v
    I_JUMPD,   // PC <- PC + sext(disp10), conditions none/n/z/c/v
    I_JSRR, I_JSR, I_JSRD
  } instr_e;

  // Condition tested by a jump
  typedef enum logic [2:0] {
    COND_ALWAYS, COND_N, COND_Z, COND_C, COND_V
  } cond_e;

  // ALU operations. A is opA (RA or IR), B is opB (RB, SP or PC).
  typedef enum logic [4:0] {
    ALU_ADD,      // A + B
    ALU_SUB,      // A - B
    ALU_AND,
    ALU_OR,
    ALU_XOR,
    ALU_ADDI,     // B + zext(A[7:0])
    ALU_SUBI,     // B - zext(A[7:0])
    ALU_LDL,      // B[15:8] & A[7:0]
    ALU_LDH,      // A[7:0] & B[7:0]
    ALU_SL0,      // A[14:0] & 0
    ALU_SL1,      // A[14:0] & 1
    ALU_SR0,      // 0 & A[15:1]
    ALU_SR1,      // 1 & A[15:1]
    ALU_NOT,      // not A
    ALU_PASS_A,   // A             (LDSP, absolute jumps and calls)
    ALU_INC_B,    // B + 1         (SP + 1 for RTS and POP)
    ALU_DISP10,   // B + sext(A[9:0])   (short jumps)
    ALU_DISP12    // B + sext(A[11:0])  (JSRD)
  } alu_op_e;

  // Control FSM states (Figure 13 names)
  typedef enum logic [3:0] {
    S_FETCH, S_RREG, S_HALT, S_ALU, S_WBK, S_LD, S_ST, S_JMP,
    S_SBRT, S_PUSH, S_RTS, S_POP, S_LDSP
  } state_e;

  // Multiplexer encodings
  localparam logic [1:0] MPC_MEM  = 2'b00;  // PC <- memory data (RTS)
  localparam logic [1:0] MPC_ALU  = 2'b01;  // PC <- RALU
  localparam logic [1:0] MPC_INC  = 2'b10;  // PC <- PC + 1 (fetch)
  localparam logic       MSP_ALU  = 1'b0;   // SP <- RALU
  localparam logic       MSP_DEC  = 1'b1;   // SP <- SP - 1
  localparam logic [1:0] MAD_ALU  = 2'b00;  // address <- RALU (LD/ST/RTS/POP)
  localparam logic [1:0] MAD_PC   = 2'b01;  // address <- PC (fetch)
  localparam logic [1:0] MAD_SP   = 2'b10;  // address <- SP (calls, PUSH)
  localparam logic       MREG_ALU = 1'b0;   // register bank <- RALU
  localparam logic       MREG_MEM = 1'b1;   // register bank <- memory data
  localparam logic       MS2_RS2  = 1'b0;   // S2 addressed by IR[3:0]
  localparam logic       MS2_RT   = 1'b1;   // S2 addressed by IR[11:8]
  localparam logic       MA_RA    = 1'b0;   // opA <- RA
  localparam logic       MA_IR    = 1'b1;   // opA <- IR
  localparam logic [1:0] MB_RB    = 2'b00;  // opB <- RB
  localparam logic [1:0] MB_SP    = 2'b01;  // opB <- SP
  localparam logic [1:0] MB_PC    = 2'b10;  // opB <- PC

  // The microinstruction: 18 control signals
  typedef struct packed {
    // register write enables (8)
    logic     wpc;
    logic     wsp;
    logic     wir;
    logic     wab;
    logic     walu;
    logic     wreg;
    logic     wnz;
    logic     wcv;
    // external memory access (2)
    logic     ce;
    logic     rw;    // 1 = read, 0 = write
    // multiplexer selects (7)
    logic [1:0] mpc;
    logic       msp;
    logic [1:0] mad;
    logic       mreg;
    logic       ms2;
    logic       ma;
    logic [1:0] mb;
    // ALU operation (1)
    alu_op_e  alu;
  } uins_t;

  localparam uins_t UINS_IDLE = '{
    wpc: 1'b0, wsp: 1'b0, wir: 1'b0, wab: 1'b0, walu: 1'b0, wreg: 1'b0,
    wnz: 1'b0, wcv: 1'b0, ce: 1'b0, rw: 1'b1,
    mpc: MPC_ALU, msp: MSP_ALU, mad: MAD_ALU, mreg: MREG_ALU, ms2: MS2_RS2,
    ma: MA_RA, mb: MB_RB, alu: ALU_ADD
  };

  // True when the instruction in ir writes a register value (not the PC) to
  // memory, i.e. ST or PUSH. It steers the multiplexer in front of the data
  // bus driver: register port S2 for these two, PC for subroutine calls.
  function automatic logic stores_register(input word_t ir);
    return (ir[15:12] == OPC_ST) ||
           (ir[15:12] == OPC_MISC && ir[3:0] == 4'hA);
  endfunction

endpackage
