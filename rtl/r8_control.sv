// r8_control: the R8 control unit.
//
// Three parts: instruction decoding (r8_decoder), the control finite state
// machine, and the generation of the multiplexer selects. Each clock cycle it
// issues one microinstruction (r8_pkg::uins_t, 18 signals) to the datapath.
//
// Timing: the state register changes on the rising edge of ck; the datapath
// executes the microinstruction on the following falling edge. The next
// state is therefore computed from the IR and flags the datapath wrote on the
// previous falling edge. Reset (asynchronous, active high) enters S_FETCH.
//
// State sequence (13 states, cycle counts per instruction in brackets):
//   S_FETCH  IR <- MEM(PC), PC <- PC + 1                          all
//   S_RREG   RA <- S1, RB <- S2                                   all but HALT
//   S_HALT   stays until reset                                    HALT [2+]
//   S_ALU    RALU <- ALU(opA, opB), flags as the instruction says  then:
//     S_WBK  Rt <- RALU                  logic/arithmetic, LDL/LDH [4]
//     S_LD   Rt <- MEM(RALU)             LD   [4]
//     S_ST   MEM(RALU) <- Rt             ST   [4]
//     S_JMP  PC <- RALU                  jump with condition true [4]
//     S_SBRT MEM(SP) <- PC, SP <- SP - 1, PC <- RALU   JSRR/JSR/JSRD [4]
//     S_PUSH MEM(SP) <- Rt, SP <- SP - 1               PUSH [4]
//     S_RTS  PC <- MEM(RALU), SP <- RALU (RALU = SP+1) RTS  [4]
//     S_POP  Rt <- MEM(RALU), SP <- RALU               POP  [4]
//     S_LDSP SP <- RALU                                LDSP [4]
//     back to S_FETCH directly for NOP and for a jump whose condition is
//     false [3].
// States, their register writes and memory accesses, and the multiplexer
// select equations follow the specification. JSR is included among the
// instructions that post-decrement SP (the specification's equation lists
// only JSRR, JSRD and PUSH, while its instruction table gives SP <- SP - 1
// for JSR as well).
module r8_control
  import r8_pkg::*;
(
  input  logic   ck,
  input  logic   rst,
  input  word_t  ir,
  input  flags_t flags,
  output uins_t  uins
);

  instr_e i;
  cond_e  cond;
  state_e state, state_nx;
  logic   inst_la1, inst_la2, cond_true;

  r8_decoder u_dec (
    .ir   (ir),
    .instr(i),
    .cond (cond)
  );

  // type 1: binary/unary operations on source registers;
  // type 2: operations whose source is the target register itself
  assign inst_la1 = i inside {I_ADD, I_SUB, I_AND, I_OR, I_XOR,
                              I_SL0, I_SL1, I_SR0, I_SR1, I_NOT};
  assign inst_la2 = i inside {I_ADDI, I_SUBI, I_LDL, I_LDH};

  always_comb begin
    unique case (cond)
      COND_ALWAYS: cond_true = 1'b1;
      COND_N:      cond_true = flags.n;
      COND_Z:      cond_true = flags.z;
      COND_C:      cond_true = flags.c;
      COND_V:      cond_true = flags.v;
      default:     cond_true = 1'b0;
    endcase
  end

  // ---------------------------------------------------------------- FSM
  always_comb begin
    state_nx = S_FETCH;
    unique case (state)
      S_FETCH: state_nx = (i == I_HALT) ? S_HALT : S_RREG;
      S_RREG:  state_nx = S_ALU;
      S_HALT:  state_nx = S_HALT;
      S_ALU: begin
        if (inst_la1 || inst_la2)            state_nx = S_WBK;
        else unique case (i)
          I_LD:                       state_nx = S_LD;
          I_ST:                       state_nx = S_ST;
          I_JUMPR, I_JUMP, I_JUMPD:   state_nx = cond_true ? S_JMP : S_FETCH;
          I_JSRR, I_JSR, I_JSRD:      state_nx = S_SBRT;
          I_PUSH:                     state_nx = S_PUSH;
          I_RTS:                      state_nx = S_RTS;
          I_POP:                      state_nx = S_POP;
          I_LDSP:                     state_nx = S_LDSP;
          default:                    state_nx = S_FETCH;  // NOP
        endcase
      end
      default: state_nx = S_FETCH;
    endcase
  end

  always_ff @(posedge ck or posedge rst) begin
    if (rst) state <= S_FETCH;
    else     state <= state_nx;
  end

  // ALU operation for the instruction
  function automatic alu_op_e alu_of(input instr_e ins);
    unique case (ins)
      I_ADD:   return ALU_ADD;
      I_SUB:   return ALU_SUB;
      I_AND:   return ALU_AND;
      I_OR:    return ALU_OR;
      I_XOR:   return ALU_XOR;
      I_ADDI:  return ALU_ADDI;
      I_SUBI:  return ALU_SUBI;
      I_LDL:   return ALU_LDL;
      I_LDH:   return ALU_LDH;
      I_LD, I_ST, I_JUMPR, I_JSRR: return ALU_ADD;
      I_SL0:   return ALU_SL0;
      I_SL1:   return ALU_SL1;
      I_SR0:   return ALU_SR0;
      I_SR1:   return ALU_SR1;
      I_NOT:   return ALU_NOT;
      I_LDSP, I_JUMP, I_JSR: return ALU_PASS_A;
      I_RTS, I_POP: return ALU_INC_B;
      I_JUMPD: return ALU_DISP10;
      I_JSRD:  return ALU_DISP12;
      default: return ALU_ADD;
    endcase
  endfunction

  // ------------------------------------------------------ microinstruction
  always_comb begin
    uins = UINS_IDLE;

    // register write enables and memory accesses, by state
    unique case (state)
      S_FETCH: begin uins.wir = 1'b1; uins.wpc = 1'b1; uins.ce = 1'b1; uins.rw = 1'b1; end
      S_RREG:  uins.wab = 1'b1;
      S_ALU: begin
        uins.walu = 1'b1;
        uins.wnz  = inst_la1 || i inside {I_ADDI, I_SUBI};
        uins.wcv  = i inside {I_ADD, I_SUB, I_ADDI, I_SUBI};
      end
      S_WBK:   uins.wreg = 1'b1;
      S_LD:    begin uins.wreg = 1'b1; uins.ce = 1'b1; uins.rw = 1'b1; end
      S_ST:    begin uins.ce = 1'b1; uins.rw = 1'b0; end
      S_JMP:   uins.wpc = 1'b1;
      S_SBRT:  begin uins.wpc = 1'b1; uins.wsp = 1'b1; uins.ce = 1'b1; uins.rw = 1'b0; end
      S_PUSH:  begin uins.wsp = 1'b1; uins.ce = 1'b1; uins.rw = 1'b0; end
      S_RTS:   begin uins.wpc = 1'b1; uins.wsp = 1'b1; uins.ce = 1'b1; uins.rw = 1'b1; end
      S_POP:   begin uins.wreg = 1'b1; uins.wsp = 1'b1; uins.ce = 1'b1; uins.rw = 1'b1; end
      S_LDSP:  uins.wsp = 1'b1;
      default: ;  // S_HALT: nothing
    endcase

    // multiplexer selects
    uins.mpc  = (state == S_FETCH) ? MPC_INC :
                (state == S_RTS)   ? MPC_MEM : MPC_ALU;
    uins.msp  = (i inside {I_JSRR, I_JSR, I_JSRD, I_PUSH}) ? MSP_DEC : MSP_ALU;
    uins.mad  = (state == S_PUSH || state == S_SBRT) ? MAD_SP :
                (state == S_FETCH)                   ? MAD_PC : MAD_ALU;
    uins.mreg = (i inside {I_LD, I_POP}) ? MREG_MEM : MREG_ALU;
    uins.ms2  = (inst_la2 || i == I_PUSH || state == S_ST) ? MS2_RT : MS2_RS2;
    uins.ma   = (inst_la2 || i == I_JUMPD || i == I_JSRD) ? MA_IR : MA_RA;
    uins.mb   = (i inside {I_RTS, I_POP}) ? MB_SP :
                (i inside {I_JUMPR, I_JUMP, I_JUMPD, I_JSRR, I_JSR, I_JSRD}) ? MB_PC :
                MB_RB;
    uins.alu  = alu_of(i);
  end

endmodule
