// r8_decoder: R8 instruction decoding.
//
// Combinational. Maps the 16-bit instruction register to one of the 28
// instruction classes of r8_pkg::instr_e and, for jumps, to the condition
// tested:
//   IR[15:12] = 0..A  ADD SUB AND OR XOR ADDI SUBI LDL LDH LD ST
//   IR[15:12] = B     IR[3:0] = 0..A: SL0 SL1 SR0 SR1 NOT NOP HALT LDSP RTS
//                     POP PUSH
//   IR[15:12] = C     IR[3:0] = 0..4: register-relative jumps (always, n, z,
//                     c, v); 5..9: absolute jumps (same order); A: JSRR;
//                     B: JSR
//   IR[15:12] = D     unconditional short jump, 10-bit displacement
//   IR[15:12] = E     conditional short jump, IR[11:10] = 0..3 selects
//                     n, z, c, v; 10-bit displacement in IR[9:0]
//   IR[15:12] = F     JSRD, 12-bit displacement
// The grouping of the 15 jumps into three classes and the bit fields follow
// the specification. Codes the instruction table leaves unused (IR[15:12] =
// B with IR[3:0] above A, IR[15:12] = C with IR[3:0] above B) decode as
// NOP; that is this design's choice.
module r8_decoder
  import r8_pkg::*;
(
  input  word_t  ir,
  output instr_e instr,
  output cond_e  cond
);

  always_comb begin
    instr = I_NOP;
    cond  = COND_ALWAYS;
    unique case (ir[15:12])
      OPC_ADD:  instr = I_ADD;
      OPC_SUB:  instr = I_SUB;
      OPC_AND:  instr = I_AND;
      OPC_OR:   instr = I_OR;
      OPC_XOR:  instr = I_XOR;
      OPC_ADDI: instr = I_ADDI;
      OPC_SUBI: instr = I_SUBI;
      OPC_LDL:  instr = I_LDL;
      OPC_LDH:  instr = I_LDH;
      OPC_LD:   instr = I_LD;
      OPC_ST:   instr = I_ST;
      OPC_MISC: begin
        unique case (ir[3:0])
          4'h0:    instr = I_SL0;
          4'h1:    instr = I_SL1;
          4'h2:    instr = I_SR0;
          4'h3:    instr = I_SR1;
          4'h4:    instr = I_NOT;
          4'h5:    instr = I_NOP;
          4'h6:    instr = I_HALT;
          4'h7:    instr = I_LDSP;
          4'h8:    instr = I_RTS;
          4'h9:    instr = I_POP;
          4'hA:    instr = I_PUSH;
          default: instr = I_NOP;
        endcase
      end
      OPC_JREG: begin
        unique case (ir[3:0])
          4'h0, 4'h1, 4'h2, 4'h3, 4'h4: begin
            instr = I_JUMPR;
            cond  = cond_e'(ir[2:0]);
          end
          4'h5, 4'h6, 4'h7, 4'h8, 4'h9: begin
            instr = I_JUMP;
            cond  = cond_e'(3'(ir[3:0] - 4'h5));
          end
          4'hA:    instr = I_JSRR;
          4'hB:    instr = I_JSR;
          default: instr = I_NOP;
        endcase
      end
      OPC_JMPD: instr = I_JUMPD;
      OPC_JCD: begin
        instr = I_JUMPD;
        cond  = cond_e'({1'b0, ir[11:10]} + 3'd1);
      end
      OPC_JSRD: instr = I_JSRD;
      default:  instr = I_NOP;
    endcase
  end

endmodule
