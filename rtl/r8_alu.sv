// r8_alu: the R8 arithmetic and logic unit.
//
// Purely combinational. opA is RA or the instruction register, opB is RB,
// SP or PC (the datapath multiplexers choose); op selects what is computed:
// the binary operations ADD/SUB/AND/OR/XOR, the immediate operations
// (ADDI/SUBI add or subtract the 8-bit constant IR[7:0] zero-extended from
// opB, LDL/LDH replace one byte of opB with the constant), the unary shifts
// and NOT of opA, a pass of opA (LDSP, absolute jumps), opB + 1 (SP + 1 for
// RTS and POP) and PC + sign-extended displacement (IR[9:0] for short jumps,
// IR[11:0] for JSRD).
// Flag outputs: n is bit 15 of the result, z is set when the result is zero,
// c is the carry out of bit 15 of the adder and v is two's-complement
// overflow. For a subtraction the adder computes X + not(Y) + 1, so c = 1
// means no borrow. The datapath stores n/z and c/v only for the
// instructions that the instruction set marks Inz and Icv.
// The operation set follows the instruction set; the meaning of carry on
// subtraction is this design's choice, since the specification does not
// define it.
module r8_alu
  import r8_pkg::*;
(
  input  word_t   op_a,
  input  word_t   op_b,
  input  alu_op_e op,
  output word_t   result,
  output flags_t  flags
);

  // Shared adder: sum = x + y + cin, with carry out
  word_t      add_x, add_y;
  logic       add_cin;
  logic [16:0] add_sum;

  always_comb begin
    add_x   = op_a;
    add_y   = op_b;
    add_cin = 1'b0;
    unique case (op)
      ALU_SUB:    begin add_x = op_a; add_y = ~op_b;                   add_cin = 1'b1; end
      ALU_ADDI:   begin add_x = op_b; add_y = {8'h00, op_a[7:0]};      add_cin = 1'b0; end
      ALU_SUBI:   begin add_x = op_b; add_y = ~{8'h00, op_a[7:0]};     add_cin = 1'b1; end
      ALU_INC_B:  begin add_x = op_b; add_y = '0;                      add_cin = 1'b1; end
      ALU_DISP10: begin add_x = op_b; add_y = {{6{op_a[9]}}, op_a[9:0]};   add_cin = 1'b0; end
      ALU_DISP12: begin add_x = op_b; add_y = {{4{op_a[11]}}, op_a[11:0]}; add_cin = 1'b0; end
      default:    begin add_x = op_a; add_y = op_b;                    add_cin = 1'b0; end
    endcase
  end

  assign add_sum = {1'b0, add_x} + {1'b0, add_y} + {16'd0, add_cin};

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB, ALU_ADDI, ALU_SUBI,
      ALU_INC_B, ALU_DISP10, ALU_DISP12: result = add_sum[15:0];
      ALU_AND:    result = op_a & op_b;
      ALU_OR:     result = op_a | op_b;
      ALU_XOR:    result = op_a ^ op_b;
      ALU_LDL:    result = {op_b[15:8], op_a[7:0]};
      ALU_LDH:    result = {op_a[7:0], op_b[7:0]};
      ALU_SL0:    result = {op_a[14:0], 1'b0};
      ALU_SL1:    result = {op_a[14:0], 1'b1};
      ALU_SR0:    result = {1'b0, op_a[15:1]};
      ALU_SR1:    result = {1'b1, op_a[15:1]};
      ALU_NOT:    result = ~op_a;
      ALU_PASS_A: result = op_a;
      default:    result = add_sum[15:0];
    endcase
  end

  always_comb begin
    flags.n = result[15];
    flags.z = (result == '0);
    flags.c = add_sum[16];
    // overflow: both adder inputs have the same sign and the sum differs
    flags.v = (add_x[15] == add_y[15]) && (add_sum[15] != add_x[15]);
  end

endmodule
