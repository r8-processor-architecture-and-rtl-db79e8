// r8_datapath: the R8 datapath.
//
// Holds the architecture registers PC, SP, IR and the flags n/z/c/v, the
// register bank (r8_regbank), the ALU (r8_alu) and the internal registers RA
// and RB (the two register-bank outputs, loaded together by wab) and RALU
// (the ALU result, loaded by walu). Every register changes on the falling
// edge of ck, executing the microinstruction the control unit set up after
// the preceding rising edge. Reset (asynchronous, active high) clears all
// registers, so execution starts by fetching from address 0000h.
//
// Multiplexers (selects come from the microinstruction, encodings in r8_pkg):
//   PC    <- memory data (mpc=00), RALU (01), PC + 1 (10)
//   SP    <- RALU (msp=0), SP - 1 (1)
//   address <- RALU (mad=00), PC (01), SP (10)
//   register bank write data <- RALU (mreg=0), memory data (1)
//   opA   <- RA (ma=0), IR (1)
//   opB   <- RB (mb=00), SP (01), PC (10)
// The value written to memory is register-bank port S2 for ST and PUSH (S2
// then addresses the target register) and PC for subroutine calls.
// n and z are stored when wnz is 1, c and v when wcv is 1.
//
// Memory interface: address, data_out and data_in. The specification's
// single bidirectional data bus is split here into data_in (memory to
// processor) and data_out (processor to memory); data_out is meaningful when
// the control unit asserts ce = 1 with rw = 0. Choosing the stored value
// from the IR (ST or PUSH versus calls) is this design's reading of the
// data-out multiplexer, which the specification shows controlled by the
// instruction.
module r8_datapath
  import r8_pkg::*;
(
  input  logic   ck,
  input  logic   rst,
  input  uins_t  uins,
  output word_t  ir,
  output flags_t flags,
  output word_t  address,
  input  word_t  data_in,
  output word_t  data_out
);

  word_t  pc, sp, ra, rb, ralu;
  word_t  s1, s2, dtreg, op_a, op_b, outalu;
  flags_t alu_flags;

  // register bank
  assign dtreg = (uins.mreg == MREG_MEM) ? data_in : ralu;

  r8_regbank u_regs (
    .ck   (ck),
    .rst  (rst),
    .ir   (ir),
    .ms2  (uins.ms2),
    .wreg (uins.wreg),
    .dtreg(dtreg),
    .s1   (s1),
    .s2   (s2)
  );

  // ALU and its operand multiplexers
  assign op_a = (uins.ma == MA_IR) ? ir : ra;

  always_comb begin
    unique case (uins.mb)
      MB_SP:   op_b = sp;
      MB_PC:   op_b = pc;
      default: op_b = rb;
    endcase
  end

  r8_alu u_alu (
    .op_a  (op_a),
    .op_b  (op_b),
    .op    (uins.alu),
    .result(outalu),
    .flags (alu_flags)
  );

  // registers, all on the falling edge
  always_ff @(negedge ck or posedge rst) begin
    if (rst) begin
      pc    <= '0;
      sp    <= '0;
      ir    <= '0;
      ra    <= '0;
      rb    <= '0;
      ralu  <= '0;
      flags <= '0;
    end else begin
      if (uins.wpc) begin
        unique case (uins.mpc)
          MPC_MEM: pc <= data_in;
          MPC_INC: pc <= pc + 16'd1;
          default: pc <= ralu;
        endcase
      end
      if (uins.wsp) sp <= (uins.msp == MSP_DEC) ? sp - 16'd1 : ralu;
      if (uins.wir) ir <= data_in;
      if (uins.wab) begin
        ra <= s1;
        rb <= s2;
      end
      if (uins.walu) ralu <= outalu;
      if (uins.wnz) begin
        flags.n <= alu_flags.n;
        flags.z <= alu_flags.z;
      end
      if (uins.wcv) begin
        flags.c <= alu_flags.c;
        flags.v <= alu_flags.v;
      end
    end
  end

  // memory address and write data
  always_comb begin
    unique case (uins.mad)
      MAD_PC:  address = pc;
      MAD_SP:  address = sp;
      default: address = ralu;
    endcase
  end

  assign data_out = stores_register(ir) ? s2 : pc;

endmodule
