// tb_r8_datapath: self-checking test of the R8 datapath on its own.
//
// The testbench plays the control unit: it applies one microinstruction per
// clock (set up after the rising edge, executed by the datapath on the
// falling edge) and plays the memory by driving data_in. Random sequences of
// micro-operation groups are run against a reference of the registers, PC,
// SP and flags kept here:
//   fetch (IR <- data_in, PC <- PC + 1, address = PC),
//   register load from memory (LD/POP write path),
//   register-register ALU operation and write-back (ADD/SUB/AND/OR/XOR),
//   immediate operation (ADDI/SUBI/LDL/LDH: opA = IR, S2 = target),
//   SP load from RALU and SP decrement, SP + 1 through the ALU,
//   PC-relative and absolute PC load from RALU, PC load from memory,
//   short displacement PC + sext(IR[9:0]).
// Registers are read back through the ports: address (PC, SP or RALU by
// mad) and data_out (S2 for a ST word in IR, PC for a call word).
module tb_r8_datapath;
  import r8_pkg::*;

  logic   ck = 1'b0, rst = 1'b1;
  uins_t  uins = UINS_IDLE;
  word_t  ir, address, data_in = '0, data_out;
  flags_t flags;
  int checks = 0, failures = 0;

  r8_datapath dut (.ck(ck), .rst(rst), .uins(uins), .ir(ir), .flags(flags),
                   .address(address), .data_in(data_in), .data_out(data_out));

  always #5 ck = ~ck;

  word_t  m_reg [16];
  word_t  m_pc, m_sp;
  flags_t m_fl;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t %s", $time, what);
    end
  endfunction

  // one clock with microinstruction u and memory data d
  task automatic step(input uins_t u, input word_t d = '0);
    @(posedge ck);
    #1 uins = u;
    data_in = d;
    @(negedge ck);
    #1 uins = UINS_IDLE;
  endtask

  task automatic fetch(input word_t w);
    uins_t u = UINS_IDLE;
    u.wir = 1; u.wpc = 1; u.ce = 1; u.rw = 1; u.mpc = MPC_INC; u.mad = MAD_PC;
    @(posedge ck);
    #1 uins = u;
    data_in = w;
    #1 check(address == m_pc, $sformatf("fetch address %h exp %h", address, m_pc));
    @(negedge ck);
    #1 uins = UINS_IDLE;
    m_pc = m_pc + 1;
    check(ir == w, "IR loaded");
  endtask

  task automatic read_regs(input logic ms2);
    uins_t u = UINS_IDLE;
    u.wab = 1; u.ms2 = ms2;
    step(u);
  endtask

  task automatic alu(input alu_op_e op, input logic ma, input logic [1:0] mb,
                     input logic wnz, input logic wcv);
    uins_t u = UINS_IDLE;
    u.walu = 1; u.alu = op; u.ma = ma; u.mb = mb; u.wnz = wnz; u.wcv = wcv;
    step(u);
  endtask

  // RALU is visible on address when mad = RALU
  task automatic expect_ralu(input word_t v, input string what);
    uins = UINS_IDLE;
    uins.mad = MAD_ALU;
    #1 check(address == v, $sformatf("%s: RALU %h exp %h", what, address, v));
  endtask

  task automatic check_reg(input logic [3:0] r);
    fetch({OPC_ST, r, 8'h00});
    uins = UINS_IDLE;
    uins.ms2 = MS2_RT;
    #1 check(data_out == m_reg[r], $sformatf("R%0d = %h exp %h", r, data_out, m_reg[r]));
  endtask

  task automatic check_pc_sp();
    uins = UINS_IDLE;
    uins.mad = MAD_PC;
    #1 check(address == m_pc, $sformatf("PC %h exp %h", address, m_pc));
    uins.mad = MAD_SP;
    #1 check(address == m_sp, $sformatf("SP %h exp %h", address, m_sp));
    check(flags == m_fl, $sformatf("flags %b exp %b", flags, m_fl));
  endtask

  initial begin
    uins_t u;
    logic [3:0] t, a, b;
    word_t v, x, y, r;
    logic [16:0] s;
    int kind;

    for (int i = 0; i < 16; i++) m_reg[i] = '0;
    m_pc = '0; m_sp = '0; m_fl = '0;
    repeat (2) @(posedge ck);
    #1 rst = 1'b0;
    check_pc_sp();

    for (int k = 0; k < 400; k++) begin
      kind = (k < 16) ? 0 : int'($urandom % 8);
      t = 4'($urandom); a = 4'($urandom); b = 4'($urandom);
      case (kind)
        0: begin  // register load from memory
          v = word_t'($urandom);
          if (k < 16) t = 4'(k);
          fetch({OPC_LD, t, a, b});
          u = UINS_IDLE; u.wreg = 1; u.mreg = MREG_MEM; u.ce = 1; u.rw = 1;
          step(u, v);
          m_reg[t] = v;
        end
        1: begin  // register-register operation
          int o = int'($urandom % 5);
          fetch({4'(o), t, a, b});
          read_regs(MS2_RS2);
          x = m_reg[a]; y = m_reg[b];
          case (o)
            0: s = {1'b0, x} + {1'b0, y};
            1: s = {1'b0, x} + {1'b0, ~y} + 17'd1;
            2: s = {1'b0, x & y};
            3: s = {1'b0, x | y};
            default: s = {1'b0, x ^ y};
          endcase
          alu(alu_op_e'(o), MA_RA, MB_RB, 1'b1, o < 2);
          expect_ralu(s[15:0], "binary op");
          r = s[15:0];
          m_fl.n = r[15]; m_fl.z = (r == 0);
          if (o == 0) begin m_fl.c = s[16]; m_fl.v = (x[15] == y[15]) && (r[15] != x[15]); end
          if (o == 1) begin m_fl.c = s[16]; m_fl.v = (x[15] != y[15]) && (r[15] != x[15]); end
          u = UINS_IDLE; u.wreg = 1; u.mreg = MREG_ALU;
          step(u);
          m_reg[t] = r;
        end
        2: begin  // immediate operation on the target register
          int o = int'($urandom % 4);
          v = {8'h00, 8'($urandom)};
          fetch({4'(5 + o), t, v[7:0]});
          read_regs(MS2_RT);
          y = m_reg[t];
          case (o)
            0: s = {1'b0, y} + {1'b0, v};
            1: s = {1'b0, y} + {1'b0, ~v} + 17'd1;
            2: s = {1'b0, y[15:8], v[7:0]};
            default: s = {1'b0, v[7:0], y[7:0]};
          endcase
          alu(alu_op_e'(int'(ALU_ADDI) + o), MA_IR, MB_RB, o < 2, o < 2);
          r = s[15:0];
          if (o < 2) begin
            m_fl.n = r[15]; m_fl.z = (r == 0); m_fl.c = s[16];
            m_fl.v = (o == 0) ? (!y[15] && r[15]) : (y[15] && !r[15]);
          end
          u = UINS_IDLE; u.wreg = 1;
          step(u);
          m_reg[t] = r;
        end
        3: begin  // LDSP, then push-style decrement
          fetch({OPC_MISC, 4'h0, a, 4'h7});
          read_regs(MS2_RS2);
          alu(ALU_PASS_A, MA_RA, MB_RB, 1'b0, 1'b0);
          u = UINS_IDLE; u.wsp = 1; u.msp = MSP_ALU;
          step(u);
          m_sp = m_reg[a];
          check_pc_sp();
          u = UINS_IDLE; u.wsp = 1; u.msp = MSP_DEC;
          step(u);
          m_sp = m_sp - 1;
        end
        4: begin  // SP + 1 through the ALU, as RTS/POP compute it
          fetch({OPC_MISC, 4'h0, 4'h0, 4'h8});
          read_regs(MS2_RS2);
          alu(ALU_INC_B, MA_RA, MB_SP, 1'b0, 1'b0);
          expect_ralu(m_sp + 1, "SP + 1");
          u = UINS_IDLE; u.wsp = 1; u.msp = MSP_ALU; u.wpc = 1; u.mpc = MPC_MEM;
          v = word_t'($urandom);
          step(u, v);           // RTS: PC from memory, SP from RALU
          m_sp = m_sp + 1;
          m_pc = v;
        end
        5: begin  // register-relative or absolute jump
          logic rel = 1'($urandom);
          fetch({OPC_JREG, 4'h0, a, rel ? 4'h0 : 4'h5});
          read_regs(MS2_RS2);
          alu(rel ? ALU_ADD : ALU_PASS_A, MA_RA, MB_PC, 1'b0, 1'b0);
          u = UINS_IDLE; u.wpc = 1; u.mpc = MPC_ALU;
          step(u);
          m_pc = rel ? m_pc + m_reg[a] : m_reg[a];
        end
        6: begin  // short displacement jump
          v = word_t'($urandom);
          fetch({OPC_JMPD, 2'b00, v[9:0]});
          read_regs(MS2_RS2);
          alu(ALU_DISP10, MA_IR, MB_PC, 1'b0, 1'b0);
          u = UINS_IDLE; u.wpc = 1; u.mpc = MPC_ALU;
          step(u);
          m_pc = m_pc + {{6{v[9]}}, v[9:0]};
        end
        default: begin  // a call word puts PC on data_out
          fetch({OPC_JREG, 4'h0, a, 4'hB});
          #1 check(data_out == m_pc, "PC on data_out for a call");
        end
      endcase
      check_pc_sp();
      if (k % 8 == 7) check_reg(4'($urandom));
    end
    for (int i = 0; i < 16; i++) check_reg(4'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge ck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
