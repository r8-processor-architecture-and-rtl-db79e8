// tb_r8_alu: self-checking test of the R8 ALU.
//
// For every operation, random and corner operands are applied and the result
// and the four flags are compared with values computed here in integer
// arithmetic: n = bit 15, z = result zero, c = bit 16 of the unsigned sum
// (subtraction X - Y computed as X + (65535 - Y) + 1), v = signed result
// outside -32768..32767.
module tb_r8_alu;
  import r8_pkg::*;

  word_t   a, b, res;
  alu_op_e op;
  flags_t  fl;
  int checks = 0, failures = 0;

  r8_alu dut (.op_a(a), .op_b(b), .op(op), .result(res), .flags(fl));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s", what);
    end
  endfunction

  function automatic int sval(input word_t x);
    return x[15] ? int'(x) - 65536 : int'(x);
  endfunction

  // expected result, carry and overflow (arith tells whether c/v are defined)
  task automatic expect_of(input alu_op_e o, input word_t x, input word_t y,
                           output word_t r, output bit c, output bit v, output bit arith);
    int unsigned u;
    int s;
    arith = 1'b1;
    c = 1'b0;
    v = 1'b0;
    case (o)
      ALU_ADD:  begin u = x + y;                        s = sval(x) + sval(y); end
      ALU_SUB:  begin u = x + (65535 - y) + 1;          s = sval(x) - sval(y); end
      ALU_ADDI: begin u = y + x[7:0];                   s = sval(y) + int'(x[7:0]); end
      ALU_SUBI: begin u = y + (65535 - x[7:0]) + 1;     s = sval(y) - int'(x[7:0]); end
      default:  begin arith = 1'b0; u = 0; s = 0; end
    endcase
    if (arith) begin
      r = word_t'(u);
      c = (u >= 65536);
      v = (s > 32767) || (s < -32768);
      return;
    end
    case (o)
      ALU_AND:    r = x & y;
      ALU_OR:     r = x | y;
      ALU_XOR:    r = x ^ y;
      ALU_LDL:    r = (y & 16'hFF00) | (x & 16'h00FF);
      ALU_LDH:    r = (x << 8) | (y & 16'h00FF);
      ALU_SL0:    r = x << 1;
      ALU_SL1:    r = (x << 1) | 16'h1;
      ALU_SR0:    r = x >> 1;
      ALU_SR1:    r = (x >> 1) | 16'h8000;
      ALU_NOT:    r = 16'hFFFF ^ x;
      ALU_PASS_A: r = x;
      ALU_INC_B:  r = word_t'(int'(y) + 1);
      ALU_DISP10: r = word_t'(int'(y) + (x[9] ? int'(x[9:0]) - 1024 : int'(x[9:0])));
      ALU_DISP12: r = word_t'(int'(y) + (x[11] ? int'(x[11:0]) - 4096 : int'(x[11:0])));
      default:    r = '0;
    endcase
  endtask

  initial begin
    word_t er;
    bit ec, ev, ar;
    word_t corner [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h00FF};
    for (int o = 0; o <= int'(ALU_DISP12); o++) begin
      op = alu_op_e'(o);
      for (int k = 0; k < 600; k++) begin
        if (k < 36) begin
          a = corner[k % 6];
          b = corner[k / 6];
        end else begin
          a = word_t'($urandom);
          b = word_t'($urandom);
        end
        #1;
        expect_of(op, a, b, er, ec, ev, ar);
        check(res == er, $sformatf("%s a=%h b=%h res=%h exp=%h", op.name(), a, b, res, er));
        check(fl.n == er[15] && fl.z == (er == 0),
              $sformatf("%s a=%h b=%h nz", op.name(), a, b));
        if (ar) check(fl.c == ec && fl.v == ev,
                      $sformatf("%s a=%h b=%h cv=%b%b exp=%b%b", op.name(), a, b, fl.c, fl.v, ec, ev));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
