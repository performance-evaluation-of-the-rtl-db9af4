// tb_alu: random operands for every ALU operation compared with an
// independent model of the results and of the N V Z C flag rules (full
// N V Z C updates are requested only for add and subtract).
module tb_alu;
  import nios_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, result;
  flag_upd_e flag_upd;
  flags_t flags_in, flags_out;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops [11] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSB,
                          ALU_LSL, ALU_LSR, ALU_ASR, ALU_MUL, ALU_MOVHI};
    for (int n = 0; n < 20000; n++) begin
      logic [31:0] er;
      flags_t ef;
      longint sa, sb, ss;
      op = ops[$urandom_range(0, 10)];
      a = $urandom; b = $urandom;
      if ($urandom_range(0, 7) == 0) b = a;
      if ($urandom_range(0, 7) == 0) a = 32'h8000_0000;
      flag_upd = flag_upd_e'($urandom_range(0, 2));
      if (flag_upd == FL_NZVC && op != ALU_ADD && op != ALU_SUB) flag_upd = FL_NZ;
      flags_in = 4'($urandom);
      #1;
      case (op)
        ALU_ADD:   er = a + b;
        ALU_SUB:   er = a - b;
        ALU_AND:   er = a & b;
        ALU_OR:    er = a | b;
        ALU_XOR:   er = a ^ b;
        ALU_PASSB: er = b;
        ALU_LSL:   er = a << (b % 32);
        ALU_LSR:   er = a >> (b % 32);
        ALU_ASR:   er = 32'($signed(a) >>> (b % 32));
        ALU_MUL:   er = 32'(longint'(a) * longint'(b));
        default:   er = (b << 16) | (a & 32'hFFFF);
      endcase
      ef = flags_in;
      if (flag_upd != FL_NONE) begin ef.n = er[31]; ef.z = (er == 0); end
      if (flag_upd == FL_NZVC) begin
        sa = longint'({{32{a[31]}}, a}); sb = longint'({{32{b[31]}}, b});
        if (op == ALU_SUB) begin
          ef.c = (a < b);
          ss = sa - sb;
        end else begin
          ef.c = (longint'(a) + longint'(b)) > 64'hFFFF_FFFF;
          ss = sa + sb;
        end
        ef.v = (ss > 64'sd2147483647) || (ss < -64'sd2147483648);
      end
      checks++;
      if (result !== er || flags_out !== ef) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s a=%h b=%h got %h/%b expected %h/%b", op.name(), a, b,
                   result, flags_out, er, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
