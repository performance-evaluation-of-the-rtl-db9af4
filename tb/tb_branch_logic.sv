// tb_branch_logic: branch targets (relative, both directions, and through a
// register), skip decisions for every condition code and register test,
// and suppression of everything for an annulled instruction, against an
// independent model.
module tb_branch_logic;
  import nios_pkg::*;
  logic live;
  dec_t dec;
  logic [15:0] ir;
  logic [31:0] pc, reg_a, target;
  flags_t flags;
  logic redirect, skip_taken;
  int checks = 0, failures = 0;

  branch_logic dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit cc(int c, flags_t f);
    bit lt;
    lt = (f.n != f.v);
    case (c)
      0: return f.c == 1;   1: return f.c == 0;   2: return f.z == 1;   3: return f.z == 0;
      4: return f.n == 1;   5: return f.n == 0;   6: return f.v == 1;   7: return f.v == 0;
      8: return lt;         9: return !lt;        10: return lt || f.z; 11: return !lt && !f.z;
      12: return !f.c && !f.z; 13: return f.c || f.z; 14: return 1;    default: return 0;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int kind, off;
      bit exp_red, exp_skip;
      logic [31:0] exp_t;
      dec = DEC_NOP;
      live = ($urandom_range(0, 4) != 0);
      pc = {$urandom_range(0, 65535), 1'b0};
      reg_a = $urandom;
      if ($urandom_range(0, 3) == 0) reg_a = 0;
      flags = 4'($urandom);
      ir = 16'($urandom);
      kind = $urandom_range(0, 7);
      exp_red = 0; exp_skip = 0; exp_t = 32'hx;
      case (kind)
        0: begin dec.br_kind = BR_REL; off = int'($signed(ir[10:0]));
                 exp_red = live; exp_t = pc + 2 + 32'(off * 2); end
        1: begin dec.br_kind = BR_REG; exp_red = live; exp_t = reg_a & ~32'd1; end
        2: begin dec.skip_kind = SK_FLAGS; exp_skip = live && cc(int'(ir[3:0]), flags); end
        3: begin dec.skip_kind = SK_RZ;  exp_skip = live && reg_a == 0; end
        4: begin dec.skip_kind = SK_RNZ; exp_skip = live && reg_a != 0; end
        5: begin dec.skip_kind = SK_B0;  exp_skip = live && ((reg_a >> ir[9:5]) & 1) == 0; end
        6: begin dec.skip_kind = SK_B1;  exp_skip = live && ((reg_a >> ir[9:5]) & 1) == 1; end
        default: ;
      endcase
      #1;
      chk(redirect == exp_red && skip_taken == exp_skip && (!exp_red || target == exp_t),
          $sformatf("kind %0d live %0d ir %h pc %h a %h flags %b: red %0d/%0d skip %0d/%0d t %h/%h",
                    kind, live, ir, pc, reg_a, flags, redirect, exp_red, skip_taken, exp_skip,
                    target, exp_t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
