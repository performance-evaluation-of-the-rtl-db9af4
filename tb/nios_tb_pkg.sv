// nios_tb_pkg: verification helpers shared by the processor testbenches.
//
// - Instruction encoders (a small assembler) for the encoding of nios_pkg.
// - nios_iss: an instruction-set reference model.  It executes one
//   instruction at a time with no notion of a pipeline: branch delay slots,
//   skips, the K prefix and the register windows are modelled
//   architecturally, and every data-memory store is logged so that the
//   pipelined core can be compared with it store by store.
package nios_tb_pkg;
  import nios_pkg::*;

  // ---------------------------------------------------------- assembler
  function automatic logic [15:0] rr(logic [5:0] op, int a, int b);
    return {op, 5'(b), 5'(a)};
  endfunction
  function automatic logic [15:0] ri(logic [5:0] op, int a, int imm5);
    return {op, 5'(imm5), 5'(a)};
  endfunction
  function automatic logic [15:0] i11(logic [4:0] op5, int imm11);
    return {op5, 11'(imm11)};
  endfunction
  function automatic logic [15:0] pfx(int k);     return i11(OP5_PFX, k); endfunction
  function automatic logic [15:0] skps(cond_e c); return {OP_SKPS, 6'd0, 4'(c)}; endfunction
  function automatic logic [15:0] save(int imm8); return {OP_SAVE, 2'd0, 8'(imm8)}; endfunction
  function automatic logic [15:0] restore();      return {OP_RESTORE, 10'd0}; endfunction
  function automatic logic [15:0] nop();          return 16'h0000; endfunction

  // ---------------------------------------------------------- reference model
  class nios_iss;
    int unsigned rf_size;
    int unsigned nwin;
    logic [31:0] rf [];
    logic [31:0] dmem [4096];
    logic [15:0] imem [8192];
    logic [31:0] pc, npc;
    flags_t      fl;
    int unsigned cwp;
    logic [10:0] k;
    bit          kv;
    bit          skip;
    longint unsigned executed;
    logic [31:0] st_addr [$];
    logic [31:0] st_data [$];

    function new(int unsigned size);
      rf_size = size;
      nwin    = (size - 8) / 16;
      rf      = new[size];
      foreach (rf[i]) rf[i] = 32'd0;
      foreach (dmem[i]) dmem[i] = 32'd0;
      foreach (imem[i]) imem[i] = 16'd0;
      pc = 0; npc = 2; fl = '0; cwp = nwin - 1; k = 0; kv = 0; skip = 0;
      executed = 0;
    endfunction

    function int unsigned phys(int unsigned r, int unsigned w);
      int unsigned s;
      if (r < 8) return r;
      s = (w * 16 + r - 8) % (nwin * 16);
      return s + 8;
    endfunction

    function logic [31:0] rd(int unsigned r); return rf[phys(r, cwp)]; endfunction
    function void wr(int unsigned r, logic [31:0] v); rf[phys(r, cwp)] = v; endfunction

    function void set_flags(logic [31:0] a, logic [31:0] b, logic [31:0] r, bit sub, bit arith);
      fl.n = r[31];
      fl.z = (r == 0);
      if (arith) begin
        if (sub) begin
          fl.c = (a < b);
          fl.v = (a[31] != b[31]) && (r[31] != a[31]);
        end else begin
          fl.c = ({1'b0, a} + {1'b0, b}) > 33'hFFFF_FFFF;
          fl.v = (a[31] == b[31]) && (r[31] != a[31]);
        end
      end
    endfunction

    function bit cond(int c);
      case (c)
        0: return fl.c;            1: return !fl.c;
        2: return fl.z;            3: return !fl.z;
        4: return fl.n;            5: return !fl.n;
        6: return fl.v;            7: return !fl.v;
        8: return fl.n ^ fl.v;     9: return !(fl.n ^ fl.v);
        10: return fl.z || (fl.n ^ fl.v);
        11: return !fl.z && !(fl.n ^ fl.v);
        12: return !fl.c && !fl.z; 13: return fl.c || fl.z;
        14: return 1;
        default: return 0;
      endcase
    endfunction

    // Execute the instruction at pc.  Returns 1 when it was executed
    // (0 when annulled by a skip).
    function bit step();
      logic [15:0] ins;
      logic [5:0]  op;
      int unsigned a, b, i5;
      logic [31:0] va, vb, r, imm, nnpc;
      bit          was_skip;
      ins = imem[pc[13:1]];
      op  = ins[15:10];
      a   = int'(ins[4:0]);
      b   = int'(ins[9:5]);
      i5  = int'(ins[9:5]);
      nnpc = npc + 2;
      if (skip) begin
        skip = (op[5:1] == OP5_PFX);   // a skipped PFX takes its successor along
        kv   = 0;
        pc = npc; npc = nnpc;
        return 0;
      end
      executed++;
      va  = rd(a);
      vb  = rd(b);
      imm = kv ? {16'd0, k, 5'(i5)} : 32'(i5);
      was_skip = 0;
      if (op[5:1] == OP5_PFX) begin
        k = ins[10:0]; kv = 1;
        pc = npc; npc = nnpc;
        return 1;
      end
      case (op)
        OP_ADD:  begin r = va + vb; set_flags(va, vb, r, 0, 1); wr(a, r); end
        OP_SUB:  begin r = va - vb; set_flags(va, vb, r, 1, 1); wr(a, r); end
        OP_CMP:  begin r = va - vb; set_flags(va, vb, r, 1, 1); end
        OP_AND:  begin r = va & vb; set_flags(va, vb, r, 0, 0); wr(a, r); end
        OP_OR:   begin r = va | vb; set_flags(va, vb, r, 0, 0); wr(a, r); end
        OP_XOR:  begin r = va ^ vb; set_flags(va, vb, r, 0, 0); wr(a, r); end
        OP_MOV:  wr(a, vb);
        OP_LSL:  wr(a, va << vb[4:0]);
        OP_LSR:  wr(a, va >> vb[4:0]);
        OP_ASR:  wr(a, $signed(va) >>> vb[4:0]);
        OP_MUL:  wr(a, va * vb);
        OP_ADDI: begin r = va + imm; set_flags(va, imm, r, 0, 1); wr(a, r); end
        OP_SUBI: begin r = va - imm; set_flags(va, imm, r, 1, 1); wr(a, r); end
        OP_CMPI: begin r = va - imm; set_flags(va, imm, r, 1, 1); end
        OP_MOVI: wr(a, imm);
        OP_MOVHI: wr(a, {imm[15:0], va[15:0]});
        OP_LSLI: wr(a, va << i5);
        OP_LSRI: wr(a, va >> i5);
        OP_ASRI: wr(a, $signed(va) >>> i5);
        OP_LD: begin
          r = vb + (kv ? {{19{k[10]}}, k, 2'b00} : 32'd0);
          wr(a, dmem[r[13:2]]);
        end
        OP_ST: begin
          r = vb + (kv ? {{19{k[10]}}, k, 2'b00} : 32'd0);
          dmem[r[13:2]] = va;
          st_addr.push_back(r);
          st_data.push_back(va);
        end
        OP_JMP:  nnpc = {va[31:1], 1'b0};
        OP_CALL: begin nnpc = {va[31:1], 1'b0}; wr(15, pc + 4); end
        OP_SKPS:   was_skip = cond(int'(ins[3:0]));
        OP_SKPRZ:  was_skip = (va == 0);
        OP_SKPRNZ: was_skip = (va != 0);
        OP_SKP0:   was_skip = !va[i5];
        OP_SKP1:   was_skip = va[i5];
        OP_SAVE: begin
          r = rd(14) - {22'd0, ins[7:0], 2'b00};
          cwp = (cwp == 0) ? nwin - 1 : cwp - 1;
          wr(14, r);
        end
        OP_RESTORE: cwp = (cwp == nwin - 1) ? 0 : cwp + 1;
        OP_RDCTL: wr(a, pack_status(fl, CWPW'(cwp)));
        OP_WRCTL: begin
          fl  = va[3:0];
          cwp = (int'(va[8:4]) >= nwin) ? nwin - 1 : int'(va[8:4]);
        end
        default: begin
          if (op[5:1] == OP5_BR)  nnpc = pc + 2 + {{20{ins[10]}}, ins[10:0], 1'b0};
          if (op[5:1] == OP5_BSR) begin
            nnpc = pc + 2 + {{20{ins[10]}}, ins[10:0], 1'b0};
            wr(15, pc + 4);
          end
        end
      endcase
      kv   = 0;
      skip = was_skip;
      pc = npc; npc = nnpc;
      return 1;
    endfunction
  endclass

endpackage
