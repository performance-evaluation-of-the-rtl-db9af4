// instr_decoder: instruction decoder of the decode stage, built as a
// 64-entry synchronous ROM indexed by the 6-bit primary opcode.
//
// As in an on-chip memory, the decoded control word appears one clock after
// the address is applied.  The address is therefore taken from the
// instruction leaving the fetch stage, not from the IR, so that the control
// word and the IR change at the same clock edge and the decoded word is
// ready during the decode stage.  `en` must equal the IR load enable.
// The ROM contents (which control fields each opcode sets) are this design's
// own, derived from its encoding in nios_pkg.
//
// Interface: fetch_op (opcode of the fetched instruction) and en in; dec (dec_t) out, registered.
module instr_decoder
  import nios_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [5:0]      fetch_op,    // instr[15:10] of the fetched instruction
  output dec_t            dec
);

  function automatic dec_t rom_word(logic [5:0] op);
    dec_t d;
    d = DEC_NOP;
    unique case (op)
      OP_ADD:  begin d.we = 1'b1; d.alu_op = ALU_ADD; d.flags = FL_NZVC; end
      OP_SUB:  begin d.we = 1'b1; d.alu_op = ALU_SUB; d.flags = FL_NZVC; end
      OP_CMP:  begin d.alu_op = ALU_SUB; d.flags = FL_NZVC; end
      OP_AND:  begin d.we = 1'b1; d.alu_op = ALU_AND; d.flags = FL_NZ; end
      OP_OR:   begin d.we = 1'b1; d.alu_op = ALU_OR;  d.flags = FL_NZ; end
      OP_XOR:  begin d.we = 1'b1; d.alu_op = ALU_XOR; d.flags = FL_NZ; end
      OP_MOV:  begin d.we = 1'b1; d.alu_op = ALU_PASSB; end
      OP_LSL:  begin d.we = 1'b1; d.alu_op = ALU_LSL; end
      OP_LSR:  begin d.we = 1'b1; d.alu_op = ALU_LSR; end
      OP_ASR:  begin d.we = 1'b1; d.alu_op = ALU_ASR; end
      OP_MUL:  begin d.we = 1'b1; d.alu_op = ALU_MUL; end
      OP_ADDI: begin d.we = 1'b1; d.alu_op = ALU_ADD; d.flags = FL_NZVC;
                     d.b_is_imm = 1'b1; d.imm_kind = IMM_5; end
      OP_SUBI: begin d.we = 1'b1; d.alu_op = ALU_SUB; d.flags = FL_NZVC;
                     d.b_is_imm = 1'b1; d.imm_kind = IMM_5; end
      OP_CMPI: begin d.alu_op = ALU_SUB; d.flags = FL_NZVC;
                     d.b_is_imm = 1'b1; d.imm_kind = IMM_5; end
      OP_MOVI: begin d.we = 1'b1; d.alu_op = ALU_PASSB;
                     d.b_is_imm = 1'b1; d.imm_kind = IMM_5; end
      OP_MOVHI:begin d.we = 1'b1; d.alu_op = ALU_MOVHI;
                     d.b_is_imm = 1'b1; d.imm_kind = IMM_5; end
      OP_LSLI: begin d.we = 1'b1; d.alu_op = ALU_LSL;
                     d.b_is_imm = 1'b1; d.imm_kind = IMM_SHAMT; end
      OP_LSRI: begin d.we = 1'b1; d.alu_op = ALU_LSR;
                     d.b_is_imm = 1'b1; d.imm_kind = IMM_SHAMT; end
      OP_ASRI: begin d.we = 1'b1; d.alu_op = ALU_ASR;
                     d.b_is_imm = 1'b1; d.imm_kind = IMM_SHAMT; end
      OP_LD:   begin d.we = 1'b1; d.is_ld = 1'b1; d.wb_sel = WB_MEM; end
      OP_ST:   begin d.is_st = 1'b1; end
      OP_JMP:  begin d.br_kind = BR_REG; end
      OP_CALL: begin d.br_kind = BR_REG; d.link = 1'b1; d.we = 1'b1;
                     d.dst_sel = DST_LINK; d.wb_sel = WB_LINK; end
      OP_SKPS:   d.skip_kind = SK_FLAGS;
      OP_SKPRZ:  d.skip_kind = SK_RZ;
      OP_SKPRNZ: d.skip_kind = SK_RNZ;
      OP_SKP0:   d.skip_kind = SK_B0;
      OP_SKP1:   d.skip_kind = SK_B1;
      OP_SAVE: begin d.we = 1'b1; d.alu_op = ALU_SUB; d.a_is_sp = 1'b1;
                     d.b_is_imm = 1'b1; d.imm_kind = IMM_8x4;
                     d.dst_sel = DST_SP_NEW; d.cwp_op = CWP_SAVE; end
      OP_RESTORE: d.cwp_op = CWP_RESTORE;
      OP_RDCTL:begin d.we = 1'b1; d.wb_sel = WB_CTL; end
      OP_WRCTL:begin d.wrctl = 1'b1; d.cwp_op = CWP_WRCTL; end
      {OP5_BR, 1'b0}, {OP5_BR, 1'b1}:   d.br_kind = BR_REL;
      {OP5_BSR, 1'b0}, {OP5_BSR, 1'b1}: begin d.br_kind = BR_REL; d.link = 1'b1;
                     d.we = 1'b1; d.dst_sel = DST_LINK; d.wb_sel = WB_LINK; end
      {OP5_PFX, 1'b0}, {OP5_PFX, 1'b1}: d.is_pfx = 1'b1;
      default: d = DEC_NOP;   // NOP and unused opcodes
    endcase
    return d;
  endfunction

  dec_t rom [64];

  always_comb begin
    for (int i = 0; i < 64; i++) rom[i] = rom_word(6'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dec <= DEC_NOP;
    else if (en) dec <= rom[fetch_op];
  end

endmodule
