// tb_instr_decoder: checks the decoder ROM: the control word follows the
// opcode one clock later, holds while en is low, and sets the expected
// fields for every instruction class (expectations written out by hand).
module tb_instr_decoder;
  import nios_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [5:0] fetch_op = '0;
  dec_t dec;
  int checks = 0, failures = 0;

  instr_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected: we, is_ld, is_st, br_kind, skip_kind, cwp_op, is_pfx, b_is_imm, alu_op
  task automatic expect_op(logic [5:0] op, bit we, bit ld, bit st, br_kind_e br,
                           skip_kind_e sk, cwp_op_e cw, bit pf, bit imm, alu_op_e aop,
                           flag_upd_e fl);
    @(negedge clk); en = 1; fetch_op = op;
    @(negedge clk); en = 0;
    chk(dec.we == we && dec.is_ld == ld && dec.is_st == st && dec.br_kind == br &&
        dec.skip_kind == sk && dec.cwp_op == cw && dec.is_pfx == pf &&
        dec.b_is_imm == imm && dec.alu_op == aop && dec.flags == fl,
        $sformatf("opcode %o", op));
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    expect_op(OP_ADD,  1,0,0,BR_NONE,SK_NONE,CWP_NONE,0,0,ALU_ADD,FL_NZVC);
    expect_op(OP_SUB,  1,0,0,BR_NONE,SK_NONE,CWP_NONE,0,0,ALU_SUB,FL_NZVC);
    expect_op(OP_CMP,  0,0,0,BR_NONE,SK_NONE,CWP_NONE,0,0,ALU_SUB,FL_NZVC);
    expect_op(OP_AND,  1,0,0,BR_NONE,SK_NONE,CWP_NONE,0,0,ALU_AND,FL_NZ);
    expect_op(OP_XOR,  1,0,0,BR_NONE,SK_NONE,CWP_NONE,0,0,ALU_XOR,FL_NZ);
    expect_op(OP_MOV,  1,0,0,BR_NONE,SK_NONE,CWP_NONE,0,0,ALU_PASSB,FL_NONE);
    expect_op(OP_ASR,  1,0,0,BR_NONE,SK_NONE,CWP_NONE,0,0,ALU_ASR,FL_NONE);
    expect_op(OP_MUL,  1,0,0,BR_NONE,SK_NONE,CWP_NONE,0,0,ALU_MUL,FL_NONE);
    expect_op(OP_ADDI, 1,0,0,BR_NONE,SK_NONE,CWP_NONE,0,1,ALU_ADD,FL_NZVC);
    expect_op(OP_CMPI, 0,0,0,BR_NONE,SK_NONE,CWP_NONE,0,1,ALU_SUB,FL_NZVC);
    expect_op(OP_MOVI, 1,0,0,BR_NONE,SK_NONE,CWP_NONE,0,1,ALU_PASSB,FL_NONE);
    expect_op(OP_MOVHI,1,0,0,BR_NONE,SK_NONE,CWP_NONE,0,1,ALU_MOVHI,FL_NONE);
    expect_op(OP_LSRI, 1,0,0,BR_NONE,SK_NONE,CWP_NONE,0,1,ALU_LSR,FL_NONE);
    expect_op(OP_LD,   1,1,0,BR_NONE,SK_NONE,CWP_NONE,0,0,ALU_ADD,FL_NONE);
    expect_op(OP_ST,   0,0,1,BR_NONE,SK_NONE,CWP_NONE,0,0,ALU_ADD,FL_NONE);
    expect_op(OP_JMP,  0,0,0,BR_REG,SK_NONE,CWP_NONE,0,0,ALU_ADD,FL_NONE);
    expect_op(OP_CALL, 1,0,0,BR_REG,SK_NONE,CWP_NONE,0,0,ALU_ADD,FL_NONE);
    expect_op(OP_SKPS, 0,0,0,BR_NONE,SK_FLAGS,CWP_NONE,0,0,ALU_ADD,FL_NONE);
    expect_op(OP_SKPRZ,0,0,0,BR_NONE,SK_RZ,CWP_NONE,0,0,ALU_ADD,FL_NONE);
    expect_op(OP_SKP1, 0,0,0,BR_NONE,SK_B1,CWP_NONE,0,0,ALU_ADD,FL_NONE);
    expect_op(OP_SAVE, 1,0,0,BR_NONE,SK_NONE,CWP_SAVE,0,1,ALU_SUB,FL_NONE);
    expect_op(OP_RESTORE,0,0,0,BR_NONE,SK_NONE,CWP_RESTORE,0,0,ALU_ADD,FL_NONE);
    expect_op(OP_WRCTL,0,0,0,BR_NONE,SK_NONE,CWP_WRCTL,0,0,ALU_ADD,FL_NONE);
    expect_op(6'b100001,0,0,0,BR_REL,SK_NONE,CWP_NONE,0,0,ALU_ADD,FL_NONE);   // BR
    expect_op(6'b100010,1,0,0,BR_REL,SK_NONE,CWP_NONE,0,0,ALU_ADD,FL_NONE);   // BSR
    expect_op(6'b100111,0,0,0,BR_NONE,SK_NONE,CWP_NONE,1,0,ALU_ADD,FL_NONE);  // PFX
    expect_op(OP_NOP,  0,0,0,BR_NONE,SK_NONE,CWP_NONE,0,0,ALU_ADD,FL_NONE);
    // link and write-back selections
    @(negedge clk); en = 1; fetch_op = OP_CALL;
    @(negedge clk); en = 0;
    chk(dec.link && dec.dst_sel == DST_LINK && dec.wb_sel == WB_LINK, "CALL link fields");
    @(negedge clk); en = 1; fetch_op = OP_RDCTL;
    @(negedge clk); en = 0;
    chk(dec.we && dec.wb_sel == WB_CTL, "RDCTL write-back select");
    // one-cycle latency and hold
    @(negedge clk); en = 1; fetch_op = OP_LD;
    #1; chk(!dec.is_ld, "no output before the clock edge");
    @(negedge clk); chk(dec.is_ld, "output after the edge");
    en = 0; fetch_op = OP_ST;
    @(negedge clk); chk(dec.is_ld && !dec.is_st, "held while en is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
