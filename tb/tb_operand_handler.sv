// tb_operand_handler: checks operand selection and data forwarding: the
// execute-stage value beats the bypass register, which beats the register
// file; the bypass register holds the most recent write; immediates are
// formed with and without a K prefix; loads/stores get base and scaled K
// offset; SAVE gets 4*IMM8.
module tb_operand_handler;
  import nios_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  dec_t dec;
  logic [15:0] ir;
  logic [8:0] ra_a, ra_b, x_wa;
  logic [31:0] rf_a, rf_b, x_wd;
  logic x_we, k_valid;
  logic [10:0] k;
  logic [31:0] reg_a, reg_b, alu_a, alu_b, store_data;
  logic fwd_x, fwd_wb;
  int checks = 0, failures = 0;

  operand_handler dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit          lw_v;
    logic [8:0]  lw_a;
    logic [31:0] lw_d;
    dec = DEC_NOP; ir = 0; ra_a = 0; ra_b = 0; x_wa = 0; rf_a = 0; rf_b = 0; x_wd = 0;
    x_we = 0; k_valid = 0; k = 0;
    lw_v = 0; lw_a = 0; lw_d = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      logic [31:0] ea, eb, ealu_a, ealu_b, imm;
      int kind;
      dec = DEC_NOP;
      ir = 16'($urandom);
      ra_a = 9'($urandom_range(0, 15)); ra_b = 9'($urandom_range(0, 15));
      rf_a = $urandom; rf_b = $urandom;
      x_we = $urandom_range(0, 1); x_wa = 9'($urandom_range(0, 15)); x_wd = $urandom;
      k_valid = $urandom_range(0, 1); k = 11'($urandom);
      kind = $urandom_range(0, 4);
      case (kind)
        0: ;
        1: begin dec.b_is_imm = 1; dec.imm_kind = IMM_5; end
        2: begin dec.b_is_imm = 1; dec.imm_kind = IMM_SHAMT; end
        3: begin dec.b_is_imm = 1; dec.imm_kind = IMM_8x4; end
        default: dec.is_ld = 1;
      endcase
      #1;
      ea = (x_we && x_wa == ra_a) ? x_wd : (lw_v && lw_a == ra_a) ? lw_d : rf_a;
      eb = (x_we && x_wa == ra_b) ? x_wd : (lw_v && lw_a == ra_b) ? lw_d : rf_b;
      case (kind)
        1: imm = k_valid ? (32'(k) << 5) | 32'(ir[9:5]) : 32'(ir[9:5]);
        2: imm = 32'(ir[9:5]);
        3: imm = 32'(ir[7:0]) * 4;
        default: imm = 0;
      endcase
      if (kind == 4) begin
        ealu_a = eb;
        ealu_b = k_valid ? 32'($signed(k)) * 4 : 0;
      end else begin
        ealu_a = ea;
        ealu_b = (kind == 0) ? eb : imm;
      end
      chk(reg_a == ea && reg_b == eb, $sformatf("forwarded registers, case %0d", n));
      chk(alu_a == ealu_a && alu_b == ealu_b && store_data == ea,
          $sformatf("ALU operands kind %0d: %h %h / %h %h", kind, alu_a, alu_b, ealu_a, ealu_b));
      @(negedge clk);
      if (x_we) begin lw_v = 1; lw_a = x_wa; lw_d = x_wd; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
