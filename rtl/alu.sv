// alu: integer arithmetic/logic unit of the execute stage.
//
// Computes result = a op b for add, subtract, and, or, xor, pass-b (moves),
// logical/arithmetic shifts by b[4:0], the low 32 bits of a*b, and MOVHI
// ({b[15:0], a[15:0]}).  It also produces the condition flags the
// instruction leaves behind: add/subtract/compare update N, V, Z and C (C is
// the carry of an add and the borrow of a subtract), logic operations update
// N and Z and keep V and C, everything else keeps all four.
//
// Purely combinational.  The operation list follows the architecture's
// "simple logic and arithmetic instructions, integer only"; the exact set and
// the flag rules are this design's choice.
module alu
  import nios_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  flag_upd_e   flag_upd,
  input  flags_t      flags_in,
  output logic [31:0] result,
  output flags_t      flags_out
);

  logic [32:0] sum, diff;
  logic [63:0] prod;

  always_comb begin
    sum  = {1'b0, a} + {1'b0, b};
    diff = {1'b0, a} - {1'b0, b};
    prod = a * b;
    unique case (op)
      ALU_ADD:   result = sum[31:0];
      ALU_SUB:   result = diff[31:0];
      ALU_AND:   result = a & b;
      ALU_OR:    result = a | b;
      ALU_XOR:   result = a ^ b;
      ALU_PASSB: result = b;
      ALU_LSL:   result = a << b[4:0];
      ALU_LSR:   result = a >> b[4:0];
      ALU_ASR:   result = $signed(a) >>> b[4:0];
      ALU_MUL:   result = prod[31:0];
      ALU_MOVHI: result = {b[15:0], a[15:0]};
      default:   result = sum[31:0];
    endcase

    flags_out = flags_in;
    if (flag_upd != FL_NONE) begin
      flags_out.n = result[31];
      flags_out.z = (result == 32'd0);
    end
    if (flag_upd == FL_NZVC) begin
      if (op == ALU_SUB) begin
        flags_out.c = diff[32];
        flags_out.v = (a[31] != b[31]) && (diff[31] != a[31]);
      end else begin
        flags_out.c = sum[32];
        flags_out.v = (a[31] == b[31]) && (sum[31] != a[31]);
      end
    end
  end

endmodule
