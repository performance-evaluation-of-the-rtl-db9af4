// branch_logic: control-flow resolution in the operand stage.
//
// Control-flow instructions commit in the operand stage.  For a live
// (valid, not annulled) instruction this block decides:
//   - BR/BSR: redirect to pc + 2 + 2*sext(IMM11);
//   - JMP/CALL: redirect to the forwarded value of register A (bit 0 cleared);
//   - skips: whether the following instruction is to be annulled, from the
//     forwarded condition flags (SKPS), register A being zero or non-zero
//     (SKPRZ/SKPRNZ) or bit IMM5 of register A being 0 or 1 (SKP0/SKP1).
// Branches have one delay slot: the redirect does not annul the next
// sequential instruction; the pipeline keeps it and drops what follows.
//
// Purely combinational.  Unconditional branches plus skips and the delay
// slot follow the architecture description; the offset scaling and the
// condition list are this design's choice.
module branch_logic
  import nios_pkg::*;
(
  input  logic            live,
  input  dec_t            dec,
  input  logic [ILEN-1:0] ir,
  input  logic [31:0]     pc,
  input  logic [31:0]     reg_a,
  input  flags_t          flags,
  output logic            redirect,
  output logic [31:0]     target,
  output logic            skip_taken
);

  logic cond;

  always_comb begin
    unique case (cond_e'(ir[3:0]))
      CC_C:   cond = flags.c;
      CC_NC:  cond = !flags.c;
      CC_Z:   cond = flags.z;
      CC_NZ:  cond = !flags.z;
      CC_N:   cond = flags.n;
      CC_PL:  cond = !flags.n;
      CC_V:   cond = flags.v;
      CC_NV:  cond = !flags.v;
      CC_LT:  cond = flags.n ^ flags.v;
      CC_GE:  cond = !(flags.n ^ flags.v);
      CC_LE:  cond = flags.z || (flags.n ^ flags.v);
      CC_GT:  cond = !flags.z && !(flags.n ^ flags.v);
      CC_HI:  cond = !flags.c && !flags.z;
      CC_LS:  cond = flags.c || flags.z;
      CC_AL:  cond = 1'b1;
      default: cond = 1'b0;
    endcase

    unique case (dec.skip_kind)
      SK_FLAGS: skip_taken = cond;
      SK_RZ:    skip_taken = (reg_a == 32'd0);
      SK_RNZ:   skip_taken = (reg_a != 32'd0);
      SK_B0:    skip_taken = !reg_a[ir[9:5]];
      SK_B1:    skip_taken = reg_a[ir[9:5]];
      default:  skip_taken = 1'b0;
    endcase
    skip_taken = skip_taken && live;

    redirect = live && (dec.br_kind != BR_NONE);
    if (dec.br_kind == BR_REG) target = {reg_a[31:1], 1'b0};
    else target = pc + 32'd2 + {{20{ir[10]}}, ir[10:0], 1'b0};
  end

endmodule
