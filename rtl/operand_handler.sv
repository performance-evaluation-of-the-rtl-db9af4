// operand_handler: operand selection and data forwarding of the operand
// stage.
//
// The register file delivers the operands read at the end of the decode
// stage.  The data forwarding logic replaces them when a newer value exists:
// first the value the execute stage is writing back this cycle (compared on
// the physical register address), then the last value written to the
// register file, held in a one-entry bypass register (this covers a write
// at the same clock edge as the synchronous read, which the memory answers
// with the old word).  With both paths no data hazard causes a stall.
//
// It then forms the two execute-stage operands:
//   alu_a = register A (register B for loads/stores, the base address);
//   alu_b = register B, or an immediate: {K, IMM5} when a PFX preceded the
//           instruction and IMM5 alone otherwise; IMM5 as a shift count;
//           4*IMM8 for SAVE; 4*sext(K) (or 0) as load/store offset;
//   store_data = register A.
// reg_a is also handed to the branch logic and control registers.
//
// Combinational except for the bypass register.  Forwarding in the operand
// stage follows the datapath description; the immediate rules are this
// design's choice.
module operand_handler
  import nios_pkg::*;
#(
  parameter int unsigned RF_SIZE = 512,
  localparam int unsigned AW     = $clog2(RF_SIZE)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  dec_t            dec,
  input  logic [ILEN-1:0] ir,
  input  logic [AW-1:0]   ra_a,
  input  logic [AW-1:0]   ra_b,
  input  logic [31:0]     rf_a,
  input  logic [31:0]     rf_b,
  // execute-stage result being written this cycle
  input  logic            x_we,
  input  logic [AW-1:0]   x_wa,
  input  logic [31:0]     x_wd,
  input  logic [KLEN-1:0] k,
  input  logic            k_valid,
  output logic [31:0]     reg_a,
  output logic [31:0]     reg_b,
  output logic [31:0]     alu_a,
  output logic [31:0]     alu_b,
  output logic [31:0]     store_data,
  output logic            fwd_x,     // a forwarded execute-stage value was used
  output logic            fwd_wb     // a bypass-register value was used
);

  logic          byp_valid;
  logic [AW-1:0] byp_wa;
  logic [31:0]   byp_wd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byp_valid <= 1'b0;
      byp_wa    <= '0;
      byp_wd    <= '0;
    end else if (x_we) begin
      byp_valid <= 1'b1;
      byp_wa    <= x_wa;
      byp_wd    <= x_wd;
    end
  end

  logic fx_a, fx_b, fb_a, fb_b;
  logic [31:0] imm;

  always_comb begin
    fx_a = x_we && (x_wa == ra_a);
    fx_b = x_we && (x_wa == ra_b);
    fb_a = byp_valid && (byp_wa == ra_a);
    fb_b = byp_valid && (byp_wa == ra_b);
    reg_a = fx_a ? x_wd : (fb_a ? byp_wd : rf_a);
    reg_b = fx_b ? x_wd : (fb_b ? byp_wd : rf_b);

    unique case (dec.imm_kind)
      IMM_5:     imm = k_valid ? {16'd0, k, ir[9:5]} : {27'd0, ir[9:5]};
      IMM_SHAMT: imm = {27'd0, ir[9:5]};
      IMM_8x4:   imm = {22'd0, ir[7:0], 2'b00};
      default:   imm = 32'd0;
    endcase

    if (dec.is_ld || dec.is_st) begin
      alu_a = reg_b;
      alu_b = k_valid ? {{19{k[KLEN-1]}}, k, 2'b00} : 32'd0;
    end else begin
      alu_a = reg_a;
      alu_b = dec.b_is_imm ? imm : reg_b;
    end
    store_data = reg_a;

    // report only forwarding that fed an operand the instruction uses
    fwd_x  = (fx_a && (dec.we || dec.is_st || dec.br_kind == BR_REG || dec.skip_kind != SK_NONE))
          || (fx_b && !dec.b_is_imm);
    fwd_wb = (!fx_a && fb_a) || (!fx_b && fb_b && !dec.b_is_imm);
  end

endmodule
