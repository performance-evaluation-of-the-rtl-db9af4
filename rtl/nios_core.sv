// nios_core: 4-stage pipelined Nios processor core (fetch F, decode D,
// operand O, execute X) with the general-purpose register file in on-chip
// memory and full data forwarding.
//
//   F  prefetch_unit: PPC, instruction master, FIFO buffer.
//   D  IR; instr_decoder (synchronous ROM addressed by the instruction
//      leaving F, so its output is ready together with the IR);
//      reg_addr_handler maps register numbers through CWP and drives the
//      synchronous register file, whose outputs go unbuffered to O.
//   O  D/O register (IR, decoded word, PC, physical addresses);
//      operand_handler with data forwarding; k_register; branch_logic.
//      Branches, jumps, skips and PFX commit here.
//   X  O/X register; alu; data master; control_registers; rf_write_mux;
//      register file write.
//
// Timing: an instruction is requested in one cycle and retires at the end
// of its fifth cycle.  A taken branch redirects the fetch at the end of its
// operand-stage cycle; its delay-slot instruction completes and two bubbles
// follow (branch penalty 2).  Every load or store holds the execute stage
// for one extra cycle while the synchronous data memory answers (memory
// penalty 1), stalling F, D and O with it.  Results are forwarded from X and
// from a write-back bypass register to O, so data hazards cost nothing, and
// the CWP produced by SAVE/RESTORE/WRCTL in O or X is forwarded to the
// address handler in D, so SAVE/RESTORE cost nothing either.  A taken skip
// annuls the next instruction in O (and also the one after it when the
// annulled one is a PFX).
//
// Interface: instruction master (imem_*), data master (dmem_*: word
// address in bytes, write data, write/read strobes, read data one cycle
// later), and observation outputs: retire and one strobe per pipeline event.
// Stage organisation, penalties and forwarding follow the 4-stage
// configuration; encodings and interface details are this design's own.
//
// Reset is asynchronous, active low.  A lint tool may report rst_n as used
// both asynchronously and synchronously: the synchronous use is only the
// `disable iff` of the delay-slot assertion at the end, not logic.
module nios_core
  import nios_pkg::*;
#(
  parameter int unsigned RF_SIZE    = 512,
  parameter int unsigned IAW        = 13,
  parameter int unsigned FIFO_DEPTH = 2,
  localparam int unsigned AW        = $clog2(RF_SIZE),
  localparam int unsigned NWIN      = (RF_SIZE - 8) / 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction master
  output logic            imem_re,
  output logic [IAW-1:0]  imem_addr,
  input  logic [ILEN-1:0] imem_rdata,
  // data master
  output logic [31:0]     dmem_addr,
  output logic [31:0]     dmem_wdata,
  output logic            dmem_we,
  output logic            dmem_re,
  input  logic [31:0]     dmem_rdata,
  // observation
  output logic            retire,
  output logic            ev_mem_stall,
  output logic            ev_branch,
  output logic            ev_skip,
  output logic            ev_annul,
  output logic            ev_fwd_x,
  output logic            ev_fwd_wb,
  output logic            ev_pfx_use,
  output logic            ev_cwp_fwd,
  output logic [CWPW-1:0] cwp
);

  // ------------------------------------------------------------ signals
  logic            stall;
  logic            pf_valid, pf_ready;
  logic [ILEN-1:0] pf_instr;
  logic [31:0]     pf_pc;
  logic            redirect, redirect_delay;
  logic [31:0]     br_target;

  // D stage (IR)
  logic            d_valid;
  logic [ILEN-1:0] d_ir;
  logic [31:0]     d_pc;
  dec_t            d_dec;
  logic [AW-1:0]   d_ra_a, d_ra_b, d_wa;
  logic [CWPW-1:0] d_cwp;

  // O stage (D/O)
  logic            o_valid;
  logic [ILEN-1:0] o_ir;
  logic [31:0]     o_pc;
  dec_t            o_dec;
  logic [AW-1:0]   o_ra_a, o_ra_b, o_wa;
  logic            skip_pending;
  logic            o_live;
  logic [31:0]     rf_a, rf_b, o_reg_a, o_reg_b, o_alu_a, o_alu_b, o_st;
  logic [KLEN-1:0] k;
  logic            k_valid;
  logic            skip_taken;
  logic [CWPW-1:0] o_cwp_new;
  logic            fwd_x, fwd_wb;

  // X stage (O/X)
  logic            x_valid;
  dec_t            x_dec;
  logic [AW-1:0]   x_wa;
  logic [31:0]     x_a, x_b, x_st, x_link;
  logic [CWPW-1:0] x_cwp_new;
  logic            x_mem_wait;
  logic [31:0]     x_result, x_wd;
  flags_t          x_flags, flags;
  logic [31:0]     status;
  logic            x_done, x_we;
  logic [CWPW-1:0] x_cwp_eff;
  flags_t          flags_fwd;

  // ------------------------------------------------------------ F
  prefetch_unit #(.IAW(IAW), .FIFO_DEPTH(FIFO_DEPTH)) u_prefetch (
    .clk, .rst_n,
    .imem_re, .imem_addr, .imem_rdata,
    .out_valid(pf_valid), .out_instr(pf_instr), .out_pc(pf_pc), .out_ready(pf_ready),
    .redirect, .redirect_delay, .redirect_target(br_target), .delay_pc(o_pc + 32'd2));

  // The decode stage accepts an instruction whenever the pipe moves, except
  // when a taken branch finds its delay slot already in D.
  assign pf_ready = !stall && !(redirect && d_valid);

  // ------------------------------------------------------------ D
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      d_ir    <= '0;
      d_pc    <= '0;
    end else if (!stall) begin
      d_valid <= pf_valid && pf_ready;
      d_ir    <= pf_instr;
      d_pc    <= pf_pc;
    end
  end

  instr_decoder u_decoder (
    .clk, .rst_n, .en(!stall), .fetch_op(pf_instr[15:10]), .dec(d_dec));

  // CWP seen by the decode stage: includes the window changes of the
  // instructions in X and in O that have not committed yet.
  always_comb begin
    x_cwp_eff = (x_valid && x_dec.cwp_op != CWP_NONE) ? x_cwp_new : cwp;
    unique case (o_dec.cwp_op)
      CWP_SAVE:    o_cwp_new = (x_cwp_eff == '0) ? CWPW'(NWIN - 1) : x_cwp_eff - 1'b1;
      CWP_RESTORE: o_cwp_new = (x_cwp_eff == CWPW'(NWIN - 1)) ? '0 : x_cwp_eff + 1'b1;
      CWP_WRCTL:   o_cwp_new = (o_reg_a[4 +: CWPW] >= CWPW'(NWIN)) ? CWPW'(NWIN - 1)
                                                                  : o_reg_a[4 +: CWPW];
      default:     o_cwp_new = x_cwp_eff;
    endcase
    d_cwp = (o_live && o_dec.cwp_op != CWP_NONE) ? o_cwp_new : x_cwp_eff;
  end

  reg_addr_handler #(.RF_SIZE(RF_SIZE)) u_addr (
    .ir(d_ir), .dec(d_dec), .cwp(d_cwp), .ra_a(d_ra_a), .ra_b(d_ra_b), .wa(d_wa));

  gp_regfile #(.RF_SIZE(RF_SIZE)) u_regfile (
    .clk, .re(!stall), .ra_a(d_ra_a), .ra_b(d_ra_b), .rd_a(rf_a), .rd_b(rf_b),
    .we(x_we), .wa(x_wa), .wd(x_wd));

  // ------------------------------------------------------------ O
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      o_ir    <= '0;
      o_pc    <= '0;
      o_dec   <= DEC_NOP;
      o_ra_a  <= '0;
      o_ra_b  <= '0;
      o_wa    <= '0;
    end else if (!stall) begin
      o_valid <= d_valid;
      o_ir    <= d_ir;
      o_pc    <= d_pc;
      o_dec   <= d_dec;
      o_ra_a  <= d_ra_a;
      o_ra_b  <= d_ra_b;
      o_wa    <= d_wa;
    end
  end

  // Skip annulment: the next valid instruction after a taken skip is
  // annulled; when that one is a PFX the annulment extends to its successor.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) skip_pending <= 1'b0;
    else if (!stall && o_valid) begin
      if (skip_pending) skip_pending <= o_dec.is_pfx;
      else              skip_pending <= skip_taken;
    end
  end

  assign o_live = o_valid && !skip_pending;

  k_register u_kreg (
    .clk, .rst_n, .advance(!stall), .valid_in(o_valid), .live(o_live),
    .is_pfx(o_dec.is_pfx), .imm11(o_ir[10:0]), .k, .k_valid);

  operand_handler #(.RF_SIZE(RF_SIZE)) u_operand (
    .clk, .rst_n, .dec(o_dec), .ir(o_ir), .ra_a(o_ra_a), .ra_b(o_ra_b),
    .rf_a, .rf_b, .x_we, .x_wa, .x_wd, .k, .k_valid,
    .reg_a(o_reg_a), .reg_b(o_reg_b), .alu_a(o_alu_a), .alu_b(o_alu_b),
    .store_data(o_st), .fwd_x, .fwd_wb);

  // Condition flags seen by a skip in O: those the instruction in X is
  // producing, else the committed ones.
  always_comb begin
    if (x_valid && x_dec.wrctl)             flags_fwd = x_a[3:0];
    else if (x_valid && x_dec.flags != FL_NONE) flags_fwd = x_flags;
    else                                    flags_fwd = flags;
  end

  logic br_redirect;
  branch_logic u_branch (
    .live(o_live), .dec(o_dec), .ir(o_ir), .pc(o_pc), .reg_a(o_reg_a),
    .flags(flags_fwd), .redirect(br_redirect), .target(br_target), .skip_taken);

  assign redirect       = br_redirect && !stall;
  assign redirect_delay = !d_valid && !pf_valid;

  // ------------------------------------------------------------ X
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_valid   <= 1'b0;
      x_dec     <= DEC_NOP;
      x_wa      <= '0;
      x_a       <= '0;
      x_b       <= '0;
      x_st      <= '0;
      x_link    <= '0;
      x_cwp_new <= '0;
    end else if (!stall) begin
      x_valid   <= o_live;
      x_dec     <= o_dec;
      x_wa      <= o_wa;
      x_a       <= (o_dec.wrctl) ? o_reg_a : o_alu_a;
      x_b       <= o_alu_b;
      x_st      <= o_st;
      x_link    <= o_pc + 32'd4;
      x_cwp_new <= o_cwp_new;
    end
  end

  // One extra execute cycle for every data memory access.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_mem_wait <= 1'b0;
    else        x_mem_wait <= stall;
  end

  assign stall = x_valid && (x_dec.is_ld || x_dec.is_st) && !x_mem_wait;

  alu u_alu (
    .op(x_dec.alu_op), .a(x_a), .b(x_b), .flag_upd(x_dec.flags), .flags_in(flags),
    .result(x_result), .flags_out(x_flags));

  assign dmem_addr  = x_result;
  assign dmem_wdata = x_st;
  assign dmem_we    = stall && x_dec.is_st;
  assign dmem_re    = stall && x_dec.is_ld;

  control_registers #(.RF_SIZE(RF_SIZE)) u_ctl (
    .clk, .rst_n,
    .flags_we(x_done && x_dec.flags != FL_NONE), .flags_new(x_flags),
    .cwp_we(x_done && (x_dec.cwp_op == CWP_SAVE || x_dec.cwp_op == CWP_RESTORE)),
    .cwp_new(x_cwp_new),
    .wrctl(x_done && x_dec.wrctl), .wrctl_data(x_a),
    .flags, .cwp, .status);

  rf_write_mux u_wbmux (
    .sel(x_dec.wb_sel), .alu_result(x_result), .mem_data(dmem_rdata),
    .ctl_data(status), .link_addr(x_link), .wd(x_wd));

  assign x_done = x_valid && !stall;
  assign x_we   = x_done && x_dec.we;

  // ------------------------------------------------------------ events
  assign retire       = x_done;
  assign ev_mem_stall = stall;
  assign ev_branch    = redirect;
  assign ev_skip      = !stall && skip_taken;
  assign ev_annul     = !stall && o_valid && skip_pending;
  assign ev_fwd_x     = !stall && o_live && fwd_x;
  assign ev_fwd_wb    = !stall && o_live && fwd_wb;
  assign ev_pfx_use   = !stall && o_live && k_valid;
  assign ev_cwp_fwd   = !stall && d_valid && (d_cwp != cwp);

  // A taken branch may not sit in the delay slot of another.
  property p_no_branch_in_delay_slot;
    @(posedge clk) disable iff (!rst_n)
      redirect |=> !(o_live && o_dec.br_kind != BR_NONE);
  endproperty
  assert property (p_no_branch_in_delay_slot);

endmodule
