// nios_system: the minimal Nios system used for timing and evaluation: one
// processor core, a 16 KB on-chip instruction memory connected only to the
// instruction master, and a 16 KB on-chip data memory connected only to the
// data master.
//
// The instruction memory (8192 x 16 bit) has a second, write-only port
// through which a program is loaded while the core is held in reset.  The
// data memory (4096 x 32 bit) is word-addressed through bits 13..2 of the
// byte address the core issues; sub-word accesses are not implemented.
// Both memories answer reads one clock after the request.
//
// Ports: clock and active-low core reset; the program-load port
// (prog_we/prog_addr/prog_data); the data master's write traffic for
// observation (dwr_*); retire and pipeline event strobes; the current window
// pointer.  Memory sizes and the one-master-per-memory wiring follow the
// system description; the load port and observation outputs are this
// design's additions.
module nios_system
  import nios_pkg::*;
#(
  parameter int unsigned RF_SIZE    = 512,
  parameter int unsigned IMEM_BYTES = 16384,
  parameter int unsigned DMEM_BYTES = 16384,
  localparam int unsigned IAW       = $clog2(IMEM_BYTES / 2),
  localparam int unsigned DAW       = $clog2(DMEM_BYTES / 4)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            prog_we,
  input  logic [IAW-1:0]  prog_addr,
  input  logic [ILEN-1:0] prog_data,
  output logic            dwr_valid,
  output logic [31:0]     dwr_addr,
  output logic [31:0]     dwr_data,
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

  logic            imem_re;
  logic [IAW-1:0]  imem_addr;
  logic [ILEN-1:0] imem_rdata;
  logic [31:0]     dmem_addr, dmem_wdata, dmem_rdata;
  logic            dmem_we, dmem_re;

  nios_core #(.RF_SIZE(RF_SIZE), .IAW(IAW)) u_core (
    .clk, .rst_n,
    .imem_re, .imem_addr, .imem_rdata,
    .dmem_addr, .dmem_wdata, .dmem_we, .dmem_re, .dmem_rdata,
    .retire, .ev_mem_stall, .ev_branch, .ev_skip, .ev_annul, .ev_fwd_x,
    .ev_fwd_wb, .ev_pfx_use, .ev_cwp_fwd, .cwp);

  onchip_memory #(.WIDTH(ILEN), .DEPTH(IMEM_BYTES / 2)) u_imem (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .re(imem_re), .raddr(imem_addr), .rdata(imem_rdata));

  onchip_memory #(.WIDTH(32), .DEPTH(DMEM_BYTES / 4)) u_dmem (
    .clk, .we(dmem_we), .waddr(dmem_addr[DAW+1:2]), .wdata(dmem_wdata),
    .re(dmem_re), .raddr(dmem_addr[DAW+1:2]), .rdata(dmem_rdata));

  assign dwr_valid = dmem_we;
  assign dwr_addr  = dmem_addr;
  assign dwr_data  = dmem_wdata;

endmodule
