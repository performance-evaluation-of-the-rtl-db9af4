// prefetch_unit: fetch stage.  Holds the prefetch program counter (PPC),
// issues reads to the instruction memory and buffers the returned 16-bit
// instructions in a small FIFO so that fetching continues while the
// pipeline behind it is stalled.
//
// The instruction memory is synchronous: an instruction requested in one
// cycle arrives in the next.  When the FIFO is empty the arriving
// instruction is passed straight to the decode stage in the cycle it
// arrives; otherwise the FIFO head is offered.  A new read is issued only
// when the FIFO will have room for its result.  A redirect (taken branch or
// jump) empties the FIFO, discards the read in flight and reloads the PPC;
// with `redirect_delay` set it first refetches the delay-slot instruction at
// `delay_pc` and then continues at the target.  The PPC is a byte address
// and advances by 2.
//
// Interface: imem_re/imem_addr/imem_rdata (halfword-addressed instruction
// master), out_valid/out_ready/out_instr/out_pc towards the decode stage,
// redirect inputs from the branch logic.  FIFO_DEPTH and the reset address
// 0 are this design's choice.
module prefetch_unit
  import nios_pkg::*;
#(
  parameter int unsigned IAW        = 13,  // halfword address bits (16 KB)
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            imem_re,
  output logic [IAW-1:0]  imem_addr,
  input  logic [ILEN-1:0] imem_rdata,
  output logic            out_valid,
  output logic [ILEN-1:0] out_instr,
  output logic [31:0]     out_pc,
  input  logic            out_ready,
  input  logic            redirect,
  input  logic            redirect_delay,
  input  logic [31:0]     redirect_target,
  input  logic [31:0]     delay_pc
);

  typedef struct packed {
    logic [ILEN-1:0] instr;
    logic [31:0]     pc;
  } entry_t;

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic [31:0]  ppc;
  logic         pend;         // a target waits behind a refetched delay slot
  logic [31:0]  pend_target;
  logic         inflight;
  logic [31:0]  inflight_pc;
  entry_t       fifo [FIFO_DEPTH];
  logic [CW-1:0] count;

  logic   pop, push, bypass;
  logic [CW:0] occ_next;
  entry_t arriving;
  int unsigned wr_idx;

  always_comb begin
    arriving  = '{instr: imem_rdata, pc: inflight_pc};
    if (count != '0) begin
      out_valid = 1'b1;
      out_instr = fifo[0].instr;
      out_pc    = fifo[0].pc;
    end else begin
      out_valid = inflight;
      out_instr = imem_rdata;
      out_pc    = inflight_pc;
    end
    pop      = out_valid && out_ready;
    bypass   = (count == '0) && inflight && pop;
    push     = inflight && !bypass;
    occ_next = (CW+1)'(count) + (CW+1)'(inflight) - (CW+1)'(pop);
    imem_re  = !redirect && (occ_next < (CW+1)'(FIFO_DEPTH));
    imem_addr = ppc[IAW:1];
    wr_idx    = (pop && !bypass) ? int'(count) - 1 : int'(count);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ppc         <= '0;
      pend        <= 1'b0;
      pend_target <= '0;
      inflight    <= 1'b0;
      inflight_pc <= '0;
      count       <= '0;
    end else if (redirect) begin
      ppc         <= redirect_delay ? delay_pc : redirect_target;
      pend        <= redirect_delay;
      pend_target <= redirect_target;
      inflight    <= 1'b0;
      count       <= '0;
    end else begin
      // FIFO: drop the head on a pop from the FIFO, append the arrival
      if (pop && !bypass) begin
        for (int i = 0; i < FIFO_DEPTH - 1; i++) fifo[i] <= fifo[i+1];
      end
      if (push) fifo[wr_idx] <= arriving;
      count <= CW'(occ_next);
      inflight <= imem_re;
      if (imem_re) begin
        inflight_pc <= ppc;
        if (pend) begin
          ppc  <= pend_target;
          pend <= 1'b0;
        end else begin
          ppc <= ppc + 32'd2;
        end
      end
    end
  end

endmodule
