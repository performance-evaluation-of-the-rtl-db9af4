// onchip_memory: synchronous on-chip RAM with one write port and one read
// port, the building block for the instruction memory, the data memory and
// the two banks of the general-purpose register file.
//
// Reads are synchronous: rdata shows the word at raddr one clock after the
// edge at which re was high, and holds while re is low (output clock
// enable).  A read of the address being written at the same edge returns
// the old word; the pipeline resolves that case by forwarding.  There is no
// reset of the contents.
//
// Interface: we/waddr/wdata write port, re/raddr/rdata read port, one clock.
// The read latency of one cycle follows the description of the on-chip
// memories; the old-data read-during-write behaviour is this design's choice.
module onchip_memory #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
