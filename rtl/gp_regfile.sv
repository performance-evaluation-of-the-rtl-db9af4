// gp_regfile: windowed general-purpose register file held in two on-chip
// memory modules.
//
// Both memories receive every write, so together they give two independent
// read ports (operand A and operand B) and one write port.  Addresses are
// physical register numbers produced by the register file address handler.
// Reads are synchronous: the operands appear one clock after the addresses,
// which the pipeline uses by presenting the addresses in the decode stage
// and consuming the data, unbuffered, in the operand stage.  `re` freezes
// the outputs while the operand stage is stalled.
//
// The two-memory organisation and the synchronous read follow the described
// datapath; the default size of 512 registers is one of the three sizes the
// architecture allows (128, 256, 512).
module gp_regfile #(
  parameter int unsigned RF_SIZE = 512,
  localparam int unsigned AW     = $clog2(RF_SIZE)
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] ra_a,
  input  logic [AW-1:0] ra_b,
  output logic [31:0]   rd_a,
  output logic [31:0]   rd_b,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [31:0]   wd
);

  onchip_memory #(.WIDTH(32), .DEPTH(RF_SIZE)) bank_a (
    .clk, .we, .waddr(wa), .wdata(wd), .re, .raddr(ra_a), .rdata(rd_a));

  onchip_memory #(.WIDTH(32), .DEPTH(RF_SIZE)) bank_b (
    .clk, .we, .waddr(wa), .wdata(wd), .re, .raddr(ra_b), .rdata(rd_b));

endmodule
