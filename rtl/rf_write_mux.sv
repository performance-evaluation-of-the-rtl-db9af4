// rf_write_mux: register file write multiplexer of the write-back partition.
//
// Selects the value written to the general-purpose register file at the end
// of the execute stage: the ALU result, the word returned by the data
// memory (loads), the STATUS control register (RDCTL) or the return address
// of BSR/CALL carried down the pipeline.  Its output is also the value the
// data forwarding logic hands to the operand stage.
//
// Purely combinational; the four sources are those drawn into the
// multiplexer in the datapath diagram.
module rf_write_mux
  import nios_pkg::*;
(
  input  wb_sel_e     sel,
  input  logic [31:0] alu_result,
  input  logic [31:0] mem_data,
  input  logic [31:0] ctl_data,
  input  logic [31:0] link_addr,
  output logic [31:0] wd
);

  always_comb begin
    unique case (sel)
      WB_MEM:  wd = mem_data;
      WB_CTL:  wd = ctl_data;
      WB_LINK: wd = link_addr;
      default: wd = alu_result;
    endcase
  end

endmodule
