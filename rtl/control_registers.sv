// control_registers: the STATUS control register of the execute stage.
//
// STATUS holds the condition flags N V Z C in bits 3..0 and the current
// window pointer CWP in bits 8..4; bits 31..9 read as zero.  It is written
// when an instruction commits in the execute stage: flag-setting
// instructions replace the flags,
// SAVE and RESTORE replace CWP with the value computed for them in the
// operand stage, and WRCTL replaces the whole register (a CWP value outside
// the implemented windows is reduced to the highest window).  At reset the
// flags are clear and CWP points at the highest window, NWIN-1, so that a
// program can nest NWIN-1 SAVEs before the window index wraps.
//
// Interface: commit strobes and values in; status, flags and cwp out,
// registered.  Only STATUS is implemented; its layout and reset value are
// this design's choice.
module control_registers
  import nios_pkg::*;
#(
  parameter int unsigned RF_SIZE = 512,
  localparam int unsigned NWIN   = (RF_SIZE - 8) / 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flags_we,
  input  flags_t          flags_new,
  input  logic            cwp_we,
  input  logic [CWPW-1:0] cwp_new,
  input  logic            wrctl,
  input  logic [31:0]     wrctl_data,
  output flags_t          flags,
  output logic [CWPW-1:0] cwp,
  output logic [31:0]     status
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags <= '0;
      cwp   <= CWPW'(NWIN - 1);
    end else if (wrctl) begin
      flags <= wrctl_data[3:0];
      cwp   <= (wrctl_data[4 +: CWPW] >= CWPW'(NWIN)) ? CWPW'(NWIN - 1)
                                                     : wrctl_data[4 +: CWPW];
    end else begin
      if (flags_we) flags <= flags_new;
      if (cwp_we)   cwp   <= cwp_new;
    end
  end

  assign status = pack_status(flags, cwp);

endmodule
