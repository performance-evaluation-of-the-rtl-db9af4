// k_register: the 11-bit K (prefix) register of the operand stage.
//
// A PFX instruction commits in the operand stage: when it leaves that stage
// its 11-bit immediate is loaded into K and K is marked valid.  The next
// instruction that leaves the operand stage consumes K (the operand handler
// uses it to widen its immediate) and clears the valid flag.  Bubbles leave
// K untouched, so a PFX followed by a pipeline bubble still prefixes the
// instruction after it.  An instruction annulled by a skip is treated like
// any other instruction here; an annulled PFX loads nothing.
//
// Interface: advance (operand stage hands its instruction on), live (that
// instruction is valid and not annulled), valid_in (valid, annulled or not),
// is_pfx, imm11.  Outputs k and k_valid are registered.
module k_register
  import nios_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            advance,
  input  logic            valid_in,
  input  logic            live,
  input  logic            is_pfx,
  input  logic [KLEN-1:0] imm11,
  output logic [KLEN-1:0] k,
  output logic            k_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k       <= '0;
      k_valid <= 1'b0;
    end else if (advance && valid_in) begin
      if (live && is_pfx) begin
        k       <= imm11;
        k_valid <= 1'b1;
      end else begin
        k_valid <= 1'b0;
      end
    end
  end

endmodule
