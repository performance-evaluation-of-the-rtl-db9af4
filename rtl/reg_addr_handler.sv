// reg_addr_handler: register file address handler of the decode stage.
//
// Turns the window-relative register numbers of the instruction in the IR
// into physical register file addresses.  r0..r7 are globals and map to
// physical 0..7.  r8..r31 map into a circular array of NWIN windows of 16
// registers above the globals: phys = 8 + ((CWP*16 + r - 8) mod NWIN*16),
// so that window CWP-1 (entered by SAVE) sees the outs r8..r15 of window
// CWP as its ins r24..r31.  SAVE reads %sp in the old window and writes %sp
// in the new one, so its destination uses CWP-1.  The CWP input is the
// forwarded value that already includes SAVE/RESTORE/WRCTL instructions
// still in the operand and execute stages.
//
// Purely combinational.  The window layout, the wrap-around instead of a
// window overflow trap, and NWIN = (RF_SIZE-8)/16 are this design's choices.
module reg_addr_handler
  import nios_pkg::*;
#(
  parameter int unsigned RF_SIZE = 512,
  localparam int unsigned AW     = $clog2(RF_SIZE),
  localparam int unsigned NWIN   = (RF_SIZE - 8) / 16
) (
  input  logic [ILEN-1:0] ir,
  input  dec_t            dec,
  input  logic [CWPW-1:0] cwp,
  output logic [AW-1:0]   ra_a,
  output logic [AW-1:0]   ra_b,
  output logic [AW-1:0]   wa
);

  function automatic logic [AW-1:0] phys(logic [4:0] r, logic [CWPW-1:0] w);
    int unsigned s;
    if (r < 5'd8) return AW'(r);
    s = int'(w) * 16 + int'(r) - 8;
    if (s >= NWIN * 16) s = s - NWIN * 16;
    return AW'(s + 8);
  endfunction

  logic [CWPW-1:0] cwp_new;
  logic [4:0]      a_field, dst_field;

  always_comb begin
    cwp_new   = (cwp == '0) ? CWPW'(NWIN - 1) : cwp - 1'b1;
    a_field   = dec.a_is_sp ? REG_SP : ir[4:0];
    ra_a      = phys(a_field, cwp);
    ra_b      = phys(ir[9:5], cwp);
    unique case (dec.dst_sel)
      DST_LINK:   dst_field = REG_LINK;
      DST_SP_NEW: dst_field = REG_SP;
      default:    dst_field = ir[4:0];
    endcase
    wa = phys(dst_field, (dec.dst_sel == DST_SP_NEW) ? cwp_new : cwp);
  end

endmodule
