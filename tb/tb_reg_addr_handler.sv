// tb_reg_addr_handler: checks the window mapping of the register address
// handler at 512 registers (31 windows): globals map to themselves, every
// windowed register maps inside 8..503, the outs of window w are the ins of
// window w-1 (and window 0 wraps to window 30), the locals of different
// windows never collide, and SAVE reads %sp in the old window and writes it
// in the new one.
module tb_reg_addr_handler;
  import nios_pkg::*;
  localparam int NWIN = 31;
  logic [15:0] ir;
  dec_t dec;
  logic [CWPW-1:0] cwp;
  logic [8:0] ra_a, ra_b, wa;
  int checks = 0, failures = 0;

  reg_addr_handler dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int map(int r, int w);
    int s;
    if (r < 8) return r;
    s = (w * 16 + r - 8) % (NWIN * 16);
    return 8 + s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen [512];
    dec = DEC_NOP;
    // exhaustive over window and register numbers
    for (int w = 0; w < NWIN; w++) begin
      for (int r = 0; r < 32; r++) begin
        cwp = CWPW'(w);
        ir = {6'd0, 5'(31 - r), 5'(r)};
        #1;
        chk(int'(ra_a) == map(r, w) && int'(ra_b) == map(31 - r, w) && int'(wa) == map(r, w),
            $sformatf("map w=%0d r=%0d got %0d/%0d/%0d", w, r, ra_a, ra_b, wa));
        chk(r >= 8 || int'(ra_a) == r, "global fixed");
        chk(r < 8 || (ra_a >= 8 && ra_a < 504), "windowed range");
      end
    end
    // overlap: outs (8..15) of window w are the ins (24..31) of window w-1
    for (int w = 0; w < NWIN; w++) begin
      for (int r = 8; r < 16; r++) begin
        logic [8:0] outs;
        cwp = CWPW'(w); ir = {11'd0, 5'(r)}; #1; outs = ra_a;
        cwp = CWPW'((w == 0) ? NWIN - 1 : w - 1); ir = {11'd0, 5'(r + 16)}; #1;
        chk(ra_a == outs, $sformatf("overlap w=%0d r=%0d", w, r));
      end
    end
    // locals are private
    foreach (seen[i]) seen[i] = 0;
    for (int w = 0; w < NWIN; w++)
      for (int r = 16; r < 24; r++) begin
        cwp = CWPW'(w); ir = {11'd0, 5'(r)}; #1;
        seen[ra_a]++;
      end
    foreach (seen[i]) if (seen[i] > 1) chk(0, $sformatf("local collision at %0d", i));
    chk(1, "locals checked");
    // SAVE: reads %sp in the current window, writes %sp in window cwp-1
    dec.a_is_sp = 1'b1; dec.dst_sel = DST_SP_NEW;
    for (int w = 0; w < NWIN; w++) begin
      cwp = CWPW'(w); ir = {6'o35, 2'b0, 8'd3}; #1;
      chk(int'(ra_a) == map(14, w) && int'(wa) == map(14, (w == 0) ? NWIN - 1 : w - 1),
          $sformatf("SAVE addresses w=%0d", w));
    end
    // link destination
    dec = DEC_NOP; dec.dst_sel = DST_LINK;
    cwp = 5'd4; ir = 16'h0003; #1;
    chk(int'(wa) == map(15, 4), "link destination r15");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
