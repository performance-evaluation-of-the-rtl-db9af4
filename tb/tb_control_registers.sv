// tb_control_registers: checks the STATUS register: reset value (flags 0,
// CWP = 30 for 512 registers), independent flag and CWP updates, WRCTL
// priority and the clamping of an out-of-range CWP.
module tb_control_registers;
  import nios_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic flags_we = 0, cwp_we = 0, wrctl = 0;
  flags_t flags_new = '0, flags;
  logic [CWPW-1:0] cwp_new = '0, cwp;
  logic [31:0] wrctl_data = '0, status;
  int checks = 0, failures = 0;

  control_registers dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (status %h)", what, status); end
  endtask

  initial begin
    flags_t ef;
    logic [4:0] ec;
    repeat (2) @(negedge clk);
    chk(status == 32'h0000_01E0, "reset value: CWP 30, flags 0");
    rst_n = 1;
    flags_we = 1; flags_new = 4'b1010; @(negedge clk); flags_we = 0;
    chk(flags == 4'b1010 && cwp == 5'd30 && status == 32'h1EA, "flag write");
    cwp_we = 1; cwp_new = 5'd7; @(negedge clk); cwp_we = 0;
    chk(cwp == 5'd7 && flags == 4'b1010 && status == 32'h7A, "CWP write");
    wrctl = 1; wrctl_data = 32'h0000_0135; flags_we = 1; flags_new = 4'b0000;
    @(negedge clk); wrctl = 0; flags_we = 0;
    chk(cwp == 5'd19 && flags == 4'b0101, "WRCTL has priority");
    wrctl = 1; wrctl_data = 32'h0000_01F3; @(negedge clk); wrctl = 0;
    chk(cwp == 5'd30 && flags == 4'b0011, "CWP 31 clamped to 30");
    ef = flags; ec = cwp;
    for (int n = 0; n < 500; n++) begin
      flags_we = $urandom_range(0, 1); flags_new = 4'($urandom);
      cwp_we = $urandom_range(0, 1); cwp_new = 5'($urandom_range(0, 30));
      wrctl = ($urandom_range(0, 5) == 0); wrctl_data = $urandom;
      @(negedge clk);
      if (wrctl) begin
        ef = wrctl_data[3:0];
        ec = (wrctl_data[8:4] > 5'd30) ? 5'd30 : wrctl_data[8:4];
      end else begin
        if (flags_we) ef = flags_new;
        if (cwp_we) ec = cwp_new;
      end
      chk(flags == ef && cwp == ec && status == {23'd0, ec, ef}, "random updates");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
