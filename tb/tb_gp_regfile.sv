// tb_gp_regfile: checks the two-bank register file at its default size of
// 512 registers: both read ports return the written word one cycle after the
// addresses, independently of each other, and hold while re is low.
module tb_gp_regfile;
  logic clk = 1'b0;
  logic re = 1'b0, we = 1'b0;
  logic [8:0] ra_a = '0, ra_b = '0, wa = '0;
  logic [31:0] wd = '0, rd_a, rd_b;
  logic [31:0] ref_rf [512];
  int checks = 0, failures = 0;

  gp_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); we = 1; wa = 9'(i); wd = $urandom; ref_rf[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [8:0] a, b;
      a = 9'($urandom); b = 9'($urandom);
      re = 1; ra_a = a; ra_b = b;
      we = $urandom_range(0, 1); wa = 9'($urandom); wd = $urandom;
      if (we && (wa == a || wa == b)) we = 0;
      @(negedge clk);
      chk(rd_a, ref_rf[a], "port A");
      chk(rd_b, ref_rf[b], "port B");
      if (we) ref_rf[wa] = wd;
      // hold
      re = 0; ra_a = ~a; ra_b = ~b; we = 0;
      @(negedge clk);
      chk(rd_a, ref_rf[a], "port A held");
      chk(rd_b, ref_rf[b], "port B held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
