// tb_k_register: checks the prefix register: loaded by a live PFX leaving
// the operand stage, valid for exactly the next instruction, kept across
// bubbles and stalls, not loaded by an annulled PFX.
module tb_k_register;
  logic clk = 1'b0, rst_n = 1'b0;
  logic advance = 0, valid_in = 0, live = 0, is_pfx = 0;
  logic [10:0] imm11 = '0, k;
  logic k_valid;
  int checks = 0, failures = 0;

  k_register dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(bit adv, bit v, bit l, bit p, logic [10:0] imm);
    advance = adv; valid_in = v; live = l; is_pfx = p; imm11 = imm;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    chk(!k_valid, "empty after reset");
    step(1, 1, 1, 1, 11'h5A5);
    chk(k_valid && k == 11'h5A5, "PFX loads K");
    step(1, 0, 0, 0, 11'h000);
    chk(k_valid && k == 11'h5A5, "kept across a bubble");
    step(0, 1, 1, 0, 11'h000);
    chk(k_valid, "kept while stalled");
    step(1, 1, 1, 0, 11'h000);
    chk(!k_valid, "consumed by the next instruction");
    step(1, 1, 1, 1, 11'h123);
    step(1, 1, 1, 1, 11'h456);
    chk(k_valid && k == 11'h456, "second PFX overrides");
    step(1, 1, 0, 1, 11'h7FF);
    chk(!k_valid, "annulled PFX loads nothing");
    for (int n = 0; n < 500; n++) begin
      bit adv, v, l, p, exp_v;
      logic [10:0] imm, exp_k;
      adv = $urandom_range(0, 1); v = $urandom_range(0, 1); l = v && $urandom_range(0, 3) != 0;
      p = $urandom_range(0, 1); imm = 11'($urandom);
      exp_v = k_valid; exp_k = k;
      if (adv && v) begin
        if (l && p) begin exp_v = 1; exp_k = imm; end else exp_v = 0;
      end
      step(adv, v, l, p, imm);
      chk(k_valid == exp_v && (!exp_v || k == exp_k), "random sequence");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
