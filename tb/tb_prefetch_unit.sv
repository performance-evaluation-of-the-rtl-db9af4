// tb_prefetch_unit: drives the fetch stage with a synchronous instruction
// memory model (one cycle latency, word at halfword address h = h*7+3) and
// a decode stage that accepts at random.  Checks: instructions come out in
// program order with the right PC and contents, none is lost or repeated
// while the consumer stalls, the first instruction appears two cycles after
// reset (request, then arrival), a redirect restarts the stream at its
// target two cycles later, and a redirect with a delay-slot refetch yields
// the delay-slot address first and then the target.
module tb_prefetch_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  logic imem_re;
  logic [12:0] imem_addr;
  logic [15:0] imem_rdata;
  logic out_valid, out_ready = 1'b0;
  logic [15:0] out_instr;
  logic [31:0] out_pc;
  logic redirect = 0, redirect_delay = 0;
  logic [31:0] redirect_target = 0, delay_pc = 0;
  int checks = 0, failures = 0;

  prefetch_unit dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) if (imem_re) imem_rdata <= 16'(imem_addr * 7 + 3);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] exp_pc, after_delay;
    bit have_after;
    int popped, idle, cyc;
    imem_rdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    out_ready = 1;
    // cycle 1: request; cycle 2: the instruction is offered
    #1; chk(!out_valid, "nothing offered in the first cycle");
    @(negedge clk);
    chk(out_valid && out_pc == 0 && out_instr == 16'd3, "first instruction in cycle 2");
    exp_pc = 0; have_after = 0; popped = 0; idle = 0;
    for (cyc = 0; cyc < 20000; cyc++) begin
      out_ready = ($urandom_range(0, 3) != 0);
      redirect = ($urandom_range(0, 40) == 0);
      redirect_delay = redirect && $urandom_range(0, 1);
      redirect_target = {$urandom_range(0, 2000), 1'b0};
      delay_pc = {$urandom_range(0, 2000), 1'b0};
      #1;
      if (out_valid && out_ready) begin
        chk(out_pc == exp_pc && out_instr == 16'(out_pc[13:1] * 7 + 3),
            $sformatf("stream order: got pc %h expected %h", out_pc, exp_pc));
        popped++;
        if (have_after && out_pc == exp_pc) begin
          exp_pc = after_delay; have_after = 0;
        end else exp_pc = exp_pc + 2;
      end
      if (!out_valid) idle++;
      if (redirect) begin
        if (redirect_delay) begin
          exp_pc = delay_pc; after_delay = redirect_target; have_after = 1;
        end else begin
          exp_pc = redirect_target; have_after = 0;
        end
      end
      @(negedge clk);
      if (redirect) begin
        redirect = 0; out_ready = 1;
        #1; chk(!out_valid, "bubble in the cycle after a redirect");
        @(negedge clk);
        chk(out_valid && out_pc == exp_pc, "restart two cycles after a redirect");
      end
    end
    chk(popped > 10000, $sformatf("throughput: %0d instructions", popped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
