// tb_onchip_memory: checks the synchronous on-chip RAM: one-cycle read
// latency, output held while re is low, old data on a read of the address
// written at the same edge, and random write/read traffic against a
// reference array.
module tb_onchip_memory;
  localparam int W = 16, D = 256;
  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  onchip_memory #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [W-1:0] exp, string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rdata, exp);
    end
  endtask

  initial begin
    // fill
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = W'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    // read latency: data appears after the edge, not before
    re = 1; raddr = 8'd17;
    @(negedge clk); chk(ref_mem[17], "read after one edge");
    re = 0; raddr = 8'd18;
    @(negedge clk); chk(ref_mem[17], "output held while re low");
    // read during write of the same address returns the old word
    re = 1; raddr = 8'd40; we = 1; waddr = 8'd40; wdata = ~ref_mem[40];
    @(negedge clk); chk(ref_mem[40], "old data on read-during-write");
    ref_mem[40] = wdata; we = 0;
    @(negedge clk); chk(ref_mem[40], "new data on the next read");
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] ra;
      ra = 8'($urandom);
      re = 1; raddr = ra;
      we = $urandom_range(0, 1); waddr = 8'($urandom); wdata = W'($urandom);
      @(negedge clk);
      chk(ref_mem[ra], "random read");
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
