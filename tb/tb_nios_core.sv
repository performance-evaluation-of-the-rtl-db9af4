// tb_nios_core: cycle-level test of the 4-stage core with behavioural
// instruction and data memories (one-cycle synchronous reads).
//
// A short directed program is checked instruction by instruction against
// the retire cycle it must have: the first instruction retires in cycle 5
// (five cycles per instruction), a taken branch lets its delay slot retire
// and then costs two empty cycles, a load or store holds the execute stage
// one extra cycle, a dependent instruction right behind a load or an ALU
// result costs nothing (forwarding), SAVE and RESTORE cost nothing, and a
// taken skip turns the next instruction into an empty slot.  The values
// stored to data memory are compared with constants.
module tb_nios_core;
  import nios_pkg::*;
  import nios_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic imem_re;
  logic [12:0] imem_addr;
  logic [15:0] imem_rdata;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic dmem_we, dmem_re;
  logic retire, ev_mem_stall, ev_branch, ev_skip, ev_annul, ev_fwd_x, ev_fwd_wb,
        ev_pfx_use, ev_cwp_fwd;
  logic [CWPW-1:0] cwp;

  nios_core dut (.*);
  always #5 clk = ~clk;

  logic [15:0] imem [8192];
  logic [31:0] dmem [4096];
  always_ff @(posedge clk) begin
    if (imem_re) imem_rdata <= imem[imem_addr];
    if (dmem_re) dmem_rdata <= dmem[dmem_addr[13:2]];
    if (dmem_we) dmem[dmem_addr[13:2]] <= dmem_wdata;
  end

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n;
  function automatic void put(logic [15:0] w); imem[n] = w; n++; endfunction

  int retire_cyc [$];
  logic [31:0] st_a [$], st_d [$];
  int cyc;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (retire) retire_cyc.push_back(cyc);
    if (dmem_we) begin st_a.push_back(dmem_addr); st_d.push_back(dmem_wdata); end
  end

  initial begin
    // retire cycle expected for each retiring instruction, in order
    int exp [$];
    n = 0;
    foreach (imem[i]) imem[i] = 16'h0000;
    imem_rdata = 0;
    put(ri(OP_MOVI, 1, 16));          //  0  r1 = 16             retire 5
    put(ri(OP_MOVI, 2, 1));           //  1  r2 = 1              6
    put(i11(OP5_BR, 2));              //  2  BR to 5             7
    put(ri(OP_ADDI, 2, 1));           //  3  delay slot, r2 = 2  8
    put(ri(OP_ADDI, 2, 8));           //  4  jumped over
    put(ri(OP_ADDI, 2, 4));           //  5  r2 = 6              11 (two empty cycles)
    put(rr(OP_ST, 2, 1));             //  6  [16] = 6            13 (one stall)
    put(rr(OP_LD, 3, 1));             //  7  r3 = 6              15
    put(rr(OP_ADD, 3, 3));            //  8  r3 = 12 (uses load) 16
    put(rr(OP_ADD, 3, 2));            //  9  r3 = 18             17
    put(save(0));                     // 10                      18
    put(rr(OP_MOV, 24, 24));          // 11  new window          19
    put(restore());                   // 12                      20
    put(ri(OP_CMPI, 3, 18));          // 13  Z = 1               21
    put(skps(CC_Z));                  // 14  skip next           22
    put(ri(OP_MOVI, 3, 0));           // 15  annulled            (23 empty)
    put(ri(OP_ADDI, 1, 4));           // 16  r1 = 20             24
    put(rr(OP_ST, 3, 1));             // 17  [20] = 18           26
    put(i11(OP5_BR, -1));             // 18  stay here
    put(nop());
    exp = '{5, 6, 7, 8, 11, 13, 15, 16, 17, 18, 19, 20, 21, 22, 24, 26};
    cyc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (40) @(negedge clk);
    for (int i = 0; i < exp.size(); i++)
      chk(i < retire_cyc.size() && retire_cyc[i] == exp[i],
          $sformatf("instruction %0d retires in cycle %0d, expected %0d", i,
                    (i < retire_cyc.size()) ? retire_cyc[i] : -1, exp[i]));
    chk(st_a.size() >= 2, "two stores seen");
    if (st_a.size() >= 2) begin
      chk(st_a[0] == 16 && st_d[0] == 6, "first store: delay slot executed, jumped-over skipped");
      chk(st_a[1] == 20 && st_d[1] == 18, "second store: forwarding and skip");
    end
    chk(cwp == 5'd30, "window restored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
