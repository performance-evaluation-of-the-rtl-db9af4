// tb_nios_system: end-to-end test of the Nios system at its default sizes
// (512-register windowed register file, 16 KB instruction and data memory).
//
// Each program is assembled in the testbench, loaded through the program
// port while the core is in reset, and run until it stores to the done
// address 0x3FFC.  The same program is run on the instruction-set reference
// model (nios_tb_pkg::nios_iss).  Checks:
//   - every data-memory store of the core matches the model's, in order;
//   - the number of retired instructions matches the model;
//   - the cycle at which the final store reaches the execute stage equals
//     5 + instructions + 1 per load/store + 2 per taken branch, i.e. five
//     cycles per instruction through the pipe, no data-hazard or
//     SAVE/RESTORE stalls, one memory stall cycle and a two-cycle branch
//     penalty;
//   - directed results (fib(8) = 21 and others) are checked against
//     constants.
// Programs: the test benchmarks pipeline, pipeline-memory, loops (ten-deep
// nest) and memory; fibo (recursive, with register windows); a mixed
// program for PFX/MOVHI/MUL/shifts/CALL/JMP/RDCTL/WRCTL/bit skips; the
// application benchmarks multiply (6x6 matrices), qsort (100 integers,
// recursive), crc32 (256 bytes, bitwise), gol (Game of Life, 10x10 cells,
// 4 generations, a procedure call per cell) and stringsearch (six
// case-insensitive tokens in a 52-character text), each checked against a
// result computed here; and random instruction streams.  The sizes of
// crc32, gol and stringsearch are this testbench's choice.  Every pipeline
// event the core reports must occur at least once.
module tb_nios_system;
  import nios_pkg::*;
  import nios_tb_pkg::*;

  localparam logic [31:0] DONE_ADDR = 32'h3FFC;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic prog_we = 1'b0;
  logic [12:0] prog_addr = '0;
  logic [15:0] prog_data = '0;
  logic dwr_valid, retire;
  logic [31:0] dwr_addr, dwr_data;
  logic ev_mem_stall, ev_branch, ev_skip, ev_annul, ev_fwd_x, ev_fwd_wb, ev_pfx_use, ev_cwp_fwd;
  logic [CWPW-1:0] cwp;

  nios_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned n_ev [8];
  string ev_name [8] = '{"mem_stall", "branch", "skip", "annul", "fwd_x", "fwd_wb",
                         "pfx_use", "cwp_fwd"};

  always @(posedge clk) if (rst_n) begin
    n_ev[0] += ev_mem_stall; n_ev[1] += ev_branch; n_ev[2] += ev_skip;
    n_ev[3] += ev_annul;     n_ev[4] += ev_fwd_x;  n_ev[5] += ev_fwd_wb;
    n_ev[6] += ev_pfx_use;   n_ev[7] += ev_cwp_fwd;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // ------------------------------------------------------------ assembler
  logic [15:0] prog [$];
  function automatic int here(); return prog.size(); endfunction
  function automatic void emit(logic [15:0] w); prog.push_back(w); endfunction
  // branch at index `at` to instruction index `to`
  function automatic void patch_br(int at, logic [4:0] op5, int to);
    prog[at] = i11(op5, to - at - 1);
  endfunction
  function automatic void br(logic [4:0] op5, int to);
    emit(i11(op5, to - here() - 1));
  endfunction
  // load a 16-bit constant
  function automatic void li(int r, int v);
    if (v >= 32) emit(pfx(v >> 5));
    emit(ri(OP_MOVI, r, v & 31));
  endfunction
  // load a 32-bit constant
  function automatic void li32(int r, logic [31:0] v);
    li(r, int'(v[15:0]));
    if (v[31:16] != 0) begin
      if (v[31:16] >= 32) emit(pfx(int'(v[31:21])));
      emit(ri(OP_MOVHI, r, int'(v[20:16])));
    end
  endfunction
  function automatic void finish_prog();
    li(7, int'(DONE_ADDR));
    emit(rr(OP_ST, 0, 7));
    emit(i11(OP5_BR, -1));
    emit(nop());
  endfunction

  // ------------------------------------------------------------ runner
  int unsigned total_retired;
  logic [31:0] mem_img [logic [31:0]];   // final data-memory image of a run

  task automatic run(string name, int max_cycles);
    nios_iss iss;
    int unsigned steps, memops, taken, exp_cycle, cyc, ret, nst;
    logic [31:0] lastpc;
    bit done;
    logic [31:0] got_addr [$];
    logic [31:0] got_data [$];
    iss = new(512);
    foreach (prog[i]) iss.imem[i] = prog[i];
    mem_img.delete();
    // reference run up to (not including) the final store
    steps = 0; memops = 0; taken = 0;
    while (1) begin
      logic [15:0] ins;
      ins = iss.imem[iss.pc[13:1]];
      if (!iss.skip && ins[15:10] == OP_ST && iss.rd(int'(ins[9:5])) == DONE_ADDR) break;
      lastpc = iss.pc;
      if (!iss.skip && (ins[15:10] == OP_LD || ins[15:10] == OP_ST)) memops++;
      if (!iss.skip && (ins[15:11] == OP5_BR || ins[15:11] == OP5_BSR ||
                        ins[15:10] == OP_JMP || ins[15:10] == OP_CALL)) taken++;
      void'(iss.step());
      steps++;
      if (steps > 1_000_000) break;
    end
    exp_cycle = 5 + steps + memops + 2 * taken;

    // load and run the core
    rst_n = 1'b0;
    @(negedge clk);
    foreach (prog[i]) begin
      prog_we = 1'b1; prog_addr = 13'(i); prog_data = prog[i];
      @(negedge clk);
    end
    prog_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    cyc = 0; ret = 0; done = 0;
    while (!done && cyc < max_cycles) begin
      @(posedge clk);
      cyc++;
      if (dwr_valid) begin
        if (dwr_addr == DONE_ADDR) done = 1;
        else begin
          got_addr.push_back(dwr_addr);
          got_data.push_back(dwr_data);
          mem_img[dwr_addr] = dwr_data;
        end
      end
      if (retire && !done) ret++;
    end
    check(done, {name, ": program reached its end"});
    check(cyc == exp_cycle, $sformatf("%s: end cycle %0d, expected %0d", name, cyc, exp_cycle));
    check(longint'(ret) == iss.executed, $sformatf("%s: retired %0d, reference executed %0d",
                                         name, ret, iss.executed));
    nst = iss.st_addr.size();
    check(got_addr.size() == nst, $sformatf("%s: %0d stores, reference %0d", name,
                                            got_addr.size(), nst));
    for (int i = 0; i < nst && i < got_addr.size(); i++) begin
      check(got_addr[i] == iss.st_addr[i] && got_data[i] == iss.st_data[i],
            $sformatf("%s: store %0d [%h]=%h, reference [%h]=%h", name, i,
                      got_addr[i], got_data[i], iss.st_addr[i], iss.st_data[i]));
    end
    total_retired += ret;
    $display("%-16s instructions=%0d cycles=%0d loads/stores=%0d taken branches=%0d stores=%0d",
             name, iss.executed, cyc, memops, taken, nst);
    last_store = (nst > 0) ? iss.st_data[nst-1] : 32'd0;
  endtask

  logic [31:0] last_store;

  // ------------------------------------------------------------ programs
  task automatic prog_pipeline();
    prog.delete();
    li(2, 1); li(3, 0);
    for (int i = 0; i < 100; i++) begin
      emit(rr(OP_MOV, 3, 2));     // each uses the previous result
      emit(ri(OP_ADDI, 3, 1));
      emit(rr(OP_MOV, 2, 3));
    end
    li(1, 256);
    emit(rr(OP_ST, 3, 1));
    finish_prog();
  endtask

  task automatic prog_pipeline_memory();
    prog.delete();
    li(1, 512);
    for (int i = 0; i < 16; i++) begin
      li(2, i * 3 + 1);
      emit(pfx(i)); emit(rr(OP_ST, 2, 1));
    end
    li(3, 0);
    for (int i = 0; i < 16; i++) begin
      emit(pfx(i)); emit(rr(OP_LD, 4, 1));
      emit(rr(OP_ADD, 3, 4));     // uses the loaded value at once
    end
    emit(pfx(20)); emit(rr(OP_ST, 3, 1));
    finish_prog();
  endtask

  task automatic prog_loops();
    int top [10];
    prog.delete();
    li(2, 0); li(3, 1);
    for (int l = 0; l < 10; l++) begin
      li(16 + l, 2);
      top[l] = here();
    end
    emit(rr(OP_ADD, 2, 3));
    emit(ri(OP_ADDI, 3, 1));
    for (int l = 9; l >= 0; l--) begin
      emit(ri(OP_SUBI, 16 + l, 1));
      emit(rr(OP_SKPRZ, 16 + l, 0));
      br(OP5_BR, top[l]);
      emit(nop());
      if (l > 0) begin
        // reload the counter of this level for the next outer iteration
        li(16 + l, 2);
      end
    end
    li(1, 256);
    emit(rr(OP_ST, 2, 1));
    emit(pfx(1)); emit(rr(OP_ST, 3, 1));
    finish_prog();
  endtask

  task automatic prog_memory();
    int loop;
    prog.delete();
    li(1, 1024);
    for (int i = 0; i < 16; i++) begin
      li(2, 100 + i);
      emit(pfx(i)); emit(rr(OP_ST, 2, 1));
    end
    // a[i] = a[i]*2 + a[i-1] for i = 1..15, walking a pointer
    li(5, 15);
    emit(rr(OP_MOV, 6, 1));
    loop = here();
    emit(rr(OP_LD, 2, 6));
    emit(ri(OP_ADDI, 6, 4));
    emit(rr(OP_LD, 3, 6));
    emit(rr(OP_ADD, 3, 3));
    emit(rr(OP_ADD, 3, 2));
    emit(rr(OP_ST, 3, 6));
    emit(ri(OP_SUBI, 5, 1));
    emit(skps(CC_Z));
    br(OP5_BR, loop);
    emit(nop());
    emit(pfx(15)); emit(rr(OP_LD, 4, 1));
    emit(pfx(16)); emit(rr(OP_ST, 4, 1));
    finish_prog();
  endtask

  task automatic prog_fibo();
    int fib, ret_br, l_ret;
    prog.delete();
    li32(14, 32'h2000);           // stack pointer
    li(8, 8);
    ret_br = here(); emit(nop()); // BSR fib, patched
    emit(nop());
    li(1, 256);
    emit(rr(OP_ST, 8, 1));
    finish_prog();
    fib = here();
    patch_br(ret_br, OP5_BSR, fib);
    emit(save(4));
    emit(ri(OP_CMPI, 24, 2));
    emit(skps(CC_GE));
    l_ret = here(); emit(nop());  // BR fib_ret, patched
    emit(nop());
    emit(rr(OP_MOV, 8, 24));
    emit(ri(OP_SUBI, 8, 1));
    br(OP5_BSR, fib);
    emit(nop());
    emit(rr(OP_MOV, 16, 8));
    emit(rr(OP_MOV, 8, 24));
    emit(ri(OP_SUBI, 8, 2));
    br(OP5_BSR, fib);
    emit(nop());
    emit(rr(OP_ADD, 8, 16));
    emit(rr(OP_MOV, 24, 8));
    patch_br(l_ret, OP5_BR, here());
    emit(rr(OP_JMP, 31, 0));
    emit(restore());              // delay slot
  endtask

  task automatic prog_mixed();
    int sub, call_at;
    prog.delete();
    li(1, 768);
    li32(2, 32'h1234_5678);
    emit(pfx(1)); emit(rr(OP_ST, 2, 1));
    li(3, 7); li(4, 6);
    emit(rr(OP_MUL, 3, 4));                       // 42
    emit(pfx(2)); emit(rr(OP_ST, 3, 1));
    emit(ri(OP_LSLI, 3, 4));                      // 672
    li(5, 2); emit(rr(OP_LSR, 3, 5));             // 168
    li32(6, 32'h8000_0000); emit(ri(OP_ASRI, 6, 3));
    emit(pfx(3)); emit(rr(OP_ST, 3, 1));
    emit(pfx(4)); emit(rr(OP_ST, 6, 1));
    // bit skips and a skipped PFX pair
    li(9, 5);
    emit(ri(OP_SKP1, 9, 0));                      // bit 0 set: skip the pair
    emit(pfx(1000)); emit(ri(OP_MOVI, 9, 31));
    emit(ri(OP_SKP0, 9, 1));                      // bit 1 clear: skip
    emit(ri(OP_MOVI, 9, 30));
    emit(pfx(5)); emit(rr(OP_ST, 9, 1));
    // status register round trip
    // (globals only while the window is moved)
    emit(rr(OP_RDCTL, 5, 0));
    emit(pfx(6)); emit(rr(OP_ST, 5, 1));
    li(6, 31);                                    // flags all set, CWP 1
    emit(rr(OP_WRCTL, 6, 0));
    emit(rr(OP_RDCTL, 4, 0));
    emit(pfx(7)); emit(rr(OP_ST, 4, 1));
    emit(rr(OP_WRCTL, 5, 0));                     // restore
    // call through a register, return through the link
    call_at = here();
    emit(nop()); emit(nop());                     // li r13, sub (patched)
    emit(rr(OP_CALL, 13, 0));
    emit(ri(OP_ADDI, 9, 1));                      // delay slot
    emit(pfx(8)); emit(rr(OP_ST, 9, 1));
    finish_prog();
    sub = here();
    prog[call_at]     = pfx((sub * 2) >> 5);
    prog[call_at + 1] = ri(OP_MOVI, 13, (sub * 2) & 31);
    emit(ri(OP_ADDI, 9, 3));
    emit(rr(OP_JMP, 15, 0));
    emit(nop());
  endtask

  // ------------------------------------------------------------ benchmarks
  // Full versions of three of the application benchmarks this machine is
  // measured with: a 6x6 integer matrix product, a recursive quicksort of
  // 100 integers and a bitwise CRC-32.  Their inputs are generated by the
  // program itself with a linear congruential generator; the testbench
  // computes the expected results independently.
  localparam logic [31:0] LCG_A = 32'h41C6_4E6D, LCG_C = 32'd12345;

  function automatic logic [31:0] lcg(logic [31:0] x); return x * LCG_A + LCG_C; endfunction

  // emit: r10 <- seed, r11 <- LCG_A, r12 <- LCG_C
  function automatic void lcg_setup(logic [31:0] seed);
    li32(10, seed); li32(11, LCG_A); li32(12, LCG_C);
  endfunction
  // emit: r10 <- next LCG state
  function automatic void lcg_step();
    emit(rr(OP_MUL, 10, 11)); emit(rr(OP_ADD, 10, 12));
  endfunction

  // C = A * B, 6x6 words; A at 0x400, B at 0x500, C at 0x600 (row-major)
  localparam int MAT_N = 6;
  task automatic prog_multiply();
    int l_init, l_i, l_j, l_k;
    prog.delete();
    li(1, 'h400); li(5, 'h500); li(6, 'h600); li(12, MAT_N);
    // A[x] = x + 1, B[x] = 2x - 20 (some negative entries)
    li(2, 0);
    l_init = here();
    emit(rr(OP_MOV, 9, 2)); emit(ri(OP_LSLI, 9, 2)); emit(rr(OP_ADD, 9, 1));
    emit(rr(OP_MOV, 8, 2)); emit(ri(OP_ADDI, 8, 1)); emit(rr(OP_ST, 8, 9));
    emit(rr(OP_MOV, 9, 2)); emit(ri(OP_LSLI, 9, 2)); emit(rr(OP_ADD, 9, 5));
    emit(rr(OP_MOV, 8, 2)); emit(rr(OP_ADD, 8, 2)); emit(ri(OP_SUBI, 8, 20));
    emit(rr(OP_ST, 8, 9));
    emit(ri(OP_ADDI, 2, 1)); emit(pfx((MAT_N * MAT_N) >> 5)); emit(ri(OP_CMPI, 2, (MAT_N * MAT_N) & 31));
    emit(skps(CC_GE)); br(OP5_BR, l_init); emit(nop());
    // i in r2, j in r3, k in r4, sum in r7
    li(2, 0);
    l_i = here();
    li(3, 0);
    l_j = here();
    li(7, 0); li(4, 0);
    l_k = here();
    emit(rr(OP_MOV, 9, 2)); emit(rr(OP_MUL, 9, 12)); emit(rr(OP_ADD, 9, 4));
    emit(ri(OP_LSLI, 9, 2)); emit(rr(OP_ADD, 9, 1)); emit(rr(OP_LD, 10, 9));
    emit(rr(OP_MOV, 9, 4)); emit(rr(OP_MUL, 9, 12)); emit(rr(OP_ADD, 9, 3));
    emit(ri(OP_LSLI, 9, 2)); emit(rr(OP_ADD, 9, 5)); emit(rr(OP_LD, 11, 9));
    emit(rr(OP_MUL, 10, 11)); emit(rr(OP_ADD, 7, 10));
    emit(ri(OP_ADDI, 4, 1)); emit(ri(OP_CMPI, 4, MAT_N));
    emit(skps(CC_GE)); br(OP5_BR, l_k); emit(nop());
    emit(rr(OP_MOV, 9, 2)); emit(rr(OP_MUL, 9, 12)); emit(rr(OP_ADD, 9, 3));
    emit(ri(OP_LSLI, 9, 2)); emit(rr(OP_ADD, 9, 6)); emit(rr(OP_ST, 7, 9));
    emit(ri(OP_ADDI, 3, 1)); emit(ri(OP_CMPI, 3, MAT_N));
    emit(skps(CC_GE)); br(OP5_BR, l_j); emit(nop());
    emit(ri(OP_ADDI, 2, 1)); emit(ri(OP_CMPI, 2, MAT_N));
    emit(skps(CC_GE)); br(OP5_BR, l_i); emit(nop());
    finish_prog();
  endtask

  function automatic void check_multiply();
    int bad = 0;
    for (int i = 0; i < MAT_N; i++)
      for (int j = 0; j < MAT_N; j++) begin
        int s = 0;
        for (int k = 0; k < MAT_N; k++) s += (i * MAT_N + k + 1) * (2 * (k * MAT_N + j) - 20);
        if (!mem_img.exists(32'h600 + 4 * (i * MAT_N + j)) ||
            mem_img[32'h600 + 4 * (i * MAT_N + j)] != 32'(s)) bad++;
      end
    check(bad == 0, $sformatf("multiply: %0d wrong elements of C", bad));
  endfunction

  // Recursive quicksort (Lomuto partition) of QS_N signed words at 0x800.
  // qs(lo, hi) takes inclusive word pointers in %o0/%o1 and uses one
  // register window per call level.
  localparam int QS_N = 100;
  localparam logic [31:0] QS_SEED = 32'd2024;
  task automatic prog_qsort();
    int call_at, qs, l_ret, l_p, l_done, l_next, p_next, p_ret, p_done;
    prog.delete();
    li32(14, 32'h3000);
    lcg_setup(QS_SEED); li(13, 32768);
    li(3, 'h800); li(2, QS_N);
    l_p = here();                                 // a[x] = (lcg >> 16) - 32768
    lcg_step();
    emit(rr(OP_MOV, 9, 10)); emit(ri(OP_LSRI, 9, 16)); emit(rr(OP_SUB, 9, 13));
    emit(rr(OP_ST, 9, 3)); emit(ri(OP_ADDI, 3, 4));
    emit(ri(OP_SUBI, 2, 1)); emit(rr(OP_SKPRZ, 2, 0)); br(OP5_BR, l_p); emit(nop());
    li(8, 'h800); li(9, 'h800 + 4 * (QS_N - 1));
    call_at = here(); emit(nop()); emit(nop());   // BSR qs, patched
    finish_prog();
    qs = here();
    patch_br(call_at, OP5_BSR, qs);
    emit(save(0));
    emit(rr(OP_CMP, 24, 25));                     // lo < hi (unsigned)?
    emit(skps(CC_C));
    l_ret = here(); emit(nop()); emit(nop());     // BR ret, patched
    emit(rr(OP_LD, 16, 25));                      // pivot = a[hi]
    emit(rr(OP_MOV, 17, 24));                     // i
    emit(rr(OP_MOV, 18, 24));                     // j
    l_p = here();
    emit(rr(OP_CMP, 18, 25));
    emit(skps(CC_C));
    p_done = here(); emit(nop()); emit(nop());    // BR done, patched
    emit(rr(OP_LD, 19, 18));
    emit(rr(OP_CMP, 19, 16));
    emit(skps(CC_LT));
    p_next = here(); emit(nop()); emit(nop());    // BR next, patched
    emit(rr(OP_LD, 20, 17)); emit(rr(OP_ST, 19, 17)); emit(rr(OP_ST, 20, 18));
    emit(ri(OP_ADDI, 17, 4));
    l_next = here();
    patch_br(p_next, OP5_BR, l_next);
    emit(ri(OP_ADDI, 18, 4));
    br(OP5_BR, l_p); emit(nop());
    l_done = here();
    patch_br(p_done, OP5_BR, l_done);
    emit(rr(OP_LD, 20, 17)); emit(rr(OP_ST, 20, 25)); emit(rr(OP_ST, 16, 17));
    emit(rr(OP_MOV, 8, 24)); emit(rr(OP_MOV, 9, 17)); emit(ri(OP_SUBI, 9, 4));
    br(OP5_BSR, qs); emit(nop());
    emit(rr(OP_MOV, 8, 17)); emit(ri(OP_ADDI, 8, 4)); emit(rr(OP_MOV, 9, 25));
    br(OP5_BSR, qs); emit(nop());
    patch_br(l_ret, OP5_BR, here());
    emit(rr(OP_JMP, 31, 0));
    emit(restore());
  endtask

  function automatic void check_qsort();
    int exp_a [$];
    int v;
    logic [31:0] x;
    int bad = 0;
    x = QS_SEED;
    for (int i = 0; i < QS_N; i++) begin
      x = lcg(x);
      v = int'({16'd0, x[31:16]});
      exp_a.push_back(v - 32768);
    end
    for (int i = 1; i < QS_N; i++)                // insertion sort, signed
      for (int j = i; j > 0 && exp_a[j-1] > exp_a[j]; j--) begin
        v = exp_a[j]; exp_a[j] = exp_a[j-1]; exp_a[j-1] = v;
      end
    for (int i = 0; i < QS_N; i++)
      if (!mem_img.exists(32'h800 + 4 * i) || mem_img[32'h800 + 4 * i] != 32'(exp_a[i])) bad++;
    check(bad == 0, $sformatf("qsort: %0d words out of place", bad));
  endfunction

  // Bitwise CRC-32 (reflected polynomial 0xEDB88320) over CRC_WORDS words
  // at 0xA00, bytes taken least significant first; result stored at 0x100.
  localparam int CRC_WORDS = 64;
  localparam logic [31:0] CRC_SEED = 32'd7;
  task automatic prog_crc32();
    int l_gen, l_w, l_b, l_bit;
    prog.delete();
    lcg_setup(CRC_SEED);
    li(3, 'hA00); li(2, CRC_WORDS);
    l_gen = here();
    lcg_step(); emit(rr(OP_ST, 10, 3)); emit(ri(OP_ADDI, 3, 4));
    emit(ri(OP_SUBI, 2, 1)); emit(rr(OP_SKPRZ, 2, 0)); br(OP5_BR, l_gen); emit(nop());
    li32(13, 32'hEDB8_8320); li32(2, 32'hFFFF_FFFF); li(12, 'hFF);
    li(3, 'hA00); li(4, CRC_WORDS);
    l_w = here();
    emit(rr(OP_LD, 5, 3)); li(6, 4);
    l_b = here();
    emit(rr(OP_MOV, 9, 5)); emit(rr(OP_AND, 9, 12)); emit(rr(OP_XOR, 2, 9)); li(16, 8);
    l_bit = here();
    emit(rr(OP_MOV, 11, 2)); emit(ri(OP_LSRI, 2, 1));
    emit(ri(OP_SKP0, 11, 0)); emit(rr(OP_XOR, 2, 13));
    emit(ri(OP_SUBI, 16, 1)); emit(rr(OP_SKPRZ, 16, 0)); br(OP5_BR, l_bit); emit(nop());
    emit(ri(OP_LSRI, 5, 8));
    emit(ri(OP_SUBI, 6, 1)); emit(rr(OP_SKPRZ, 6, 0)); br(OP5_BR, l_b); emit(nop());
    emit(ri(OP_ADDI, 3, 4));
    emit(ri(OP_SUBI, 4, 1)); emit(rr(OP_SKPRZ, 4, 0)); br(OP5_BR, l_w); emit(nop());
    li32(9, 32'hFFFF_FFFF); emit(rr(OP_XOR, 2, 9));
    li(1, 'h100); emit(rr(OP_ST, 2, 1));
    finish_prog();
  endtask

  function automatic logic [31:0] crc32_bytes(byte unsigned b [$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i]) begin
      c ^= 32'(b[i]);
      repeat (8) c = c[0] ? (c >> 1) ^ 32'hEDB8_8320 : c >> 1;
    end
    return ~c;
  endfunction

  function automatic void check_crc32();
    byte unsigned b [$];
    string s = "123456789";
    logic [31:0] x;
    foreach (s[i]) b.push_back(s[i]);
    check(crc32_bytes(b) == 32'hCBF4_3926, "crc32 reference check value");
    b.delete();
    x = CRC_SEED;
    for (int i = 0; i < CRC_WORDS; i++) begin
      x = lcg(x);
      for (int j = 0; j < 4; j++) b.push_back(x[8*j +: 8]);
    end
    check(mem_img.exists(32'h100) && mem_img[32'h100] == crc32_bytes(b),
          $sformatf("crc32 = %h, expected %h", mem_img[32'h100], crc32_bytes(b)));
  endfunction

  // Game of Life on a GOL_W x GOL_W board with a dead border (one cell per
  // word), GOL_GENS generations between two boards at 0x1000 and 0x1400.
  // The neighbour count is a procedure called for every cell.
  localparam int GOL_W = 12, GOL_GENS = 4;
  localparam int GOL_LIVE [10] = '{14, 27, 37, 38, 39, 68, 80, 92, 105, 106};

  task automatic prog_gol();
    int call_at, l_clr, l_gen, l_row, l_col, nb;
    int offs [8] = '{-GOL_W - 1, -GOL_W, -GOL_W + 1, -1, 1, GOL_W - 1, GOL_W, GOL_W + 1};
    prog.delete();
    li32(14, 32'h3000);
    li(1, 'h1000); li(2, 'h1400);
    li(4, 0); li(3, GOL_W * GOL_W);                 // clear both boards
    emit(rr(OP_MOV, 9, 1));
    l_clr = here();
    emit(rr(OP_ST, 4, 9)); emit(pfx(256)); emit(rr(OP_ST, 4, 9));
    emit(ri(OP_ADDI, 9, 4));
    emit(ri(OP_SUBI, 3, 1)); emit(rr(OP_SKPRZ, 3, 0)); br(OP5_BR, l_clr); emit(nop());
    li(4, 1);
    foreach (GOL_LIVE[i]) begin emit(pfx(GOL_LIVE[i])); emit(rr(OP_ST, 4, 1)); end
    li(3, GOL_GENS);
    l_gen = here();
    li(4, 1);
    l_row = here();
    li(5, 1);
    l_col = here();
    emit(rr(OP_MOV, 6, 4)); li(9, GOL_W); emit(rr(OP_MUL, 6, 9));
    emit(rr(OP_ADD, 6, 5)); emit(ri(OP_LSLI, 6, 2)); // r6 = byte offset of the cell
    emit(rr(OP_MOV, 8, 1)); emit(rr(OP_ADD, 8, 6));
    call_at = here(); emit(nop()); emit(nop());     // BSR neighbours, patched
    emit(rr(OP_MOV, 9, 1)); emit(rr(OP_ADD, 9, 6)); emit(rr(OP_LD, 10, 9));
    li(11, 0);                                      // next = n==3 | (n==2 & cur)
    emit(ri(OP_CMPI, 8, 2)); emit(skps(CC_NZ)); emit(rr(OP_MOV, 11, 10));
    emit(ri(OP_CMPI, 8, 3)); emit(skps(CC_NZ)); li(11, 1);
    emit(rr(OP_MOV, 9, 2)); emit(rr(OP_ADD, 9, 6)); emit(rr(OP_ST, 11, 9));
    emit(ri(OP_ADDI, 5, 1)); emit(ri(OP_CMPI, 5, GOL_W - 1));
    emit(skps(CC_GE)); br(OP5_BR, l_col); emit(nop());
    emit(ri(OP_ADDI, 4, 1)); emit(ri(OP_CMPI, 4, GOL_W - 1));
    emit(skps(CC_GE)); br(OP5_BR, l_row); emit(nop());
    emit(rr(OP_MOV, 13, 1)); emit(rr(OP_MOV, 1, 2)); emit(rr(OP_MOV, 2, 13));
    emit(ri(OP_SUBI, 3, 1)); emit(rr(OP_SKPRZ, 3, 0)); br(OP5_BR, l_gen); emit(nop());
    finish_prog();
    nb = here();
    patch_br(call_at, OP5_BSR, nb);
    emit(save(0));
    li(16, 0);
    foreach (offs[i]) begin
      emit(pfx(offs[i])); emit(rr(OP_LD, 17, 24)); emit(rr(OP_ADD, 16, 17));
    end
    emit(rr(OP_MOV, 24, 16));
    emit(rr(OP_JMP, 31, 0));
    emit(restore());
  endtask

  function automatic void check_gol();
    int b [GOL_W*GOL_W];
    int nb [GOL_W*GOL_W];
    int bad = 0, live = 0;
    foreach (b[i]) b[i] = 0;
    foreach (GOL_LIVE[i]) b[GOL_LIVE[i]] = 1;
    repeat (GOL_GENS) begin
      foreach (nb[i]) nb[i] = 0;
      for (int r = 1; r < GOL_W - 1; r++)
        for (int c = 1; c < GOL_W - 1; c++) begin
          int n = 0;
          for (int dr = -1; dr <= 1; dr++)
            for (int dc = -1; dc <= 1; dc++)
              if (dr != 0 || dc != 0) n += b[(r + dr) * GOL_W + c + dc];
          nb[r * GOL_W + c] = (n == 3 || (n == 2 && b[r * GOL_W + c] == 1)) ? 1 : 0;
        end
      b = nb;
    end
    // an even number of generations ends on the first board
    for (int i = 0; i < GOL_W * GOL_W; i++) begin
      logic [31:0] a = 32'h1000 + 4 * i;
      if (!mem_img.exists(a) || mem_img[a] != 32'(b[i])) bad++;
      live += b[i];
    end
    check(bad == 0, $sformatf("gol: %0d cells wrong", bad));
    check(live > 0, "gol: board not empty");
  endfunction

  // Case-insensitive search for a list of tokens in a text, one character
  // per word.  Text at 0x1800, tokens at 0x1C00 as {length, chars...},
  // results (first match index or -1) at 0x1E00.  Lower-casing is a
  // procedure called for every character compared.
  localparam string SS_TEXT = "The Quick brown FOX jumps over the lazy dog, NIOS II";
  localparam int SS_NTOK = 6;
  localparam string SS_TOK [SS_NTOK] = '{"fox", "LAZY", "nios", "cat", "the q", "Dog,"};

  task automatic prog_stringsearch();
    int call1, call2, lc, l_tok, l_i, l_j, l_next, l_found, l_tdone, p_tdone, p_found, p_next;
    int toff;
    prog.delete();
    li32(14, 32'h3000);
    li(1, 'h1800); li(2, 'h1C00);
    foreach (SS_TEXT[i]) begin li(9, int'(SS_TEXT[i])); emit(pfx(i)); emit(rr(OP_ST, 9, 1)); end
    toff = 0;
    foreach (SS_TOK[t]) begin
      li(9, SS_TOK[t].len()); emit(pfx(toff)); emit(rr(OP_ST, 9, 2)); toff++;
      foreach (SS_TOK[t][i]) begin
        li(9, int'(SS_TOK[t][i])); emit(pfx(toff)); emit(rr(OP_ST, 9, 2)); toff++;
      end
    end
    li(3, SS_NTOK); li(19, 'h1E00);
    l_tok = here();
    emit(rr(OP_LD, 6, 2));                          // M
    emit(rr(OP_MOV, 18, 2)); emit(ri(OP_ADDI, 18, 4));
    li(17, SS_TEXT.len()); emit(rr(OP_SUB, 17, 6)); // last start
    li32(16, 32'hFFFF_FFFF);
    li(4, 0);
    l_i = here();
    emit(rr(OP_CMP, 4, 17)); emit(skps(CC_LE));
    p_tdone = here(); emit(nop()); emit(nop());
    li(5, 0);
    l_j = here();
    emit(rr(OP_CMP, 5, 6)); emit(skps(CC_LT));
    p_found = here(); emit(nop()); emit(nop());
    emit(rr(OP_MOV, 9, 4)); emit(rr(OP_ADD, 9, 5)); emit(ri(OP_LSLI, 9, 2));
    emit(rr(OP_ADD, 9, 1)); emit(rr(OP_LD, 8, 9));
    call1 = here(); emit(nop()); emit(nop());
    emit(rr(OP_MOV, 20, 8));
    emit(rr(OP_MOV, 9, 5)); emit(ri(OP_LSLI, 9, 2)); emit(rr(OP_ADD, 9, 18));
    emit(rr(OP_LD, 8, 9));
    call2 = here(); emit(nop()); emit(nop());
    emit(rr(OP_CMP, 8, 20)); emit(skps(CC_Z));
    p_next = here(); emit(nop()); emit(nop());
    emit(ri(OP_ADDI, 5, 1)); br(OP5_BR, l_j); emit(nop());
    l_next = here(); patch_br(p_next, OP5_BR, l_next);
    emit(ri(OP_ADDI, 4, 1)); br(OP5_BR, l_i); emit(nop());
    l_found = here(); patch_br(p_found, OP5_BR, l_found);
    emit(rr(OP_MOV, 16, 4));
    l_tdone = here(); patch_br(p_tdone, OP5_BR, l_tdone);
    emit(rr(OP_ST, 16, 19)); emit(ri(OP_ADDI, 19, 4));
    emit(rr(OP_MOV, 9, 6)); emit(ri(OP_ADDI, 9, 1)); emit(ri(OP_LSLI, 9, 2));
    emit(rr(OP_ADD, 2, 9));
    emit(ri(OP_SUBI, 3, 1)); emit(rr(OP_SKPRZ, 3, 0)); br(OP5_BR, l_tok); emit(nop());
    finish_prog();
    // lc: %i0 <- lower case of %i0; a skipped PFX/ADDI pair when not 'A'..'Z'
    lc = here();
    patch_br(call1, OP5_BSR, lc);
    patch_br(call2, OP5_BSR, lc);
    emit(save(0));
    emit(rr(OP_MOV, 16, 24)); li(17, 65); emit(rr(OP_SUB, 16, 17));
    emit(ri(OP_CMPI, 16, 26)); emit(skps(CC_NC));
    emit(pfx(1)); emit(ri(OP_ADDI, 24, 0));
    emit(rr(OP_JMP, 31, 0));
    emit(restore());
  endtask

  function automatic void check_stringsearch();
    int bad = 0;
    foreach (SS_TOK[t]) begin
      int found = -1;
      string tl = SS_TOK[t].tolower(), xl = SS_TEXT.tolower();
      for (int i = 0; i + tl.len() <= xl.len() && found < 0; i++)
        if (xl.substr(i, i + tl.len() - 1) == tl) found = i;
      if (!mem_img.exists(32'h1E00 + 4 * t) || mem_img[32'h1E00 + 4 * t] != 32'(found)) bad++;
    end
    check(bad == 0, $sformatf("stringsearch: %0d tokens wrong", bad));
  endfunction

  // random instruction stream, compared against the reference model
  task automatic prog_random(int n);
    logic [5:0] alu_ops [17] = '{OP_ADD, OP_SUB, OP_CMP, OP_AND, OP_OR, OP_XOR, OP_MOV,
                                 OP_LSL, OP_LSR, OP_ASR, OP_MUL, OP_ADDI, OP_SUBI,
                                 OP_CMPI, OP_MOVI, OP_MOVHI, OP_LSLI};
    int depth;
    prog.delete();
    // clear every window so that no register is read before it is written
    for (int w = 0; w < 31; w++) begin
      for (int r = 8; r < 24; r++) li(r, 0);
      emit(save(0));
    end
    li(1, 2048);
    for (int r = 0; r < 32; r++) if (r != 1) li(r, r * 37);
    // give the data words the stream may load a known value
    for (int w = 0; w < 64; w++) begin
      emit(pfx(w)); emit(rr(OP_ST, 2 + (w % 20), 1));
    end
    depth = 0;
    for (int i = 0; i < n; i++) begin
      int kind, ra, rb;
      kind = $urandom_range(0, 99);
      ra = $urandom_range(2, 31); if (ra == 7 || ra == 14) ra = 2;
      rb = $urandom_range(2, 31); if (rb == 7) rb = 3;
      if (kind < 45) begin
        emit(rr(alu_ops[$urandom_range(0, 16)], ra, rb));
      end else if (kind < 52) begin
        emit(pfx($urandom_range(0, 2047)));
        emit(ri(alu_ops[$urandom_range(11, 15)], ra, $urandom_range(0, 31)));
      end else if (kind < 60) begin
        emit(pfx($urandom_range(0, 63)));
        emit(rr(OP_LD, ra, 1));
      end else if (kind < 68) begin
        emit(pfx($urandom_range(0, 63)));
        emit(rr(OP_ST, ra, 1));
      end else if (kind < 78) begin
        case ($urandom_range(0, 4))
          0: emit(skps(cond_e'($urandom_range(0, 15))));
          1: emit(rr(OP_SKPRZ, ra, 0));
          2: emit(rr(OP_SKPRNZ, ra, 0));
          3: emit(ri(OP_SKP0, ra, $urandom_range(0, 31)));
          default: emit(ri(OP_SKP1, ra, $urandom_range(0, 31)));
        endcase
      end else if (kind < 86) begin
        int skip_n;
        skip_n = $urandom_range(0, 3);
        emit(i11(($urandom_range(0, 1) != 0) ? OP5_BR : OP5_BSR, skip_n));
        emit(rr(alu_ops[$urandom_range(0, 16)], ra, rb));   // delay slot
        for (int j = 0; j < skip_n; j++) emit(ri(OP_ADDI, ra, 1));
      end else if (kind < 92) begin
        if (depth < 20 && $urandom_range(0, 1) != 0) begin
          emit(save($urandom_range(0, 255))); depth++;
        end else if (depth > 0) begin
          emit(restore()); depth--;
        end else emit(rr(OP_RDCTL, ra, 0));
      end else begin
        emit(rr(OP_RDCTL, ra, 0));
      end
    end
    for (int r = 2; r < 32; r++) begin
      emit(pfx(100 + r)); emit(rr(OP_ST, r, 1));
    end
    finish_prog();
  endtask

  initial begin
    foreach (n_ev[i]) n_ev[i] = 0;
    total_retired = 0;
    repeat (3) @(posedge clk);

    prog_pipeline();        run("pipeline", 10_000);
    check(last_store == 32'd101, "pipeline result");
    prog_pipeline_memory(); run("pipeline-memory", 10_000);
    check(last_store == 32'd376, "pipeline-memory result");
    prog_loops();           run("loops", 200_000);
    prog_memory();          run("memory", 10_000);
    prog_fibo();            run("fibo", 100_000);
    check(last_store == 32'd21, "fib(8) = 21");
    prog_mixed();           run("mixed", 10_000);
    check(last_store == 32'd9, "call/return result");
    prog_multiply();        run("multiply", 100_000);
    check_multiply();
    prog_qsort();           run("qsort", 500_000);
    check_qsort();
    prog_crc32();           run("crc32", 500_000);
    check_crc32();
    prog_gol();             run("gol", 500_000);
    check_gol();
    prog_stringsearch();    run("stringsearch", 500_000);
    check_stringsearch();
    for (int s = 0; s < 20; s++) begin
      prog_random(300);
      run($sformatf("random%0d", s), 50_000);
    end

    foreach (n_ev[i]) begin
      $display("event %-10s %0d", ev_name[i], n_ev[i]);
      check(n_ev[i] > 0, {"event never seen: ", ev_name[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
