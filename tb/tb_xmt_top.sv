// tb_xmt_top: end-to-end test of the XMT processor at a reduced size (4 clusters of 4 TCUs, 10-cycle level-2 latency).
//
// The program is the array-compaction example with software thread-id
// allocation: serial code on TCU 0 sets the spawn size, the thread-id counter
// g2 and the compaction base g3, then spawns. Every TCU runs the spawn block
//   GO:  psi  t0, g2, 1      ; draw a thread id
//        slt  t1, t0, g1     ; id < N ?
//        beq  t1, g0, END
//        lwa  t1, 0(g4)[t0]  ; A[id]
//        beq  t1, g0, GO     ; zero: next id
//        psi  t2, g3, 1      ; slot in B
//        swa  t1, 0(g5)[t2]  ; B[slot] = A[id]
//        j    GO
//   END: join
// and after the join the serial code squares the count with mul, divides it
// by N with divu (both written to global registers) and halts.
// A is filled with pseudo-random values, about a quarter non-zero. Checks:
// the count in g3, the thread-id counter g2 (N + one failed draw per TCU),
// that B holds exactly the non-zero values of A as a multiset, the mul/divu
// results, and that every mechanism happened at least once: spawn, join,
// a prefix-sum group with several participants, functional-unit contention,
// data-cache hits and misses, instruction-cache misses, global-register
// writes broadcast to the clusters and multiply/divide operations.
module tb_xmt_top;
  import xmt_pkg::*;

  localparam int NCL    = 4;
  localparam int NTCU   = 4;
  localparam int NTOT   = NCL * NTCU;
  localparam int N      = 200;
  localparam int A_BASE = 32'h1000;        // byte addresses
  localparam int B_BASE = 32'h3000;
  localparam int WATCHDOG = 400000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ld_we = 1'b0, dbg_we = 1'b0;
  word_t ld_addr = '0, ld_data = '0, dbg_addr = '0, dbg_wdata = '0, dbg_rdata;
  greg_t greg_idx = '0;
  word_t greg_data;
  logic halted, parallel;
  logic [31:0] spawns, ps_groups, ps_multi, retired;

  always #5 clk = ~clk;

  xmt_top #(.N_CL(4), .N_TCU(4), .MEM_LATENCY(10), .L2D_WORDS(8192), .L2I_WORDS(256)) dut (
    .clk, .rst_n, .ld_we, .ld_addr, .ld_data, .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata,
    .greg_idx, .greg_data, .halted, .parallel, .spawns, .ps_groups, .ps_multi, .retired
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t prog [$];
  word_t a_vals [N];

  task automatic build_prog();
    prog.push_back(enc_i(OP_ORI, 1, 0, N));          // 0  g1 = N
    prog.push_back(enc_i(OP_ORI, 2, 0, 0));          // 1  g2 = 0 (thread ids)
    prog.push_back(enc_i(OP_ORI, 3, 0, 0));          // 2  g3 = 0 (B count)
    prog.push_back(enc_i(OP_ORI, 4, 0, A_BASE));     // 3  g4 = &A
    prog.push_back(enc_i(OP_ORI, 5, 0, B_BASE));     // 4  g5 = &B
    prog.push_back(enc_i(OP_SPAWN, 1, 0, 3));        // 5  spawn g1, 0, GO
    prog.push_back(enc_r(F_MUL, 6, 3, 3));           // 6  g6 = g3 * g3
    prog.push_back(enc_r(F_DIVU, 7, 6, 1));          // 7  g7 = g6 / g1
    prog.push_back({OP_HALT, 26'd0});                // 8  halt
    prog.push_back(enc_i(OP_PSI, 32, 2, 1));         // 9  GO: psi t0, g2, 1
    prog.push_back(enc_r(F_SLT, 33, 32, 1));         // 10 slt t1, t0, g1
    prog.push_back(enc_i(OP_BEQ, 33, 0, 5));         // 11 beq t1, g0, END
    prog.push_back(enc_la(OP_LWA, 33, 4, 32, 0));    // 12 lwa t1, 0(g4)[t0]
    prog.push_back(enc_i(OP_BEQ, 33, 0, -5));        // 13 beq t1, g0, GO
    prog.push_back(enc_i(OP_PSI, 34, 3, 1));         // 14 psi t2, g3, 1
    prog.push_back(enc_la(OP_SWA, 33, 5, 34, 0));    // 15 swa t1, 0(g5)[t2]
    prog.push_back(enc_j(9));                        // 16 j GO
    prog.push_back({OP_JOIN, 26'd0});                // 17 END: join
  endtask

  // mechanism counters, watched inside the design
  int n_join = 0, n_gwr = 0, n_fu_stall = 0, n_dc_hit = 0, n_dc_miss = 0, n_ic_miss = 0, n_md = 0;
  int n_early_end = 0;

  int cycles = 0;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (dut.u_ps.bus.kind == MSG_GWR) n_gwr++;
    // END may only be sent once every cluster reports all its TCUs joined
    if (dut.u_sj.msg_valid && dut.u_sj.msg_kind == MSG_END) begin
      n_join++;
      if (!(&dut.join_c)) n_early_end++;
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after %0d cycles", WATCHDOG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_cnt;
    int start_cycle, spawn_cycles;
    int got [$], want [$];
    build_prog();
    expect_cnt = 0;
    for (int i = 0; i < N; i++) begin
      a_vals[i] = (($urandom % 4) == 0) ? ($urandom % 10000) + 1 : 0;
      if (a_vals[i] != 0) begin expect_cnt++; want.push_back(a_vals[i]); end
    end
    // load program and data while in reset
    repeat (2) @(posedge clk);
    foreach (prog[i]) begin
      ld_we <= 1'b1; ld_addr <= i; ld_data <= prog[i];
      @(posedge clk);
    end
    ld_we <= 1'b0;
    for (int i = 0; i < N; i++) begin
      dbg_we <= 1'b1; dbg_addr <= A_BASE / 4 + i; dbg_wdata <= a_vals[i];
      @(posedge clk);
      dbg_we <= 1'b1; dbg_addr <= B_BASE / 4 + i; dbg_wdata <= '0;
      @(posedge clk);
    end
    dbg_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    start_cycle = cycles;

    wait (parallel);
    spawn_cycles = cycles;
    wait (!parallel);
    spawn_cycles = cycles - spawn_cycles;
    wait (halted);
    @(posedge clk);
    $display("run: %0d cycles, spawn block %0d cycles, %0d instructions, %0d prefix-sum groups (%0d shared)",
             cycles - start_cycle, spawn_cycles, retired, ps_groups, ps_multi);

    // results
    greg_idx = 3; #1;
    check(greg_data == word_t'(expect_cnt), $sformatf("g3 = %0d, expected %0d", greg_data, expect_cnt));
    greg_idx = 2; #1;
    check(greg_data == word_t'(N + NTOT), $sformatf("g2 = %0d, expected %0d", greg_data, N + NTOT));
    greg_idx = 6; #1;
    check(greg_data == word_t'(expect_cnt * expect_cnt), $sformatf("g6 = %0d", greg_data));
    greg_idx = 7; #1;
    check(greg_data == word_t'((expect_cnt * expect_cnt) / N), $sformatf("g7 = %0d", greg_data));
    for (int i = 0; i < expect_cnt; i++) begin
      dbg_addr = B_BASE / 4 + i; #1;
      got.push_back(dbg_rdata);
    end
    dbg_addr = B_BASE / 4 + expect_cnt; #1;
    check(dbg_rdata == 0, "B beyond the count was written");
    got.sort(); want.sort();
    check(got.size() == want.size(), "B size");
    for (int i = 0; i < want.size(); i++)
      check(got[i] == want[i], $sformatf("B sorted[%0d] = %0d, expected %0d", i, got[i], want[i]));

    // mechanisms
    n_fu_stall = 0; n_dc_hit = 0; n_dc_miss = 0; n_ic_miss = 0; n_md = 0;
    n_fu_stall += dut.g_cl[0].fu_stalls;  n_md += dut.g_cl[0].md_ops;
    n_dc_hit += dut.g_cl[0].dc_hits; n_dc_miss += dut.g_cl[0].dc_misses; n_ic_miss += dut.g_cl[0].ic_misses;
    n_fu_stall += dut.g_cl[1].fu_stalls;  n_md += dut.g_cl[1].md_ops;
    n_dc_hit += dut.g_cl[1].dc_hits; n_dc_miss += dut.g_cl[1].dc_misses; n_ic_miss += dut.g_cl[1].ic_misses;
    n_fu_stall += dut.g_cl[2].fu_stalls;  n_md += dut.g_cl[2].md_ops;
    n_dc_hit += dut.g_cl[2].dc_hits; n_dc_miss += dut.g_cl[2].dc_misses; n_ic_miss += dut.g_cl[2].ic_misses;
    n_fu_stall += dut.g_cl[3].fu_stalls;  n_md += dut.g_cl[3].md_ops;
    n_dc_hit += dut.g_cl[3].dc_hits; n_dc_miss += dut.g_cl[3].dc_misses; n_ic_miss += dut.g_cl[3].ic_misses;
    $display("spawns=%0d shared-ps=%0d gwr=%0d fu_stalls=%0d md=%0d dc hit/miss=%0d/%0d ic_miss=%0d",
             spawns, ps_multi, n_gwr, n_fu_stall, n_md, n_dc_hit, n_dc_miss, n_ic_miss);
    check(spawns == 1, "spawn/join did not complete exactly once");
    check(ps_multi > 0, "no prefix-sum group with several participants");
    check(n_gwr >= 7, "global-register write broadcasts");
    check(n_fu_stall > 0, "no functional-unit contention");
    check(n_md == 2, "multiply/divide operations");
    check(n_dc_hit > 0 && n_dc_miss > 0, "data-cache hits and misses");
    check(n_ic_miss > 0, "instruction-cache misses");
    check(retired > 0, "instructions retired");
    check(n_join == 1, "END message sent once");
    check(n_early_end == 0, "END sent before every cluster had joined");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
