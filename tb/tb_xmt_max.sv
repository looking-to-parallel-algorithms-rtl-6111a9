// tb_xmt_max: the synchronous tree-maximum kernel (one spawn per tree level)
// on the XMT processor, at 64 and 512 elements on a reduced machine (4
// clusters of 4 TCUs, 10-cycle level-2 latency).
//
// Serial code halves the element count g1 every round and spawns one thread
// per pair; thread i writes max(src[2i], src[2i+1]) to dst[i]; then the serial
// code swaps src and dst. After log2(N) rounds src[0] is the maximum, loaded
// into g10. Each round reads in another spawn what other clusters wrote in
// the previous one, so it relies on the data caches being invalidated at the
// end of every spawn. Checks: g10 against the maximum computed here, that
// exactly log2(N) spawn/join rounds ran, and that the first round's output
// holds the pairwise maxima.
module tb_xmt_max;
  import xmt_pkg::*;

  localparam int X_BASE = 32'h1000;        // byte addresses
  localparam int Y_BASE = 32'h2000;
  localparam int WATCHDOG = 600000;

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

  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after %0d cycles", WATCHDOG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n, input int lg);
    word_t prog [$];
    word_t x [];
    word_t mx;
    int t0;
    x = new[n];
    prog.push_back(enc_i(OP_ORI, 1, 0, n));          // 0  g1 = N
    prog.push_back(enc_i(OP_ORI, 4, 0, X_BASE));     // 1  g4 = src
    prog.push_back(enc_i(OP_ORI, 5, 0, Y_BASE));     // 2  g5 = dst
    prog.push_back(enc_i(OP_ORI, 8, 0, 1));          // 3  g8 = 1
    prog.push_back(enc_i(OP_BEQ, 1, 8, 7));          // 4  LOOP: beq g1, g8, DONE
    prog.push_back(enc_r(F_SRL, 1, 1, 8));           // 5  g1 = g1 >> 1
    prog.push_back(enc_i(OP_ORI, 2, 0, 0));          // 6  g2 = 0
    prog.push_back(enc_i(OP_SPAWN, 1, 0, 6));        // 7  spawn g1, 0, GO
    prog.push_back(enc_r(F_OR, 9, 4, 0));            // 8  swap src and dst
    prog.push_back(enc_r(F_OR, 4, 5, 0));            // 9
    prog.push_back(enc_r(F_OR, 5, 9, 0));            // 10
    prog.push_back(enc_j(4));                        // 11 j LOOP
    prog.push_back(enc_i(OP_LW, 10, 4, 0));          // 12 DONE: lw g10, 0(g4)
    prog.push_back({OP_HALT, 26'd0});                // 13 halt
    prog.push_back(enc_i(OP_PSI, 32, 2, 1));         // 14 GO: psi t0, g2, 1
    prog.push_back(enc_r(F_SLT, 33, 32, 1));         // 15 slt t1, t0, g1
    prog.push_back(enc_i(OP_BEQ, 33, 0, 8));         // 16 beq t1, g0, END
    prog.push_back(enc_r(F_ADD, 35, 32, 32));        // 17 t3 = 2 * t0
    prog.push_back(enc_la(OP_LWA, 33, 4, 35, 0));    // 18 lwa t1, 0(g4)[t3]
    prog.push_back(enc_la(OP_LWA, 34, 4, 35, 1));    // 19 lwa t2, 1(g4)[t3]
    prog.push_back(enc_r(F_SLT, 36, 33, 34));        // 20 slt t4, t1, t2
    prog.push_back(enc_i(OP_BEQ, 36, 0, 1));         // 21 beq t4, g0, +1
    prog.push_back(enc_r(F_OR, 33, 34, 0));          // 22 t1 = t2
    prog.push_back(enc_la(OP_SWA, 33, 5, 32, 0));    // 23 swa t1, 0(g5)[t0]
    prog.push_back(enc_j(14));                       // 24 j GO
    prog.push_back({OP_JOIN, 26'd0});                // 25 END: join
    mx = 0;
    for (int i = 0; i < n; i++) begin
      x[i] = $urandom % 1000000;
      if (x[i] > mx) mx = x[i];
    end

    rst_n <= 1'b0;
    repeat (2) @(posedge clk);
    foreach (prog[i]) begin
      ld_we <= 1'b1; ld_addr <= i; ld_data <= prog[i];
      @(posedge clk);
    end
    ld_we <= 1'b0;
    for (int i = 0; i < n; i++) begin
      dbg_we <= 1'b1; dbg_addr <= X_BASE / 4 + i; dbg_wdata <= x[i];
      @(posedge clk);
      dbg_we <= 1'b1; dbg_addr <= Y_BASE / 4 + i; dbg_wdata <= '0;
      @(posedge clk);
    end
    dbg_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    t0 = cycles;
    wait (halted);
    @(posedge clk);
    $display("max N=%0d: %0d cycles, %0d spawns, %0d instructions, %0d prefix-sum groups (%0d shared)",
             n, cycles - t0, spawns, retired, ps_groups, ps_multi);

    greg_idx = 10; #1;
    check(greg_data == mx, $sformatf("max = %0d, expected %0d", greg_data, mx));
    check(spawns == lg, $sformatf("spawns = %0d, expected %0d", spawns, lg));
    // the first round wrote the pairwise maxima into Y (later rounds reuse
    // only its lower part)
    for (int i = n / 4; i < n / 2; i++) begin
      dbg_addr = Y_BASE / 4 + i; #1;
      check(dbg_rdata == ((x[2*i] > x[2*i+1]) ? x[2*i] : x[2*i+1]), $sformatf("round 1 pair %0d", i));
    end
    check(ps_multi > 0, "no combined prefix-sum group");
  endtask

  initial begin
    run(64, 6);
    run(512, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
