// tb_xmt_stream: the STREAM-style triad kernel on the XMT processor, at two
// array sizes (50 and 500 elements) on a reduced machine (4 clusters of 4
// TCUs, 10-cycle level-2 latency).
//
// Every element is an independent thread:
//   GO:  psi  t0, g2, 1        ; thread id
//        slt  t1, t0, g1
//        beq  t1, g0, END
//        lwa  t1, 0(g5)[t0]    ; B[id]
//        lwa  t2, 0(g7)[t0]    ; C[id]
//        mul  t2, t2, g6       ; q * C[id]
//        add  t1, t1, t2
//        swa  t1, 0(g4)[t0]    ; A[id] = B[id] + q * C[id]
//        j    GO
//   END: join
// For each size the processor is reset, the program and arrays are loaded,
// and the testbench checks every A[i] against its own computation, the
// thread-id counter (N plus one failed draw per TCU), that exactly N
// multiplies ran, that one spawn/join took place, and that prefix-sum
// requests were combined. Elapsed cycles are printed per size.
module tb_xmt_stream;
  import xmt_pkg::*;

  localparam int NTOT   = 16;
  localparam int A_BASE = 32'h1000;        // byte addresses
  localparam int B_BASE = 32'h2000;
  localparam int C_BASE = 32'h3000;
  localparam int Q      = 3;
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

  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after %0d cycles", WATCHDOG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    word_t prog [$];
    word_t b [], c [];
    int t0, n_md;
    b = new[n]; c = new[n];
    prog.push_back(enc_i(OP_ORI, 1, 0, n));          // 0  g1 = N
    prog.push_back(enc_i(OP_ORI, 2, 0, 0));          // 1  g2 = 0
    prog.push_back(enc_i(OP_ORI, 4, 0, A_BASE));     // 2  g4 = &A
    prog.push_back(enc_i(OP_ORI, 5, 0, B_BASE));     // 3  g5 = &B
    prog.push_back(enc_i(OP_ORI, 7, 0, C_BASE));     // 4  g7 = &C
    prog.push_back(enc_i(OP_ORI, 6, 0, Q));          // 5  g6 = q
    prog.push_back(enc_i(OP_SPAWN, 1, 0, 1));        // 6  spawn g1, 0, GO
    prog.push_back({OP_HALT, 26'd0});                // 7  halt
    prog.push_back(enc_i(OP_PSI, 32, 2, 1));         // 8  GO: psi t0, g2, 1
    prog.push_back(enc_r(F_SLT, 33, 32, 1));         // 9  slt t1, t0, g1
    prog.push_back(enc_i(OP_BEQ, 33, 0, 6));         // 10 beq t1, g0, END
    prog.push_back(enc_la(OP_LWA, 33, 5, 32, 0));    // 11 lwa t1, 0(g5)[t0]
    prog.push_back(enc_la(OP_LWA, 34, 7, 32, 0));    // 12 lwa t2, 0(g7)[t0]
    prog.push_back(enc_r(F_MUL, 34, 34, 6));         // 13 mul t2, t2, g6
    prog.push_back(enc_r(F_ADD, 33, 33, 34));        // 14 add t1, t1, t2
    prog.push_back(enc_la(OP_SWA, 33, 4, 32, 0));    // 15 swa t1, 0(g4)[t0]
    prog.push_back(enc_j(8));                        // 16 j GO
    prog.push_back({OP_JOIN, 26'd0});                // 17 END: join
    for (int i = 0; i < n; i++) begin
      b[i] = $urandom % 100000;
      c[i] = $urandom % 100000;
    end

    rst_n <= 1'b0;
    repeat (2) @(posedge clk);
    foreach (prog[i]) begin
      ld_we <= 1'b1; ld_addr <= i; ld_data <= prog[i];
      @(posedge clk);
    end
    ld_we <= 1'b0;
    for (int i = 0; i < n; i++) begin
      dbg_we <= 1'b1; dbg_addr <= A_BASE / 4 + i; dbg_wdata <= '0;
      @(posedge clk);
      dbg_we <= 1'b1; dbg_addr <= B_BASE / 4 + i; dbg_wdata <= b[i];
      @(posedge clk);
      dbg_we <= 1'b1; dbg_addr <= C_BASE / 4 + i; dbg_wdata <= c[i];
      @(posedge clk);
    end
    dbg_we <= 1'b1; dbg_addr <= A_BASE / 4 + n; dbg_wdata <= '0;   // guard word
    @(posedge clk);
    dbg_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    t0 = cycles;
    wait (halted);
    @(posedge clk);
    $display("stream N=%0d: %0d cycles, %0d instructions, %0d prefix-sum groups (%0d shared)",
             n, cycles - t0, retired, ps_groups, ps_multi);

    for (int i = 0; i < n; i++) begin
      dbg_addr = A_BASE / 4 + i; #1;
      check(dbg_rdata == b[i] + Q * c[i], $sformatf("A[%0d] = %0d, expected %0d", i, dbg_rdata, b[i] + Q * c[i]));
    end
    dbg_addr = A_BASE / 4 + n; #1;
    check(dbg_rdata == 0, "A written beyond N");
    greg_idx = 2; #1;
    check(greg_data == word_t'(n + NTOT), $sformatf("g2 = %0d, expected %0d", greg_data, n + NTOT));
    n_md = dut.g_cl[0].md_ops + dut.g_cl[1].md_ops + dut.g_cl[2].md_ops + dut.g_cl[3].md_ops;
    check(n_md == n, $sformatf("multiplies = %0d, expected %0d", n_md, n));
    check(spawns == 1, "one spawn/join");
    check(ps_multi > 0, "no combined prefix-sum group");
  endtask

  initial begin
    run(50);
    run(500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
