// tb_xmt_cluster: one cluster of 4 TCUs with the central management and the
// level-2 stores around it, wired directly (no wire delay). The program
// spawns N threads that each draw an id with psi, square it with mul, divide
// the square by 3 with divu, load A[id], and store A[id] + id*id to B[id] and
// id*id/3 to C[id]. Checks every B and C word, the number of multiply/divide
// operations, that several multiply/divide units were busy at once, that
// issue contention happened, and the number of retired instructions' lower
// bound.
module tb_xmt_cluster;
  import xmt_pkg::*;
  localparam int T = 4, N = 24, LAT = 3;
  localparam int A = 32'h400, B = 32'h800, C = 32'hC00;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cm_req_t cm_req [T];
  bcast_t bus;
  logic [T-1:0] bus_part, bus_val, retire;
  logic join_line, ic_req, ic_gnt, ic_rvalid, dc_req, dc_we, dc_gnt, dc_rvalid, halted;
  word_t ic_line, dc_addr, dc_wdata, ic_rdata[LINE_W], dc_rdata[LINE_W];
  logic [31:0] fu_stalls, md_ops, dc_hits, dc_misses, ic_misses;

  xmt_cluster #(.CID(0), .N_TCU(T), .N_TOT(T)) dut (.clk, .rst_n, .bus, .bus_part, .bus_val,
    .cm_req, .join_line, .ic_req, .ic_line, .ic_gnt, .ic_rvalid, .ic_rdata,
    .dc_req, .dc_we, .dc_addr, .dc_wdata, .dc_gnt, .dc_rvalid, .dc_rdata,
    .halted, .retire, .fu_stalls, .md_ops, .dc_hits, .dc_misses, .ic_misses);

  // environment: central management and level-2 stores
  logic spawn_req, spawn_ack, sj_valid, g_wr_en, g_ps_en, parallel;
  word_t spawn_pc, sj_data, g_wr_data, g_ps_add, greg_data, dbg_rdata;
  msg_kind_e sj_kind;
  greg_t g_wr_idx, g_ps_idx;
  logic [31:0] ps_groups, ps_multi, spawns, l2r, l2w;
  logic ld_we = 0, dbg_we = 0;
  word_t ld_addr = 0, ld_data = 0, dbg_addr = 0, dbg_wdata = 0;

  xmt_ps_coord #(.N_TOT(T), .PS_LATENCY(LAT)) u_ps (.clk, .rst_n, .req(cm_req), .spawn_req,
    .spawn_pc, .spawn_ack, .sj_valid, .sj_kind, .sj_data, .g_wr_en, .g_wr_idx, .g_wr_data,
    .g_ps_en, .g_ps_idx, .g_ps_add, .bus, .bus_part, .bus_val, .ps_groups, .ps_multi);
  xmt_greg_coord u_g (.clk, .rst_n, .wr_en(g_wr_en), .wr_idx(g_wr_idx), .wr_data(g_wr_data),
    .ps_en(g_ps_en), .ps_idx(g_ps_idx), .ps_add(g_ps_add), .rd_idx(5'd0), .rd_data(greg_data));
  xmt_sj_coord #(.MIN_WAIT(LAT + 4)) u_sj (.clk, .rst_n, .spawn_req, .spawn_pc, .spawn_ack,
    .all_joined(join_line), .msg_valid(sj_valid), .msg_kind(sj_kind), .msg_data(sj_data),
    .parallel, .spawns);
  xmt_l2_imem #(.N_CL(1), .WORDS(256), .LATENCY(4)) u_l2i (.clk, .rst_n, .req(ic_req),
    .line('{ic_line}), .gnt(ic_gnt), .rvalid(ic_rvalid), .rdata(ic_rdata), .ld_we, .ld_addr, .ld_data);
  xmt_l2_dmem #(.N_CL(1), .WORDS(1024), .LATENCY(4)) u_l2d (.clk, .rst_n, .req(dc_req),
    .we(dc_we), .addr('{dc_addr}), .wdata('{dc_wdata}), .gnt(dc_gnt), .rvalid(dc_rvalid),
    .rdata(dc_rdata), .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata, .reads(l2r), .writes(l2w));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  int md_overlap = 0;
  always @(posedge clk) if ($countones({dut.g_md[0].u_md.busy, dut.g_md[1].u_md.busy,
                                       dut.g_md[2].u_md.busy, dut.g_md[3].u_md.busy}) > 1) md_overlap++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t prog [$];
    word_t av [N];
    int retired = 0;
    prog.push_back(enc_i(OP_ORI, 1, 0, N));         // 0  g1 = N
    prog.push_back(enc_i(OP_ORI, 6, 0, 3));         // 1  g6 = 3
    prog.push_back(enc_i(OP_ORI, 8, 0, B));         // 2  g8 = &B
    prog.push_back(enc_i(OP_ORI, 9, 0, C));         // 3  g9 = &C
    prog.push_back(enc_i(OP_SPAWN, 0, 0, 1));       // 4  spawn -> GO
    prog.push_back({OP_HALT, 26'd0});               // 5  halt
    prog.push_back(enc_i(OP_PSI, 32, 2, 1));        // 6  GO: psi t0, g2, 1
    prog.push_back(enc_r(F_SLT, 33, 32, 1));        // 7  slt t1, t0, g1
    prog.push_back(enc_i(OP_BEQ, 33, 0, 8));        // 8  beq t1, g0, END
    prog.push_back(enc_r(F_MUL, 34, 32, 32));       // 9  t2 = id * id
    prog.push_back(enc_r(F_DIVU, 35, 34, 6));       // 10 t3 = t2 / g6
    prog.push_back(enc_i(OP_ORI, 40, 0, A));        // 11 t8 = &A
    prog.push_back(enc_la(OP_LWA, 36, 40, 32, 0));  // 12 t4 = A[id]
    prog.push_back(enc_r(F_ADD, 36, 36, 34));       // 13 t4 += t2
    prog.push_back(enc_la(OP_SWA, 36, 8, 32, 0));   // 14 B[id] = t4
    prog.push_back(enc_la(OP_SWA, 35, 9, 32, 0));   // 15 C[id] = t3
    prog.push_back(enc_j(6));                       // 16 j GO
    prog.push_back({OP_JOIN, 26'd0});               // 17 END: join
    for (int i = 0; i < prog.size(); i++) begin
      ld_we = 1; ld_addr = i; ld_data = prog[i]; @(posedge clk); #1;
    end
    ld_we = 0;
    for (int i = 0; i < N; i++) begin
      av[i] = $urandom % 1000;
      dbg_we = 1; dbg_addr = A / 4 + i; dbg_wdata = av[i]; @(posedge clk); #1;
    end
    dbg_we = 0;
    #1 rst_n = 1;
    fork
      wait (halted);
      forever begin @(posedge clk); retired += $countones(retire); end
    join_any
    disable fork;
    repeat (3) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      dbg_addr = B / 4 + i; #1;
      chk(dbg_rdata == av[i] + i * i, $sformatf("B[%0d] = %0d, expected %0d", i, dbg_rdata, av[i] + i * i));
      dbg_addr = C / 4 + i; #1;
      chk(dbg_rdata == (i * i) / 3, $sformatf("C[%0d] = %0d, expected %0d", i, dbg_rdata, (i * i) / 3));
    end
    chk(md_ops == 2 * N, $sformatf("multiply/divide operations %0d", md_ops));
    chk(md_overlap > 0, "multiply/divide units never worked in parallel");
    chk(fu_stalls > 0, "no issue contention");
    chk(retired >= N * 11, $sformatf("retired %0d", retired));
    chk(spawns == 1, "one spawn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
