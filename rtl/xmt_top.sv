// xmt_top: the explicit multi-threading (XMT) processor.
//
// N_CL clusters of N_TCU thread control units each (32 x 4 = 128 TCUs by
// default) run the threads of a spawn. A central management block holds the
// prefix-sum coordinator, the master copy of the global registers and the
// spawn/join coordinator; it talks to the clusters only through multi-cycle
// wires (xmt_link, LINK_DELAY cycles each way): one request line per TCU
// inwards, one broadcast bus (word-wide message plus two bits per TCU for
// prefix-sum results) outwards, and one join line per cluster inwards. The
// clusters share a level-2 instruction store and a level-2 data store.
//
// Operation: after reset TCU 0 runs serial code from address 0. A spawn makes
// every TCU start the spawn block at the same pc; threads obtain their ids
// and any other shared counters with prefix-sums on global registers, and
// join when they find no more work. When every cluster's join line is up the
// processor returns to serial mode on TCU 0, after the instruction that
// spawned. halt stops TCU 0 and raises `halted`.
//
// Test access: ld_* writes instruction words (word address) into the level-2
// instruction store, dbg_* reads and writes data words (word address) of the
// level-2 data store, greg_idx / greg_data read the master global registers.
// Both stores should be loaded while rst_n is low.
module xmt_top
  import xmt_pkg::*;
#(
  parameter int unsigned N_CL        = 32,
  parameter int unsigned N_TCU       = 4,
  parameter int unsigned LINK_DELAY  = 1,
  parameter int unsigned PS_LATENCY  = 3,
  parameter int unsigned MEM_LATENCY = 100,
  parameter int unsigned L2D_WORDS   = 32768,
  parameter int unsigned L2I_WORDS   = 4096,
  parameter int unsigned N_ALU       = 6,
  parameter int unsigned N_BR        = 4,
  parameter int unsigned N_MD        = 6,
  parameter int unsigned LSB_DEPTH   = 4,
  parameter int unsigned IC_LINES    = 128,
  parameter int unsigned DC_SETS     = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld_we,
  input  word_t       ld_addr,
  input  word_t       ld_data,
  input  logic        dbg_we,
  input  word_t       dbg_addr,
  input  word_t       dbg_wdata,
  output word_t       dbg_rdata,
  input  greg_t       greg_idx,
  output word_t       greg_data,
  output logic        halted,
  output logic        parallel,
  output logic [31:0] spawns,
  output logic [31:0] ps_groups,
  output logic [31:0] ps_multi,
  output logic [31:0] retired
);
  localparam int unsigned N_TOT    = N_CL * N_TCU;
  localparam int unsigned MIN_WAIT = PS_LATENCY + 2 * LINK_DELAY + 4;
  localparam int unsigned RQW      = $bits(cm_req_t);
  localparam int unsigned BW       = $bits(bcast_t) + 2 * N_TOT;

  // ---- central management -------------------------------------------------
  cm_req_t          req_c [N_TOT];       // requests as they reach the centre
  bcast_t           bus;
  logic [N_TOT-1:0] bus_part, bus_val;
  logic             spawn_req, spawn_ack, sj_valid;
  word_t            spawn_pc, sj_data;
  msg_kind_e        sj_kind;
  logic             g_wr_en, g_ps_en;
  greg_t            g_wr_idx, g_ps_idx;
  word_t            g_wr_data, g_ps_add;
  logic [N_CL-1:0]  join_c;

  xmt_ps_coord #(.N_TOT(N_TOT), .PS_LATENCY(PS_LATENCY)) u_ps (
    .clk, .rst_n, .req(req_c),
    .spawn_req, .spawn_pc, .spawn_ack, .sj_valid, .sj_kind, .sj_data,
    .g_wr_en, .g_wr_idx, .g_wr_data, .g_ps_en, .g_ps_idx, .g_ps_add,
    .bus, .bus_part, .bus_val, .ps_groups, .ps_multi
  );

  xmt_greg_coord u_greg (
    .clk, .rst_n, .wr_en(g_wr_en), .wr_idx(g_wr_idx), .wr_data(g_wr_data),
    .ps_en(g_ps_en), .ps_idx(g_ps_idx), .ps_add(g_ps_add),
    .rd_idx(greg_idx), .rd_data(greg_data)
  );

  xmt_sj_coord #(.MIN_WAIT(MIN_WAIT)) u_sj (
    .clk, .rst_n, .spawn_req, .spawn_pc, .spawn_ack, .all_joined(&join_c),
    .msg_valid(sj_valid), .msg_kind(sj_kind), .msg_data(sj_data),
    .parallel, .spawns
  );

  // ---- level-2 stores -----------------------------------------------------
  logic [N_CL-1:0] ic_req, ic_gnt, ic_rvalid, dc_req, dc_we, dc_gnt, dc_rvalid;
  word_t           ic_line[N_CL], dc_addr[N_CL], dc_wdata[N_CL];
  word_t           ic_rdata[LINE_W], dc_rdata[LINE_W];
  logic [31:0]     l2_reads, l2_writes;

  xmt_l2_imem #(.N_CL(N_CL), .WORDS(L2I_WORDS), .LATENCY(MEM_LATENCY)) u_l2i (
    .clk, .rst_n, .req(ic_req), .line(ic_line), .gnt(ic_gnt), .rvalid(ic_rvalid),
    .rdata(ic_rdata), .ld_we, .ld_addr, .ld_data
  );

  xmt_l2_dmem #(.N_CL(N_CL), .WORDS(L2D_WORDS), .LATENCY(MEM_LATENCY)) u_l2d (
    .clk, .rst_n, .req(dc_req), .we(dc_we), .addr(dc_addr), .wdata(dc_wdata),
    .gnt(dc_gnt), .rvalid(dc_rvalid), .rdata(dc_rdata),
    .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata, .reads(l2_reads), .writes(l2_writes)
  );

  // ---- clusters and their wires to the centre -------------------------------
  logic [N_CL-1:0]  cl_halted;
  logic [N_TOT-1:0] retire_all;

  for (genvar c = 0; c < int'(N_CL); c++) begin : g_cl
    cm_req_t           cm_req [N_TCU];
    logic [N_TCU*RQW-1:0] rq_flat, rq_far;
    logic [BW-1:0]     b_near, b_far;
    bcast_t            c_bus;
    logic [N_TOT-1:0]  c_part, c_val;
    logic              join_line;
    logic [31:0]       fu_stalls, md_ops, dc_hits, dc_misses, ic_misses;

    for (genvar t = 0; t < int'(N_TCU); t++) begin : g_rq
      assign rq_flat[t*RQW +: RQW] = cm_req[t];
      assign req_c[c*N_TCU + t]    = cm_req_t'(rq_far[t*RQW +: RQW]);
    end

    xmt_link #(.WIDTH(N_TCU*RQW), .DELAY(LINK_DELAY)) u_up (
      .clk, .rst_n, .d(rq_flat), .q(rq_far));
    xmt_link #(.WIDTH(1), .DELAY(LINK_DELAY)) u_join (
      .clk, .rst_n, .d(join_line), .q(join_c[c]));
    assign b_near = {bus, bus_part, bus_val};
    xmt_link #(.WIDTH(BW), .DELAY(LINK_DELAY)) u_down (
      .clk, .rst_n, .d(b_near), .q(b_far));
    assign {c_bus, c_part, c_val} = b_far;

    xmt_cluster #(
      .CID(c), .N_TCU(N_TCU), .N_TOT(N_TOT), .N_ALU(N_ALU), .N_BR(N_BR), .N_MD(N_MD),
      .LSB_DEPTH(LSB_DEPTH), .IC_LINES(IC_LINES), .DC_SETS(DC_SETS)
    ) u_cl (
      .clk, .rst_n, .bus(c_bus), .bus_part(c_part), .bus_val(c_val),
      .cm_req, .join_line,
      .ic_req(ic_req[c]), .ic_line(ic_line[c]), .ic_gnt(ic_gnt[c]),
      .ic_rvalid(ic_rvalid[c]), .ic_rdata,
      .dc_req(dc_req[c]), .dc_we(dc_we[c]), .dc_addr(dc_addr[c]), .dc_wdata(dc_wdata[c]),
      .dc_gnt(dc_gnt[c]), .dc_rvalid(dc_rvalid[c]), .dc_rdata,
      .halted(cl_halted[c]), .retire(retire_all[c*N_TCU +: N_TCU]),
      .fu_stalls, .md_ops, .dc_hits, .dc_misses, .ic_misses
    );
  end

  assign halted = cl_halted[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) retired <= '0;
    else        retired <= retired + 32'($countones(retire_all));
  end
endmodule
