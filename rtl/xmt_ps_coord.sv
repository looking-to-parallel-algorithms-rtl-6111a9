// xmt_ps_coord: the central prefix-sum coordinator and broadcast-bus sequencer.
//
// Every TCU has its own request line into the central management (cm_req_t,
// one-cycle pulse, at most one request outstanding per TCU). Requests wait in
// a per-TCU pending slot. Each cycle the coordinator puts one message on the
// broadcast bus, in this priority:
//   1. a SPAWN / END message of the spawn/join coordinator;
//   2. a prefix-sum group: the base of the lowest-numbered TCU with a pending
//      prefix-sum is chosen, and every pending prefix-sum on that same base is
//      served at once, whatever the number of requesters (O(1) time). The
//      message carries the base number and two bits per TCU: whether it took
//      part, and the 1-bit value it added. Threads add to the base in order of
//      TCU number (static ranking), so each cluster interface can work out its
//      own TCUs' results from the bits and its copy of the base;
//   3. a global-register write by a thread, also broadcast so that all copies
//      of the register stay current.
// A spawn request (from TCU 0 in serial mode) is handed to the spawn/join
// coordinator.
//
// The coordinator is pipelined: a request that arrives (req valid in cycle n)
// with nothing ahead of it leaves on the bus in cycle n + PS_LATENCY, and a new
// group can start every cycle. The master copy of the global registers is
// updated when a message is chosen. The increment carried by a prefix-sum is
// bit 0 of its data (a 1-bit bus per TCU).
module xmt_ps_coord
  import xmt_pkg::*;
#(
  parameter int unsigned N_TOT      = 128,
  parameter int unsigned PS_LATENCY = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cm_req_t          req   [N_TOT],
  // spawn/join coordinator
  output logic             spawn_req,
  output word_t            spawn_pc,
  input  logic             spawn_ack,
  input  logic             sj_valid,
  input  msg_kind_e        sj_kind,
  input  word_t            sj_data,
  // global register coordinator
  output logic             g_wr_en,
  output greg_t            g_wr_idx,
  output word_t            g_wr_data,
  output logic             g_ps_en,
  output greg_t            g_ps_idx,
  output word_t            g_ps_add,
  // broadcast bus
  output bcast_t           bus,
  output logic [N_TOT-1:0] bus_part,
  output logic [N_TOT-1:0] bus_val,
  // statistics
  output logic [31:0]      ps_groups,
  output logic [31:0]      ps_multi
);
  localparam int unsigned STAGES = (PS_LATENCY > 1) ? PS_LATENCY - 1 : 1;
  localparam int unsigned TW     = (N_TOT > 1) ? $clog2(N_TOT) : 1;

  cm_req_t pend [N_TOT];

  // --- selection ---------------------------------------------------------
  bcast_t           sel;
  logic [N_TOT-1:0] sel_part, sel_val, clr;
  logic             found_ps, found_wr, found_sp;
  greg_t            base;
  logic [TW-1:0]    wr_t, sp_t;
  logic [15:0]      part_cnt;

  // spawn requests go to the spawn/join coordinator
  always_comb begin
    found_sp = 1'b0;
    sp_t     = '0;
    for (int t = 0; t < int'(N_TOT); t++)
      if (!found_sp && pend[t].kind == RQ_SPAWN) begin found_sp = 1'b1; sp_t = TW'(t); end
  end
  assign spawn_req = found_sp;
  assign spawn_pc  = pend[sp_t].data;

  always_comb begin
    sel       = '0;
    sel_part  = '0;
    sel_val   = '0;
    clr       = '0;
    found_ps  = 1'b0;
    found_wr  = 1'b0;
    base      = '0;
    wr_t      = '0;
    part_cnt  = '0;
    g_wr_en   = 1'b0;
    g_wr_idx  = '0;
    g_wr_data = '0;
    g_ps_en   = 1'b0;
    g_ps_idx  = '0;
    g_ps_add  = '0;

    for (int t = 0; t < int'(N_TOT); t++) begin
      if (!found_ps && pend[t].kind == RQ_PS) begin found_ps = 1'b1; base = pend[t].greg; end
      if (!found_wr && pend[t].kind == RQ_GWR) begin found_wr = 1'b1; wr_t = TW'(t); end
    end

    if (spawn_ack) clr[sp_t] = 1'b1;

    if (sj_valid) begin
      sel.kind = sj_kind;
      sel.data = sj_data;
    end else if (found_ps) begin
      for (int t = 0; t < int'(N_TOT); t++)
        if (pend[t].kind == RQ_PS && pend[t].greg == base) begin
          sel_part[t] = 1'b1;
          sel_val[t]  = pend[t].data[0];
          part_cnt    = part_cnt + 16'd1;
        end
      clr      = clr | sel_part;
      sel.kind = MSG_PS;
      sel.greg = base;
      g_ps_en  = 1'b1;
      g_ps_idx = base;
      g_ps_add = word_t'($countones(sel_val));
    end else if (found_wr) begin
      clr[wr_t] = 1'b1;
      sel.kind  = MSG_GWR;
      sel.greg  = pend[wr_t].greg;
      sel.data  = pend[wr_t].data;
      sel.src   = 16'(wr_t);
      g_wr_en   = 1'b1;
      g_wr_idx  = pend[wr_t].greg;
      g_wr_data = pend[wr_t].data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < int'(N_TOT); t++) pend[t] <= '0;
      ps_groups <= '0;
      ps_multi  <= '0;
    end else begin
      for (int t = 0; t < int'(N_TOT); t++) begin
        if (req[t].kind != RQ_NONE) pend[t] <= req[t];
        else if (clr[t])            pend[t] <= '0;
      end
      if (sel.kind == MSG_PS) begin
        ps_groups <= ps_groups + 32'd1;
        if (part_cnt > 16'd1) ps_multi <= ps_multi + 32'd1;
      end
    end
  end

  // --- pipeline to the bus -------------------------------------------------
  bcast_t           st_msg  [STAGES];
  logic [N_TOT-1:0] st_part [STAGES];
  logic [N_TOT-1:0] st_val  [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(STAGES); s++) begin
        st_msg[s] <= '0; st_part[s] <= '0; st_val[s] <= '0;
      end
    end else begin
      st_msg[0]  <= sel;
      st_part[0] <= sel_part;
      st_val[0]  <= sel_val;
      for (int s = 1; s < int'(STAGES); s++) begin
        st_msg[s]  <= st_msg[s-1];
        st_part[s] <= st_part[s-1];
        st_val[s]  <= st_val[s-1];
      end
    end
  end

  assign bus      = st_msg[STAGES-1];
  assign bus_part = st_part[STAGES-1];
  assign bus_val  = st_val[STAGES-1];

  // A TCU never issues a second request while one is pending.
  for (genvar t = 0; t < int'(N_TOT); t++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     (req[t].kind != RQ_NONE) |-> (pend[t].kind == RQ_NONE || clr[t]));
  end
endmodule
