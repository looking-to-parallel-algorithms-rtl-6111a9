// xmt_cluster: one XMT cluster.
//
// N_TCU independent thread control units share a small instruction cache, a
// small data cache behind a load-store buffer, a pool of functional units and
// an interface unit to the central management; their local registers sit in a
// register file banked per TCU. Because the threads are independent, no
// dependence is checked between TCUs, neither before issue nor at it: the
// issue logic only hands out free units.
//
// Functional-unit pool, as in the simulated cluster: N_ALU ALUs and N_BR
// branch units (1-cycle latency, a new operation every cycle), N_MD
// multiply/divide units (2-cycle multiply, 40-cycle divide, not pipelined)
// and the LSB_DEPTH-entry load-store buffer. Each cycle the issuing TCUs are
// served in order of TCU number (static ranking): the k-th ALU request gets
// ALU k if k < N_ALU, a multiply/divide request gets a free unit, and one
// memory operation enters the load-store buffer if it has room. A TCU that
// gets nothing retries the next cycle (counted in fu_stalls).
//
// Outside connections: the broadcast bus from the central management (after
// its wire delay), one request line per TCU to it, the join line (AND of the
// TCUs' joined flags), and line ports to the level-2 instruction and data
// stores. At the end of a spawn (END message) the data cache is invalidated.
module xmt_cluster
  import xmt_pkg::*;
#(
  parameter int unsigned CID       = 0,
  parameter int unsigned N_TCU     = 4,
  parameter int unsigned N_TOT     = 128,
  parameter int unsigned N_ALU     = 6,
  parameter int unsigned N_BR      = 4,
  parameter int unsigned N_MD      = 6,
  parameter int unsigned MUL_CYCLES = 2,
  parameter int unsigned DIV_CYCLES = 40,
  parameter int unsigned LSB_DEPTH = 4,
  parameter int unsigned IC_LINES  = 128,
  parameter int unsigned DC_SETS   = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bcast_t           bus,
  input  logic [N_TOT-1:0] bus_part,
  input  logic [N_TOT-1:0] bus_val,
  output cm_req_t          cm_req [N_TCU],
  output logic             join_line,
  output logic             ic_req,
  output word_t            ic_line,
  input  logic             ic_gnt,
  input  logic             ic_rvalid,
  input  word_t            ic_rdata [LINE_W],
  output logic             dc_req,
  output logic             dc_we,
  output word_t            dc_addr,
  output word_t            dc_wdata,
  input  logic             dc_gnt,
  input  logic             dc_rvalid,
  input  word_t            dc_rdata [LINE_W],
  output logic             halted,
  output logic [N_TCU-1:0] retire,
  output logic [31:0]      fu_stalls,
  output logic [31:0]      md_ops,
  output logic [31:0]      dc_hits,
  output logic [31:0]      dc_misses,
  output logic [31:0]      ic_misses
);
  localparam int unsigned TIDW = (N_TCU > 1) ? $clog2(N_TCU) : 1;

  // ---- TCU-side signals --------------------------------------------------
  logic [N_TCU-1:0] f_req, f_hit, rf_we, iss_valid, iss_gnt, res_valid, joined, t_halted;
  logic [N_TCU-1:0] iss_div, iss_we, ps_done, gwr_ack;
  word_t            f_pc[N_TCU], f_instr[N_TCU];
  logic [4:0]       ra_idx[N_TCU], rb_idx[N_TCU], rf_widx[N_TCU];
  word_t            ra_data[N_TCU], rb_data[N_TCU], rf_wdata[N_TCU];
  greg_t            ga_idx[N_TCU], gb_idx[N_TCU];
  word_t            ga_data[N_TCU], gb_data[N_TCU];
  fu_class_e        iss_class[N_TCU];
  alu_op_e          iss_op[N_TCU];
  word_t            iss_a[N_TCU], iss_b[N_TCU], res_data[N_TCU], ps_value[N_TCU];
  logic             spawn_go, end_go;
  word_t            spawn_pc;

  for (genvar t = 0; t < int'(N_TCU); t++) begin : g_tcu
    xmt_tcu #(.GID(CID * N_TCU + t)) u_tcu (
      .clk, .rst_n,
      .f_req(f_req[t]), .f_pc(f_pc[t]), .f_hit(f_hit[t]), .f_instr(f_instr[t]),
      .ra_idx(ra_idx[t]), .rb_idx(rb_idx[t]), .ra_data(ra_data[t]), .rb_data(rb_data[t]),
      .rf_we(rf_we[t]), .rf_widx(rf_widx[t]), .rf_wdata(rf_wdata[t]),
      .ga_idx(ga_idx[t]), .gb_idx(gb_idx[t]), .ga_data(ga_data[t]), .gb_data(gb_data[t]),
      .iss_valid(iss_valid[t]), .iss_class(iss_class[t]), .iss_op(iss_op[t]),
      .iss_div(iss_div[t]), .iss_we(iss_we[t]), .iss_a(iss_a[t]), .iss_b(iss_b[t]),
      .iss_gnt(iss_gnt[t]), .res_valid(res_valid[t]), .res_data(res_data[t]),
      .cm_req(cm_req[t]), .ps_done(ps_done[t]), .ps_value(ps_value[t]),
      .gwr_ack(gwr_ack[t]), .spawn_go, .spawn_pc, .end_go,
      .joined(joined[t]), .halted(t_halted[t]), .retire(retire[t])
    );
  end

  assign join_line = &joined;
  assign halted    = t_halted[0];

  xmt_regfile #(.N_TCU(N_TCU)) u_rf (
    .clk, .rst_n, .ra_idx, .rb_idx, .ra_data, .rb_data,
    .we(rf_we), .w_idx(rf_widx), .w_data(rf_wdata)
  );

  xmt_ps_if #(.N_TOT(N_TOT), .N_TCU(N_TCU), .CID(CID)) u_if (
    .clk, .rst_n, .bus, .bus_part, .bus_val,
    .ga_idx, .gb_idx, .ga_data, .gb_data,
    .ps_done, .ps_value, .gwr_ack, .spawn_go, .spawn_pc, .end_go
  );

  xmt_icache #(.N_TCU(N_TCU), .LINES(IC_LINES)) u_ic (
    .clk, .rst_n, .f_req, .f_pc, .f_hit, .f_instr,
    .l2_req(ic_req), .l2_line(ic_line), .l2_gnt(ic_gnt),
    .l2_rvalid(ic_rvalid), .l2_rdata(ic_rdata), .misses(ic_misses)
  );

  // ---- issue: hand out free units in TCU order -----------------------------
  logic [TIDW-1:0]  alu_sel[N_ALU], br_sel[N_BR], md_owner[N_MD], md_pick[N_MD];
  logic [N_ALU-1:0] alu_use;
  logic [N_BR-1:0]  br_use;
  logic [N_MD-1:0]  md_start, md_busy, md_done;
  word_t            alu_y[N_ALU], br_y[N_BR], md_y[N_MD];
  word_t            alu_a[N_ALU], alu_b[N_ALU], br_a[N_BR], br_b[N_BR], md_a[N_MD], md_b[N_MD];
  alu_op_e          alu_o[N_ALU], br_o[N_BR];
  logic             md_d[N_MD];
  logic             lsb_enq, lsb_full;
  logic [TIDW-1:0]  lsb_tcu;

  always_comb begin
    automatic int na = 0;
    automatic int nb = 0;
    automatic logic [N_MD-1:0] taken = '0;
    iss_gnt = '0;
    alu_use = '0;
    br_use  = '0;
    md_start = '0;
    lsb_enq = 1'b0;
    lsb_tcu = '0;
    for (int k = 0; k < int'(N_ALU); k++) begin alu_sel[k] = '0; alu_a[k] = '0; alu_b[k] = '0; alu_o[k] = ALU_ADD; end
    for (int k = 0; k < int'(N_BR); k++)  begin br_sel[k] = '0; br_a[k] = '0; br_b[k] = '0; br_o[k] = ALU_EQ; end
    for (int m = 0; m < int'(N_MD); m++)  begin md_pick[m] = '0; md_a[m] = '0; md_b[m] = '0; md_d[m] = 1'b0; end
    for (int t = 0; t < int'(N_TCU); t++) begin
      if (iss_valid[t]) begin
        unique case (iss_class[t])
          FU_ALU: if (na < int'(N_ALU)) begin
            alu_use[na] = 1'b1; alu_sel[na] = TIDW'(t);
            alu_a[na] = iss_a[t]; alu_b[na] = iss_b[t]; alu_o[na] = iss_op[t];
            iss_gnt[t] = 1'b1; na++;
          end
          FU_BR: if (nb < int'(N_BR)) begin
            br_use[nb] = 1'b1; br_sel[nb] = TIDW'(t);
            br_a[nb] = iss_a[t]; br_b[nb] = iss_b[t]; br_o[nb] = iss_op[t];
            iss_gnt[t] = 1'b1; nb++;
          end
          FU_MD: for (int m = 0; m < int'(N_MD); m++) begin
            if (!iss_gnt[t] && !md_busy[m] && !taken[m]) begin
              taken[m] = 1'b1; md_start[m] = 1'b1; md_pick[m] = TIDW'(t);
              md_a[m] = iss_a[t]; md_b[m] = iss_b[t]; md_d[m] = iss_div[t];
              iss_gnt[t] = 1'b1;
            end
          end
          FU_MEM: if (!lsb_enq && !lsb_full) begin
            lsb_enq = 1'b1; lsb_tcu = TIDW'(t); iss_gnt[t] = 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  for (genvar k = 0; k < int'(N_ALU); k++) begin : g_alu
    xmt_alu u_alu (.op(alu_o[k]), .a(alu_a[k]), .b(alu_b[k]), .y(alu_y[k]));
  end
  for (genvar k = 0; k < int'(N_BR); k++) begin : g_br
    xmt_alu u_br (.op(br_o[k]), .a(br_a[k]), .b(br_b[k]), .y(br_y[k]));
  end
  for (genvar m = 0; m < int'(N_MD); m++) begin : g_md
    xmt_muldiv #(.MUL_CYCLES(MUL_CYCLES), .DIV_CYCLES(DIV_CYCLES)) u_md (
      .clk, .rst_n, .start(md_start[m]), .is_div(md_d[m]), .a(md_a[m]), .b(md_b[m]),
      .busy(md_busy[m]), .done(md_done[m]), .y(md_y[m])
    );
  end

  // ---- memory path ---------------------------------------------------------
  logic            lsb_dc_req, lsb_dc_we, dc_resp, lsb_done;
  word_t           lsb_dc_addr, lsb_dc_wdata, dc_resp_data, lsb_done_data;
  logic [TIDW-1:0] lsb_done_tcu;
  logic [TIDW-1:0] lsb_tcu_q;
  word_t           lsb_a, lsb_b;
  logic            lsb_w;

  always_comb begin
    lsb_a = '0; lsb_b = '0; lsb_w = 1'b0;
    for (int t = 0; t < int'(N_TCU); t++)
      if (lsb_enq && lsb_tcu == TIDW'(t)) begin lsb_a = iss_a[t]; lsb_b = iss_b[t]; lsb_w = iss_we[t]; end
  end
  assign lsb_tcu_q = lsb_tcu;

  xmt_lsb #(.DEPTH(LSB_DEPTH), .TIDW(TIDW)) u_lsb (
    .clk, .rst_n, .enq(lsb_enq), .enq_tcu(lsb_tcu_q), .enq_we(lsb_w), .enq_addr(lsb_a),
    .enq_wdata(lsb_b), .full(lsb_full),
    .dc_req(lsb_dc_req), .dc_we(lsb_dc_we), .dc_addr(lsb_dc_addr), .dc_wdata(lsb_dc_wdata),
    .dc_resp, .dc_rdata(dc_resp_data),
    .done(lsb_done), .done_tcu(lsb_done_tcu), .done_data(lsb_done_data)
  );

  xmt_dcache #(.SETS(DC_SETS)) u_dc (
    .clk, .rst_n, .req(lsb_dc_req), .we(lsb_dc_we), .addr(lsb_dc_addr), .wdata(lsb_dc_wdata),
    .resp(dc_resp), .resp_data(dc_resp_data), .inval(end_go),
    .l2_req(dc_req), .l2_we(dc_we), .l2_addr(dc_addr), .l2_wdata(dc_wdata),
    .l2_gnt(dc_gnt), .l2_rvalid(dc_rvalid), .l2_rdata(dc_rdata),
    .hits(dc_hits), .misses(dc_misses)
  );

  // ---- results back to the TCUs ---------------------------------------------
  logic [N_TCU-1:0] alu_rv;
  word_t            alu_rd[N_TCU];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alu_rv    <= '0;
      fu_stalls <= '0;
      md_ops    <= '0;
      for (int t = 0; t < int'(N_TCU); t++) alu_rd[t] <= '0;
      for (int m = 0; m < int'(N_MD); m++) md_owner[m] <= '0;
    end else begin
      alu_rv <= '0;
      for (int k = 0; k < int'(N_ALU); k++)
        if (alu_use[k]) begin alu_rv[alu_sel[k]] <= 1'b1; alu_rd[alu_sel[k]] <= alu_y[k]; end
      for (int k = 0; k < int'(N_BR); k++)
        if (br_use[k]) begin alu_rv[br_sel[k]] <= 1'b1; alu_rd[br_sel[k]] <= br_y[k]; end
      for (int m = 0; m < int'(N_MD); m++)
        if (md_start[m]) md_owner[m] <= md_pick[m];
      fu_stalls <= fu_stalls + 32'($countones(iss_valid & ~iss_gnt));
      md_ops    <= md_ops + 32'($countones(md_start));
    end
  end

  always_comb begin
    for (int t = 0; t < int'(N_TCU); t++) begin
      res_valid[t] = alu_rv[t];
      res_data[t]  = alu_rd[t];
      for (int m = 0; m < int'(N_MD); m++)
        if (md_done[m] && md_owner[m] == TIDW'(t)) begin res_valid[t] = 1'b1; res_data[t] = md_y[m]; end
      if (lsb_done && lsb_done_tcu == TIDW'(t)) begin res_valid[t] = 1'b1; res_data[t] = lsb_done_data; end
    end
  end
endmodule
