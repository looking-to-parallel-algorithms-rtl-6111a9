// xmt_dcache: a cluster's small data cache.
//
// Two-way set associative with SETS sets of LINE_W-word lines, write-through
// with no fetch on a write miss (the policy of the simulated data cache). One
// request at a time from the load-store buffer: req held with we/addr/wdata
// until the one-cycle resp pulse (resp_data for loads). A load hit answers the
// cycle after the request; a load miss fetches the line from the level-2 data
// store (l2_req held until l2_gnt, then l2_rvalid with the line), fills the
// least recently used way and answers. A store updates the line if present and
// is always written through to level 2 (answered once l2_gnt takes it).
//
// Coherence is left to the programming model: threads of a spawn never write
// each other's data, so the caches of different clusters may disagree during a
// spawn; at the end of a spawn `inval` (a one-cycle pulse) clears every line,
// so serial code sees level 2. Addresses are byte addresses of words.
module xmt_dcache
  import xmt_pkg::*;
#(
  parameter int unsigned SETS = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  word_t       addr,
  input  word_t       wdata,
  output logic        resp,
  output word_t       resp_data,
  input  logic        inval,
  output logic        l2_req,
  output logic        l2_we,
  output word_t       l2_addr,
  output word_t       l2_wdata,
  input  logic        l2_gnt,
  input  logic        l2_rvalid,
  input  word_t       l2_rdata[LINE_W],
  output logic [31:0] hits,
  output logic [31:0] misses
);
  localparam int unsigned SW  = $clog2(SETS);
  localparam int unsigned OW  = $clog2(LINE_W);
  localparam int unsigned TGW = XLEN - 2 - OW - SW;

  logic [TGW-1:0] tags  [2][SETS];
  logic           valid [2][SETS];
  word_t          data  [2][SETS][LINE_W];
  logic           lru   [SETS];          // way to replace next

  typedef enum logic [2:0] { DC_IDLE, DC_RESP, DC_MREQ, DC_MWAIT, DC_WREQ } dc_state_e;
  dc_state_e state;

  logic [SW-1:0]  set;
  logic [TGW-1:0] tag;
  logic [OW-1:0]  off;
  logic           hit0, hit1, hit;
  assign set  = addr[2+OW +: SW];
  assign tag  = addr[XLEN-1 -: TGW];
  assign off  = addr[2 +: OW];
  assign hit0 = valid[0][set] && tags[0][set] == tag;
  assign hit1 = valid[1][set] && tags[1][set] == tag;
  assign hit  = hit0 || hit1;

  assign l2_req   = (state == DC_MREQ) || (state == DC_WREQ);
  assign l2_we    = (state == DC_WREQ);
  assign l2_addr  = (state == DC_WREQ) ? (addr >> 2) : ({addr[XLEN-1:2+OW], {OW{1'b0}}, 2'b00} >> 2);
  assign l2_wdata = wdata;

  word_t rdata_q;
  assign resp_data = rdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= DC_IDLE;
      resp    <= 1'b0;
      rdata_q <= '0;
      hits    <= '0;
      misses  <= '0;
      for (int s = 0; s < int'(SETS); s++) begin
        valid[0][s] <= 1'b0; valid[1][s] <= 1'b0; lru[s] <= 1'b0;
        tags[0][s] <= '0; tags[1][s] <= '0;
      end
    end else begin
      resp <= 1'b0;
      unique case (state)
        DC_IDLE: begin
          if (inval) begin
            for (int s = 0; s < int'(SETS); s++) begin valid[0][s] <= 1'b0; valid[1][s] <= 1'b0; end
          end else if (req) begin
            if (we) begin
              state <= DC_WREQ;
              if (hit) hits <= hits + 32'd1; else misses <= misses + 32'd1;
            end else if (hit) begin
              rdata_q  <= hit0 ? data[0][set][off] : data[1][set][off];
              lru[set] <= hit0;
              resp     <= 1'b1;
              hits     <= hits + 32'd1;
              state    <= DC_RESP;
            end else begin
              misses <= misses + 32'd1;
              state  <= DC_MREQ;
            end
          end
        end
        DC_RESP:  state <= DC_IDLE;     // the request drops in this cycle
        DC_MREQ:  if (l2_gnt) state <= DC_MWAIT;
        DC_MWAIT: if (l2_rvalid) begin
          valid[lru[set]][set] <= 1'b1;
          tags[lru[set]][set]  <= tag;
          lru[set]             <= !lru[set];
          rdata_q              <= l2_rdata[off];
          resp                 <= 1'b1;
          state                <= DC_RESP;
        end
        DC_WREQ:  if (l2_gnt) begin
          resp  <= 1'b1;
          state <= DC_RESP;
        end
        default: state <= DC_IDLE;
      endcase
    end
  end

  // Line data: filled on a miss, updated by a store that hits.
  always_ff @(posedge clk) begin
    if (state == DC_MWAIT && l2_rvalid) begin
      for (int w = 0; w < int'(LINE_W); w++) data[lru[set]][set][w] <= l2_rdata[w];
    end else if (state == DC_WREQ && l2_gnt) begin
      if (hit0) data[0][set][off] <= wdata;
      if (hit1) data[1][set][off] <= wdata;
    end
  end
endmodule
