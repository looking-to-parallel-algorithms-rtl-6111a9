// xmt_icache: a cluster's small instruction cache.
//
// Direct mapped, LINES lines of LINE_W 32-bit words (128 lines of 4 words in
// the simulated configuration). Each TCU of the cluster has its own
// combinational read port (f_req / f_pc in, f_hit / f_instr out in the same
// cycle), so the independent pipelines never wait for one another on a hit.
// On a miss the lowest-numbered missing TCU's line is requested from the
// level-2 instruction store (l2_req held until l2_gnt, l2_line is the word
// address of the line's first word); the line is written when l2_rvalid
// arrives and the TCU's next lookup hits. One miss is handled at a time. The
// cache is read-only and needs no coherence. Valid bits reset to zero.
module xmt_icache
  import xmt_pkg::*;
#(
  parameter int unsigned N_TCU = 4,
  parameter int unsigned LINES = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_TCU-1:0]  f_req,
  input  word_t             f_pc   [N_TCU],
  output logic [N_TCU-1:0]  f_hit,
  output word_t             f_instr[N_TCU],
  output logic              l2_req,
  output word_t             l2_line,
  input  logic              l2_gnt,
  input  logic              l2_rvalid,
  input  word_t             l2_rdata[LINE_W],
  output logic [31:0]       misses
);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned OW = $clog2(LINE_W);
  localparam int unsigned TGW = XLEN - 2 - OW - IW;

  logic [TGW-1:0] tags  [LINES];
  logic           valid [LINES];
  word_t          data  [LINES][LINE_W];

  typedef enum logic [1:0] { IC_IDLE, IC_REQ, IC_WAIT } ic_state_e;
  ic_state_e state;
  word_t     miss_pc;

  function automatic logic [IW-1:0] idx_of(input word_t pc);
    return pc[2+OW +: IW];
  endfunction
  function automatic logic [TGW-1:0] tag_of(input word_t pc);
    return pc[XLEN-1 -: TGW];
  endfunction

  always_comb begin
    for (int t = 0; t < int'(N_TCU); t++) begin
      f_hit[t]   = f_req[t] && valid[idx_of(f_pc[t])] && tags[idx_of(f_pc[t])] == tag_of(f_pc[t]);
      f_instr[t] = data[idx_of(f_pc[t])][f_pc[t][2 +: OW]];
    end
  end

  logic          any_miss;
  word_t         first_miss_pc;
  always_comb begin
    any_miss      = 1'b0;
    first_miss_pc = '0;
    for (int t = int'(N_TCU) - 1; t >= 0; t--)
      if (f_req[t] && !f_hit[t]) begin any_miss = 1'b1; first_miss_pc = f_pc[t]; end
  end

  assign l2_req  = (state == IC_REQ);
  assign l2_line = {miss_pc[XLEN-1:2+OW], {OW{1'b0}}, 2'b00} >> 2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IC_IDLE;
      miss_pc <= '0;
      misses  <= '0;
      for (int i = 0; i < int'(LINES); i++) begin valid[i] <= 1'b0; tags[i] <= '0; end
    end else begin
      unique case (state)
        IC_IDLE: if (any_miss) begin
          state   <= IC_REQ;
          miss_pc <= first_miss_pc;
          misses  <= misses + 32'd1;
        end
        IC_REQ:  if (l2_gnt) state <= IC_WAIT;
        IC_WAIT: if (l2_rvalid) begin
          valid[idx_of(miss_pc)] <= 1'b1;
          tags[idx_of(miss_pc)]  <= tag_of(miss_pc);
          state                  <= IC_IDLE;
        end
        default: state <= IC_IDLE;
      endcase
    end
  end

  // Line data has no reset; it is read only while its valid bit is set.
  always_ff @(posedge clk) begin
    if (state == IC_WAIT && l2_rvalid)
      for (int w = 0; w < int'(LINE_W); w++) data[idx_of(miss_pc)][w] <= l2_rdata[w];
  end
endmodule
