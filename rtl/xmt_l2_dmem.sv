// xmt_l2_dmem: the shared level-2 data store behind the clusters' data caches.
//
// WORDS 32-bit words (the 32K-word data cache of the 128-TCU configuration),
// modelled as storage that always hits: the memory behind it is not part of
// this design. Every cluster has one request port (req held until gnt, we,
// word address addr, wdata); one request is accepted per cycle, the
// requesters taking turns (round robin). A write is applied when accepted. A
// read returns the whole LINE_W-word line holding addr (addr is expected to be
// line aligned) exactly LATENCY cycles after acceptance, on the requester's
// rvalid with rdata; the line is read when accepted, so reads and writes take
// effect in acceptance order, and up to LATENCY reads are in flight. LATENCY
// 100 and one read per cycle are the "real memory" setting of the simulated
// machine; LATENCY 1 approximates its "perfect" one.
//
// A debug port (dbg_*) lets a test bench load and inspect the store while the
// processor is idle; a debug write takes priority over the cluster ports.
module xmt_l2_dmem
  import xmt_pkg::*;
#(
  parameter int unsigned N_CL    = 32,
  parameter int unsigned WORDS   = 32768,
  parameter int unsigned LATENCY = 100
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CL-1:0] req,
  input  logic [N_CL-1:0] we,
  input  word_t           addr  [N_CL],
  input  word_t           wdata [N_CL],
  output logic [N_CL-1:0] gnt,
  output logic [N_CL-1:0] rvalid,
  output word_t           rdata [LINE_W],
  input  logic            dbg_we,
  input  word_t           dbg_addr,
  input  word_t           dbg_wdata,
  output word_t           dbg_rdata,
  output logic [31:0]     reads,
  output logic [31:0]     writes
);
  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned CW = (N_CL > 1) ? $clog2(N_CL) : 1;

  word_t mem [WORDS];

  logic [CW-1:0] rr;                // requester with top priority this cycle
  logic          acc;
  logic [CW-1:0] who;

  always_comb begin
    acc = 1'b0;
    who = '0;
    gnt = '0;
    if (!dbg_we) begin
      for (int k = 0; k < int'(N_CL); k++) begin
        automatic int unsigned c = (int'(rr) + k) % N_CL;
        if (!acc && req[c]) begin acc = 1'b1; who = CW'(c); end
      end
      if (acc) gnt[who] = 1'b1;
    end
  end

  // Read pipeline: valid, requester and line, LATENCY stages.
  logic          pv [LATENCY];
  logic [CW-1:0] pc [LATENCY];
  word_t         pd [LATENCY][LINE_W];

  logic [AW-1:0] acc_a;
  assign acc_a = AW'(addr[who]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0; reads <= '0; writes <= '0;
      for (int s = 0; s < int'(LATENCY); s++) begin pv[s] <= 1'b0; pc[s] <= '0; end
    end else begin
      pv[0] <= acc && !we[who];
      pc[0] <= who;
      for (int s = 1; s < int'(LATENCY); s++) begin pv[s] <= pv[s-1]; pc[s] <= pc[s-1]; end
      if (acc) begin
        rr <= (who == CW'(N_CL - 1)) ? '0 : who + CW'(1);
        if (we[who]) writes <= writes + 32'd1;
        else         reads  <= reads + 32'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int w = 0; w < int'(LINE_W); w++) pd[0][w] <= mem[acc_a + AW'(w)];
    for (int s = 1; s < int'(LATENCY); s++) pd[s] <= pd[s-1];
    if (dbg_we)                 mem[AW'(dbg_addr)] <= dbg_wdata;
    else if (acc && we[who])    mem[acc_a] <= wdata[who];
  end

  always_comb begin
    rvalid = '0;
    if (pv[LATENCY-1]) rvalid[pc[LATENCY-1]] = 1'b1;
  end
  assign rdata     = pd[LATENCY-1];
  assign dbg_rdata = mem[AW'(dbg_addr)];
endmodule
