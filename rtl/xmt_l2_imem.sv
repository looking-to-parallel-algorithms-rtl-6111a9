// xmt_l2_imem: the shared level-2 instruction store behind the clusters'
// instruction caches.
//
// WORDS 32-bit instruction words, modelled as storage that always hits (the
// program is loaded through the load port before the processor starts). Each
// cluster has one line-request port (req held until gnt, word address of the
// line's first word); one request is accepted per cycle, round robin, and the
// LINE_W-word line comes back LATENCY cycles later on the requester's rvalid
// with rdata.
module xmt_l2_imem
  import xmt_pkg::*;
#(
  parameter int unsigned N_CL    = 32,
  parameter int unsigned WORDS   = 4096,
  parameter int unsigned LATENCY = 100
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CL-1:0] req,
  input  word_t           line  [N_CL],
  output logic [N_CL-1:0] gnt,
  output logic [N_CL-1:0] rvalid,
  output word_t           rdata [LINE_W],
  input  logic            ld_we,
  input  word_t           ld_addr,
  input  word_t           ld_data
);
  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned CW = (N_CL > 1) ? $clog2(N_CL) : 1;

  word_t mem [WORDS];

  logic [CW-1:0] rr;
  logic          acc;
  logic [CW-1:0] who;

  always_comb begin
    acc = 1'b0;
    who = '0;
    gnt = '0;
    for (int k = 0; k < int'(N_CL); k++) begin
      automatic int unsigned c = (int'(rr) + k) % N_CL;
      if (!acc && req[c]) begin acc = 1'b1; who = CW'(c); end
    end
    if (acc) gnt[who] = 1'b1;
  end

  logic          pv [LATENCY];
  logic [CW-1:0] pc [LATENCY];
  word_t         pd [LATENCY][LINE_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      for (int s = 0; s < int'(LATENCY); s++) begin pv[s] <= 1'b0; pc[s] <= '0; end
    end else begin
      pv[0] <= acc;
      pc[0] <= who;
      for (int s = 1; s < int'(LATENCY); s++) begin pv[s] <= pv[s-1]; pc[s] <= pc[s-1]; end
      if (acc) rr <= (who == CW'(N_CL - 1)) ? '0 : who + CW'(1);
    end
  end

  always_ff @(posedge clk) begin
    for (int w = 0; w < int'(LINE_W); w++) pd[0][w] <= mem[AW'(line[who]) + AW'(w)];
    for (int s = 1; s < int'(LATENCY); s++) pd[s] <= pd[s-1];
    if (ld_we) mem[AW'(ld_addr)] <= ld_data;
  end

  always_comb begin
    rvalid = '0;
    if (pv[LATENCY-1]) rvalid[pc[LATENCY-1]] = 1'b1;
  end
  assign rdata = pd[LATENCY-1];
endmodule
