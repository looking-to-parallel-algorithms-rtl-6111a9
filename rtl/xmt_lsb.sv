// xmt_lsb: a cluster's load-store buffer.
//
// A DEPTH-entry FIFO (4 slots in the simulated cluster) of memory operations
// issued by the cluster's TCUs. At most one operation enters per cycle
// (enq when !full). The oldest entry is presented to the data cache and held
// there until the cache answers; the answer is then returned to the TCU that
// issued it (done with done_tcu and, for a load, done_data) and the entry
// leaves. Since each TCU has one operation outstanding and the FIFO keeps
// order, a thread's loads and stores reach memory in program order.
module xmt_lsb
  import xmt_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned TIDW  = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enq,
  input  logic [TIDW-1:0] enq_tcu,
  input  logic            enq_we,
  input  word_t           enq_addr,
  input  word_t           enq_wdata,
  output logic            full,
  // data cache side
  output logic            dc_req,
  output logic            dc_we,
  output word_t           dc_addr,
  output word_t           dc_wdata,
  input  logic            dc_resp,
  input  word_t           dc_rdata,
  // completion
  output logic            done,
  output logic [TIDW-1:0] done_tcu,
  output word_t           done_data
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic [TIDW-1:0] tcu;
    logic            we;
    word_t           addr;
    word_t           wdata;
  } lsb_entry_t;

  lsb_entry_t    q [DEPTH];
  logic [PW-1:0] head, tail;
  logic [PW:0]   count;

  assign full     = (count == (PW+1)'(DEPTH));
  assign dc_req   = (count != '0);
  assign dc_we    = q[head].we;
  assign dc_addr  = q[head].addr;
  assign dc_wdata = q[head].wdata;

  assign done      = dc_resp && (count != '0);
  assign done_tcu  = q[head].tcu;
  assign done_data = dc_rdata;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; count <= '0;
      for (int i = 0; i < int'(DEPTH); i++) q[i] <= '0;
    end else begin
      if (enq && !full) begin
        q[tail] <= '{tcu: enq_tcu, we: enq_we, addr: enq_addr, wdata: enq_wdata};
        tail    <= inc(tail);
      end
      if (done) head <= inc(head);
      count <= count + (PW+1)'(enq && !full) - (PW+1)'(done);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(enq && full));
endmodule
