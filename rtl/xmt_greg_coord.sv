// xmt_greg_coord: master copy of the global registers g0..g31.
//
// The global register coordinator lives in the central management. A register
// changes either because a thread writes it (wr_en) or because a prefix-sum
// group adds to it (ps_en adds ps_add to register ps_idx). Both kinds of change
// are also broadcast to the clusters, whose interface units keep their own
// copies, so that threads read global registers locally. g0 is hard-wired to
// zero. At most one change per cycle is applied; the caller ensures that
// (the prefix-sum coordinator issues one bus message per cycle). All registers
// reset to zero.
module xmt_greg_coord
  import xmt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en,
  input  greg_t wr_idx,
  input  word_t wr_data,
  input  logic  ps_en,
  input  greg_t ps_idx,
  input  word_t ps_add,
  input  greg_t rd_idx,
  output word_t rd_data
);
  word_t regs [NGREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NGREG); r++) regs[r] <= '0;
    end else if (wr_en && wr_idx != '0) begin
      regs[wr_idx] <= wr_data;
    end else if (ps_en && ps_idx != '0) begin
      regs[ps_idx] <= regs[ps_idx] + ps_add;
    end
  end

  assign rd_data = regs[rd_idx];

  // Rule: one change per cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && ps_en));
endmodule
