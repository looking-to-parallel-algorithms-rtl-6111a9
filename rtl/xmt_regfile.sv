// xmt_regfile: the local register file of a cluster, banked per TCU.
//
// Each of the N_TCU thread control units owns one bank of NLREG registers
// (names $32..$63, t0..t31). Threads never read each other's registers, so the
// file is multiported simply by banking: every bank has two combinational read
// ports and one write port, and no two TCUs contend. Index inputs are the
// 5-bit local register number. Banks reset to zero.
module xmt_regfile
  import xmt_pkg::*;
#(
  parameter int unsigned N_TCU = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [4:0]        ra_idx [N_TCU],
  input  logic [4:0]        rb_idx [N_TCU],
  output word_t             ra_data[N_TCU],
  output word_t             rb_data[N_TCU],
  input  logic [N_TCU-1:0]  we,
  input  logic [4:0]        w_idx  [N_TCU],
  input  word_t             w_data [N_TCU]
);
  word_t bank [N_TCU][NLREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < int'(N_TCU); t++)
        for (int r = 0; r < int'(NLREG); r++) bank[t][r] <= '0;
    end else begin
      for (int t = 0; t < int'(N_TCU); t++)
        if (we[t]) bank[t][w_idx[t]] <= w_data[t];
    end
  end

  always_comb begin
    for (int t = 0; t < int'(N_TCU); t++) begin
      ra_data[t] = bank[t][ra_idx[t]];
      rb_data[t] = bank[t][rb_idx[t]];
    end
  end
endmodule
