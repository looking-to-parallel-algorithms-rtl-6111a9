// xmt_ps_if: a cluster's interface (I/F) unit to the central management.
//
// It listens to the broadcast bus and keeps the cluster's copy of the global
// registers, so that the cluster's TCUs read global registers locally (two
// combinational read ports per TCU; g0 reads zero). Every global-register
// write is broadcast, so the copy never goes stale and the base of a
// prefix-sum is never sent again with its result.
//
// For a prefix-sum message on base b with participation bits P and value bits
// V (one per TCU of the whole machine, TCU g ranked by its number), a local TCU
// g with P[g] set receives
//     copy[b] + popcount(P & V & ((1 << g) - 1))
// i.e. the base plus the contributions of all lower-numbered participants, and
// the copy advances by popcount(P & V). Every interface computes the same
// update, so all copies agree, and each computes its own TCUs' results.
//
// Per local TCU t it raises, for one cycle: ps_done[t] with ps_value[t];
// gwr_ack[t] when the broadcast of that TCU's own global write passes. To the
// whole cluster it raises spawn_go (with spawn_pc) and end_go.
module xmt_ps_if
  import xmt_pkg::*;
#(
  parameter int unsigned N_TOT = 128,
  parameter int unsigned N_TCU = 4,
  parameter int unsigned CID   = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bcast_t           bus,
  input  logic [N_TOT-1:0] bus_part,
  input  logic [N_TOT-1:0] bus_val,
  input  greg_t            ga_idx [N_TCU],
  input  greg_t            gb_idx [N_TCU],
  output word_t            ga_data[N_TCU],
  output word_t            gb_data[N_TCU],
  output logic [N_TCU-1:0] ps_done,
  output word_t            ps_value[N_TCU],
  output logic [N_TCU-1:0] gwr_ack,
  output logic             spawn_go,
  output word_t            spawn_pc,
  output logic             end_go
);
  word_t copy [NGREG];

  logic [N_TOT-1:0] contrib;
  assign contrib = bus_part & bus_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NGREG); r++) copy[r] <= '0;
      ps_done  <= '0;
      gwr_ack  <= '0;
      spawn_go <= 1'b0;
      end_go   <= 1'b0;
      spawn_pc <= '0;
      for (int t = 0; t < int'(N_TCU); t++) ps_value[t] <= '0;
    end else begin
      ps_done  <= '0;
      gwr_ack  <= '0;
      spawn_go <= 1'b0;
      end_go   <= 1'b0;
      unique case (bus.kind)
        MSG_GWR: begin
          if (bus.greg != '0) copy[bus.greg] <= bus.data;
          for (int t = 0; t < int'(N_TCU); t++)
            if (bus.src == 16'(CID * N_TCU + t)) gwr_ack[t] <= 1'b1;
        end
        MSG_PS: begin
          if (bus.greg != '0) copy[bus.greg] <= copy[bus.greg] + word_t'($countones(contrib));
          for (int t = 0; t < int'(N_TCU); t++) begin
            automatic int unsigned g = CID * N_TCU + t;
            automatic logic [N_TOT-1:0] lower = (N_TOT'(1) << g) - N_TOT'(1);
            if (bus_part[g]) begin
              ps_done[t]  <= 1'b1;
              ps_value[t] <= ((bus.greg == '0) ? '0 : copy[bus.greg])
                             + word_t'($countones(contrib & lower));
            end
          end
        end
        MSG_SPAWN: begin spawn_go <= 1'b1; spawn_pc <= bus.data; end
        MSG_END:   end_go <= 1'b1;
        default: ;
      endcase
    end
  end

  always_comb begin
    for (int t = 0; t < int'(N_TCU); t++) begin
      ga_data[t] = (ga_idx[t] == '0) ? '0 : copy[ga_idx[t]];
      gb_data[t] = (gb_idx[t] == '0) ? '0 : copy[gb_idx[t]];
    end
  end
endmodule
