// xmt_link: a multi-cycle extra-cluster wire.
//
// Every path between a cluster and the central management takes more than one
// cycle. This register chain of DELAY stages (DELAY >= 1) models such a path:
// what enters in cycle n leaves in cycle n + DELAY. All stages reset to zero,
// so an idle channel carries zeros. WIDTH is the number of bits carried.
module xmt_link #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DELAY = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] stage [DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DELAY); i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < int'(DELAY); i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DELAY-1];
endmodule
