// xmt_muldiv: non-pipelined multiply / divide unit of an XMT cluster.
//
// A multiply takes MUL_CYCLES cycles and a divide DIV_CYCLES cycles from the
// cycle the operation is accepted to the cycle done pulses; the unit is busy
// (start is ignored) in between, since neither operation is pipelined. The
// latencies 2 and 40 are the simulated cluster's. The multiply returns the low
// word of the product. The divide is unsigned and iterative (restoring, one
// quotient bit per cycle for XLEN cycles, then idle until the 40-cycle mark);
// division by zero gives all ones. Signedness and the divider structure are
// this design's choice.
//
// Interface: start/is_div/a/b when !busy; done is a one-cycle pulse with y.
module xmt_muldiv
  import xmt_pkg::*;
#(
  parameter int unsigned MUL_CYCLES = 2,
  parameter int unsigned DIV_CYCLES = 40
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  is_div,
  input  word_t a,
  input  word_t b,
  output logic  busy,
  output logic  done,
  output word_t y
);
  logic [7:0]        cnt;
  logic              div_q;
  word_t             prod_q;
  word_t             quot_q, rem_q, dvd_q, dvs_q;
  logic [5:0]        step_q;

  assign busy = (cnt != 0);

  // One restoring-division step.
  word_t rem_shift;
  logic  fits;
  always_comb begin
    rem_shift = {rem_q[XLEN-2:0], dvd_q[XLEN-1]};
    fits      = ({rem_q[XLEN-1], rem_shift} >= {1'b0, dvs_q});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; div_q <= 1'b0; prod_q <= '0; quot_q <= '0; rem_q <= '0;
      dvd_q <= '0; dvs_q <= '0; step_q <= '0; done <= 1'b0; y <= '0;
    end else begin
      done <= 1'b0;
      if (cnt == 0) begin
        if (start) begin
          div_q  <= is_div;
          cnt    <= 8'(is_div ? DIV_CYCLES : MUL_CYCLES);
          prod_q <= a * b;
          dvd_q  <= a;
          dvs_q  <= b;
          rem_q  <= '0;
          quot_q <= '0;
          step_q <= '0;
        end
      end else begin
        cnt <= cnt - 8'd1;
        if (div_q && step_q < 6'(XLEN)) begin
          step_q <= step_q + 6'd1;
          dvd_q  <= dvd_q << 1;
          rem_q  <= fits ? rem_shift - dvs_q : rem_shift;
          quot_q <= {quot_q[XLEN-2:0], fits};
        end
        if (cnt == 8'd1) begin
          done <= 1'b1;
          y    <= div_q ? ((dvs_q == '0) ? '1 : quot_q) : prod_q;
        end
      end
    end
  end
endmodule
