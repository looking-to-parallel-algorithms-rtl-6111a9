// xmt_sj_coord: the central spawn/join coordinator.
//
// In serial mode only TCU 0 runs. When it executes spawn, its request reaches
// this unit (spawn_req with the thread start pc); the unit then places a SPAWN
// message on the broadcast bus (msg_valid; it always has the bus), which
// activates every TCU at that pc, and enters parallel mode. The clusters
// report completion on one join line each (the AND of their TCUs' joined
// flags), which reach this unit through multi-cycle wires. Because those lines
// still show the state from before the spawn for a while, the unit ignores
// them for MIN_WAIT cycles after the spawn; then, as soon as all_joined is
// high, it places an END message on the bus and returns to serial mode. The
// wait is why a very short spawn block costs as much as a slightly longer one.
// MIN_WAIT must cover bus latency + two link delays + the TCU's reaction; the
// top sets it from those.
//
// spawn_ack pulses in the cycle a spawn request is taken. spawns counts
// completed spawn blocks.
module xmt_sj_coord
  import xmt_pkg::*;
#(
  parameter int unsigned MIN_WAIT = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        spawn_req,
  input  word_t       spawn_pc,
  output logic        spawn_ack,
  input  logic        all_joined,
  output logic        msg_valid,
  output msg_kind_e   msg_kind,
  output word_t       msg_data,
  output logic        parallel,
  output logic [31:0] spawns
);
  typedef enum logic [1:0] { SJ_SERIAL, SJ_WAIT, SJ_PAR } sj_state_e;
  sj_state_e   state;
  logic [15:0] cnt;

  always_comb begin
    spawn_ack = 1'b0;
    msg_valid = 1'b0;
    msg_kind  = MSG_NONE;
    msg_data  = '0;
    unique case (state)
      SJ_SERIAL: if (spawn_req) begin
        spawn_ack = 1'b1;
        msg_valid = 1'b1;
        msg_kind  = MSG_SPAWN;
        msg_data  = spawn_pc;
      end
      SJ_PAR: if (all_joined) begin
        msg_valid = 1'b1;
        msg_kind  = MSG_END;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SJ_SERIAL; cnt <= '0; spawns <= '0;
    end else begin
      unique case (state)
        SJ_SERIAL: if (spawn_req) begin state <= SJ_WAIT; cnt <= 16'(MIN_WAIT); end
        SJ_WAIT:   begin
          cnt <= cnt - 16'd1;
          if (cnt <= 16'd1) state <= SJ_PAR;
        end
        SJ_PAR:    if (all_joined) begin state <= SJ_SERIAL; spawns <= spawns + 32'd1; end
        default:   state <= SJ_SERIAL;
      endcase
    end
  end

  assign parallel = (state != SJ_SERIAL);
endmodule
