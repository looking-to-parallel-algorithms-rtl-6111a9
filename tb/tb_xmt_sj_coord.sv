// tb_xmt_sj_coord: spawn/join coordinator. Checks that a spawn request is
// taken at once with a SPAWN message carrying its pc, that the join lines are
// ignored for MIN_WAIT cycles (all_joined held high from the start), that END
// follows as soon as they are honoured, and that a late join is waited for.
module tb_xmt_sj_coord;
  import xmt_pkg::*;
  localparam int MW = 6;
  logic clk = 0, rst_n = 0, spawn_req = 0, spawn_ack, all_joined = 1, msg_valid, parallel;
  word_t spawn_pc = 0, msg_data;
  msg_kind_e msg_kind;
  logic [31:0] spawns;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  xmt_sj_coord #(.MIN_WAIT(MW)) dut (.clk, .rst_n, .spawn_req, .spawn_pc, .spawn_ack, .all_joined,
                                     .msg_valid, .msg_kind, .msg_data, .parallel, .spawns);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      chk(!parallel && !msg_valid, "serial and quiet");
      spawn_req = 1; spawn_pc = 32'h100 + r * 16; all_joined = 1;
      #1;
      chk(spawn_ack && msg_valid && msg_kind == MSG_SPAWN && msg_data == spawn_pc, "spawn message");
      @(posedge clk); #1;
      spawn_req = 0;
      if (r == 1) all_joined = 0;              // threads still running
      n = 0;
      while (n < 200) begin
        if (r == 1 && n == 30) begin all_joined = 1; #1; end
        if (msg_valid && msg_kind == MSG_END) break;
        chk(parallel, $sformatf("parallel mode while waiting r=%0d n=%0d", r, n));
        @(posedge clk); #1;
        n++;
      end
      if (r == 1) chk(n == 30, $sformatf("END %0d cycles after spawn, expected 30", n));
      else        chk(n == MW, $sformatf("END %0d cycles after spawn, expected %0d", n, MW));
      @(posedge clk); #1;
      chk(!parallel && spawns == r + 1, "back to serial, spawn counted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
