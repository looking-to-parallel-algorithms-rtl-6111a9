// tb_xmt_ps_if: cluster interface unit of cluster 1 (TCUs 4..7) in an 8-TCU
// machine. Drives bus messages directly: global writes (copy and write
// acknowledge), prefix-sum groups with random participation (each local
// participant must get the base plus the increments of all lower-numbered
// participants, and the copy must advance by the sum), spawn and end.
module tb_xmt_ps_if;
  import xmt_pkg::*;
  localparam int T = 8, L = 4, CID = 1;
  logic clk = 0, rst_n = 0;
  bcast_t bus = '0;
  logic [T-1:0] bus_part = '0, bus_val = '0;
  greg_t ga_idx[L], gb_idx[L];
  word_t ga_data[L], gb_data[L], ps_value[L], spawn_pc;
  logic [L-1:0] ps_done, gwr_ack;
  logic spawn_go, end_go;
  word_t model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  xmt_ps_if #(.N_TOT(T), .N_TCU(L), .CID(CID)) dut (.clk, .rst_n, .bus, .bus_part, .bus_val,
    .ga_idx, .gb_idx, .ga_data, .gb_data, .ps_done, .ps_value, .gwr_ack, .spawn_go, .spawn_pc, .end_go);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) model[r] = 0;
    for (int t = 0; t < L; t++) begin ga_idx[t] = 0; gb_idx[t] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 800; i++) begin
      automatic int k = $urandom % 10;
      automatic word_t exp_v [L];
      automatic logic [L-1:0] exp_done = '0, exp_ack = '0;
      bus = '0; bus_part = '0; bus_val = '0;
      if (k < 3) begin
        bus.kind = MSG_GWR; bus.greg = $urandom % 6; bus.data = $urandom; bus.src = 16'($urandom % T);
        if (bus.src >= CID * L && bus.src < CID * L + L) exp_ack[bus.src - CID * L] = 1;
      end else if (k < 8) begin
        automatic word_t run;
        bus.kind = MSG_PS; bus.greg = 1 + $urandom % 5;
        bus_part = T'($urandom); bus_val = T'($urandom) & bus_part;
        run = model[bus.greg];
        for (int g = 0; g < T; g++) begin
          if (g >= CID * L && g < CID * L + L && bus_part[g]) begin
            exp_done[g - CID * L] = 1; exp_v[g - CID * L] = run;
          end
          if (bus_part[g]) run += word_t'(bus_val[g]);
        end
      end else if (k == 8) begin
        bus.kind = MSG_SPAWN; bus.data = $urandom;
      end else begin
        bus.kind = MSG_END;
      end
      @(posedge clk); #1;
      chk(ps_done == exp_done, $sformatf("ps_done %b, expected %b", ps_done, exp_done));
      chk(gwr_ack == exp_ack, "gwr_ack");
      for (int t = 0; t < L; t++)
        if (exp_done[t]) chk(ps_value[t] == exp_v[t], $sformatf("ps_value[%0d] = %0d, expected %0d", t, ps_value[t], exp_v[t]));
      chk(spawn_go == (bus.kind == MSG_SPAWN) && (!spawn_go || spawn_pc == bus.data), "spawn_go");
      chk(end_go == (bus.kind == MSG_END), "end_go");
      if (bus.kind == MSG_GWR && bus.greg != 0) model[bus.greg] = bus.data;
      if (bus.kind == MSG_PS) model[bus.greg] += word_t'($countones(bus_part & bus_val));
      for (int t = 0; t < L; t++) begin ga_idx[t] = $urandom % 6; gb_idx[t] = $urandom % 6; end
      #1;
      for (int t = 0; t < L; t++)
        chk(ga_data[t] == model[ga_idx[t]] && gb_data[t] == model[gb_idx[t]], "copy read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
