// tb_xmt_ps_coord: prefix-sum coordinator with 8 TCUs. Random bursts of
// prefix-sums on a few bases and global writes; a model replays every bus
// message in order, computes each participant's result by static ranking and
// checks that every request is answered exactly once with the right sum, that
// the master registers match, that an uncontended request appears on the bus
// PS_LATENCY cycles after it arrives, and that several requests on one base are
// served by one message.
module tb_xmt_ps_coord;
  import xmt_pkg::*;
  localparam int T = 8, LAT = 3;
  logic clk = 0, rst_n = 0;
  cm_req_t req [T];
  logic spawn_req, spawn_ack = 0, sj_valid = 0;
  word_t spawn_pc, sj_data = 0;
  msg_kind_e sj_kind = MSG_NONE;
  logic g_wr_en, g_ps_en;
  greg_t g_wr_idx, g_ps_idx;
  word_t g_wr_data, g_ps_add;
  bcast_t bus;
  logic [T-1:0] bus_part, bus_val;
  logic [31:0] ps_groups, ps_multi;
  word_t rd_data;
  greg_t rd_idx = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  xmt_ps_coord #(.N_TOT(T), .PS_LATENCY(LAT)) dut (.clk, .rst_n, .req, .spawn_req, .spawn_pc,
    .spawn_ack, .sj_valid, .sj_kind, .sj_data, .g_wr_en, .g_wr_idx, .g_wr_data, .g_ps_en,
    .g_ps_idx, .g_ps_add, .bus, .bus_part, .bus_val, .ps_groups, .ps_multi);
  xmt_greg_coord u_g (.clk, .rst_n, .wr_en(g_wr_en), .wr_idx(g_wr_idx), .wr_data(g_wr_data),
    .ps_en(g_ps_en), .ps_idx(g_ps_idx), .ps_add(g_ps_add), .rd_idx, .rd_data);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  // model state
  word_t model [32];
  bit    outstanding [T];
  cm_req_t sent [T];
  int    answered = 0, issued = 0;

  always @(posedge clk) if (rst_n) begin
    #2;
    case (bus.kind)
      MSG_PS: begin
        automatic word_t run = model[bus.greg];
        for (int t = 0; t < T; t++) if (bus_part[t]) begin
          chk(outstanding[t] && sent[t].kind == RQ_PS && sent[t].greg == bus.greg, "unexpected participant");
          chk(bus_val[t] == sent[t].data[0], "value bit");
          run += word_t'(bus_val[t]);
          outstanding[t] = 0;
          answered++;
        end
        if (bus.greg != 0) model[bus.greg] = run;
      end
      MSG_GWR: begin
        chk(outstanding[bus.src] && sent[bus.src].kind == RQ_GWR && sent[bus.src].greg == bus.greg
            && sent[bus.src].data == bus.data, "write message");
        outstanding[bus.src] = 0;
        answered++;
        if (bus.greg != 0) model[bus.greg] = bus.data;
      end
      default: ;
    endcase
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    for (int t = 0; t < T; t++) begin req[t] = '0; outstanding[t] = 0; end
    for (int r = 0; r < 32; r++) model[r] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // latency of one lone request
    req[3] = '{kind: RQ_PS, greg: 5, data: 1}; sent[3] = req[3]; outstanding[3] = 1; issued++;
    @(posedge clk); #1;
    req[3] = '0;
    lat = 1;
    while (bus.kind != MSG_PS && lat < 20) begin @(posedge clk); #1; lat++; end
    chk(lat == LAT, $sformatf("latency %0d, expected %0d", lat, LAT));
    @(posedge clk); #1;
    // random traffic
    for (int i = 0; i < 600; i++) begin
      for (int t = 0; t < T; t++) begin
        req[t] = '0;
        if (!outstanding[t] && ($urandom % 3 == 0)) begin
          req[t].kind = ($urandom % 4 == 0) ? RQ_GWR : RQ_PS;
          req[t].greg = 1 + $urandom % 3;
          req[t].data = (req[t].kind == RQ_PS) ? word_t'($urandom % 2) : word_t'($urandom);
          sent[t] = req[t]; outstanding[t] = 1; issued++;
        end
      end
      @(posedge clk); #1;
    end
    for (int t = 0; t < T; t++) req[t] = '0;
    repeat (40) @(posedge clk);
    #3;
    chk(answered == issued, $sformatf("answered %0d of %0d", answered, issued));
    for (int r = 0; r < 8; r++) begin
      rd_idx = r; #1;
      chk(rd_data == model[r], $sformatf("g%0d = %0d, model %0d", r, rd_data, model[r]));
    end
    chk(ps_multi > 0, "no shared prefix-sum group");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
