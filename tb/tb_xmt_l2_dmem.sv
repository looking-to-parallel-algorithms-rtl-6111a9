// tb_xmt_l2_dmem: level-2 data store with 4 requesters and LATENCY 6.
// Loads through the debug port, then random line reads and word writes from
// all requesters at once. Checks: one grant per cycle, round-robin fairness
// (no requester waits more than N_CL cycles), each read line returned to its
// requester exactly LATENCY cycles after its grant with the contents as of
// the grant, writes visible through the debug port.
module tb_xmt_l2_dmem;
  import xmt_pkg::*;
  localparam int C = 4, LAT = 6, W = 1024;
  logic clk = 0, rst_n = 0, dbg_we = 0;
  logic [C-1:0] req = '0, we = '0, gnt, rvalid;
  word_t addr[C], wdata[C], rdata[LINE_W], dbg_addr = 0, dbg_wdata = 0, dbg_rdata;
  logic [31:0] reads, writes;
  word_t model [W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  xmt_l2_dmem #(.N_CL(C), .WORDS(W), .LATENCY(LAT)) dut (.clk, .rst_n, .req, .we, .addr, .wdata,
    .gnt, .rvalid, .rdata, .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata, .reads, .writes);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  typedef struct { int due; int c; word_t line [LINE_W]; } pend_t;
  pend_t pend [$];
  int waited [C];
  int cyc = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < C; c++) begin addr[c] = 0; wdata[c] = 0; waited[c] = 0; end
    for (int i = 0; i < W; i++) begin
      model[i] = $urandom;
      dbg_we = 1; dbg_addr = i; dbg_wdata = model[i];
      @(posedge clk); #1;
    end
    dbg_we = 0;
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      // new requests where idle
      for (int c = 0; c < C; c++) if (!req[c] && $urandom % 2 == 0) begin
        req[c] = 1; we[c] = ($urandom % 3 == 0);
        addr[c] = we[c] ? $urandom % W : ($urandom % (W / LINE_W)) * LINE_W;
        wdata[c] = $urandom;
      end
      #1;
      chk($countones(gnt) <= 1 && (gnt & ~req) == 0, "one grant to a requester");
      for (int c = 0; c < C; c++) begin
        if (req[c] && !gnt[c]) waited[c]++; else waited[c] = 0;
        chk(waited[c] <= C, "round robin");
      end
      // returns due now (for grants LAT cycles ago)
      if (pend.size() > 0 && pend[0].due == cyc) begin
        chk(rvalid == (C'(1) << pend[0].c), "rvalid to the requester");
        for (int w = 0; w < LINE_W; w++) chk(rdata[w] == pend[0].line[w], "line data");
        void'(pend.pop_front());
      end else chk(rvalid == 0, "spurious rvalid");
      for (int c = 0; c < C; c++) if (gnt[c]) begin
        if (we[c]) model[addr[c]] = wdata[c];
        else begin
          automatic pend_t p;
          p.due = cyc + LAT; p.c = c;
          for (int w = 0; w < LINE_W; w++) p.line[w] = model[addr[c] + w];
          pend.push_back(p);
        end
      end
      @(posedge clk); #1;
      cyc++;
      for (int c = 0; c < C; c++) if (gnt[c]) req[c] = 0;
    end
    // gnt was sampled before the edge; clear granted requests after it
    req = '0;
    repeat (LAT + 2) @(posedge clk);
    for (int i = 0; i < W; i += 7) begin
      dbg_addr = i; #1;
      chk(dbg_rdata == model[i], "final contents");
    end
    chk(reads > 0 && writes > 0, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
