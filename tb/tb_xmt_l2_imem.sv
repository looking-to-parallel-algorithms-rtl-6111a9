// tb_xmt_l2_imem: level-2 instruction store with 3 requesters and LATENCY 5.
// Loads a program through the load port, then random line requests from all
// requesters. Checks one grant per cycle, round-robin service, and that each
// line comes back to its requester exactly LATENCY cycles after the grant with
// the loaded words.
module tb_xmt_l2_imem;
  import xmt_pkg::*;
  localparam int C = 3, LAT = 5, W = 512;
  logic clk = 0, rst_n = 0, ld_we = 0;
  logic [C-1:0] req = '0, gnt, rvalid;
  word_t line[C], rdata[LINE_W], ld_addr = 0, ld_data = 0;
  word_t model [W];
  int checks = 0, failures = 0, cyc = 0;
  typedef struct { int due; int c; word_t a; } pend_t;
  pend_t pend [$];
  int waited [C];

  always #5 clk = ~clk;
  xmt_l2_imem #(.N_CL(C), .WORDS(W), .LATENCY(LAT)) dut (.clk, .rst_n, .req, .line, .gnt, .rvalid,
    .rdata, .ld_we, .ld_addr, .ld_data);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < C; c++) begin line[c] = 0; waited[c] = 0; end
    for (int i = 0; i < W; i++) begin
      model[i] = $urandom;
      ld_we = 1; ld_addr = i; ld_data = model[i];
      @(posedge clk); #1;
    end
    ld_we = 0;
    #1 rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      for (int c = 0; c < C; c++) if (!req[c] && $urandom % 2 == 0) begin
        req[c] = 1; line[c] = ($urandom % (W / LINE_W)) * LINE_W;
      end
      #1;
      chk($countones(gnt) <= 1 && (gnt & ~req) == 0, "one grant to a requester");
      for (int c = 0; c < C; c++) begin
        if (req[c] && !gnt[c]) waited[c]++; else waited[c] = 0;
        chk(waited[c] <= C, "round robin");
      end
      if (pend.size() > 0 && pend[0].due == cyc) begin
        chk(rvalid == (C'(1) << pend[0].c), "rvalid to the requester");
        for (int w = 0; w < LINE_W; w++) chk(rdata[w] == model[pend[0].a + w], "line data");
        void'(pend.pop_front());
      end else chk(rvalid == 0, "spurious rvalid");
      for (int c = 0; c < C; c++) if (gnt[c]) pend.push_back('{cyc + LAT, c, line[c]});
      @(posedge clk); #1;
      cyc++;
      for (int c = 0; c < C; c++) if (gnt[c]) req[c] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
