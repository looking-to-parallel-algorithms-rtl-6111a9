// tb_xmt_icache: instruction cache with 4 fetch ports against a level-2 model
// (8-cycle line return). Random pcs per port over a range twice the cache
// size: every hit must return the program word; a missing line must be
// fetched and then hit; several ports can hit in one cycle.
module tb_xmt_icache;
  import xmt_pkg::*;
  localparam int T = 4, LINES = 16;
  logic clk = 0, rst_n = 0, l2_req, l2_gnt = 0, l2_rvalid = 0;
  logic [T-1:0] f_req = '0, f_hit;
  word_t f_pc[T], f_instr[T], l2_line, l2_rdata[LINE_W];
  logic [31:0] misses;
  int checks = 0, failures = 0, multi_hit = 0;

  always #5 clk = ~clk;
  xmt_icache #(.N_TCU(T), .LINES(LINES)) dut (.clk, .rst_n, .f_req, .f_pc, .f_hit, .f_instr,
    .l2_req, .l2_line, .l2_gnt, .l2_rvalid, .l2_rdata, .misses);

  function automatic word_t prog(input word_t wa);
    return wa * 32'h9E37_79B9 + 32'h1234;
  endfunction

  initial begin
    for (int w = 0; w < LINE_W; w++) l2_rdata[w] = 0;
    forever begin
      @(posedge clk); #1;
      l2_gnt = 0; l2_rvalid = 0;
      if (l2_req) begin
        automatic word_t a = l2_line;
        l2_gnt = 1;
        @(posedge clk); #1; l2_gnt = 0;
        repeat (7) @(posedge clk);
        #1;
        for (int w = 0; w < LINE_W; w++) l2_rdata[w] = prog(a + w);
        l2_rvalid = 1;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int served [T];
    for (int t = 0; t < T; t++) begin f_pc[t] = 0; served[t] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < T; t++) begin f_req[t] = 1; f_pc[t] = ($urandom % (2 * LINES * LINE_W)) * 4; end
    for (int c = 0; c < 30000 && served[0] + served[1] + served[2] + served[3] < 1200; c++) begin
      #1;
      if ($countones(f_hit) > 1) multi_hit++;
      for (int t = 0; t < T; t++) if (f_hit[t]) begin
        checks++;
        if (f_instr[t] != prog(f_pc[t] / 4)) begin
          failures++;
          if (failures < 5) $display("FAIL port %0d pc %h: %h", t, f_pc[t], f_instr[t]);
        end
      end
      @(posedge clk); #1;
      for (int t = 0; t < T; t++) if (f_hit[t] || $urandom % 50 == 0) begin
        served[t]++;
        // mostly sequential, sometimes a jump
        f_pc[t] = ($urandom % 8 == 0) ? ($urandom % (2 * LINES * LINE_W)) * 4 : (f_pc[t] + 4) % (2 * LINES * LINE_W * 4);
      end
    end
    checks++;
    if (!(misses > 0 && multi_hit > 0)) begin failures++; $display("FAIL: misses %0d multi %0d", misses, multi_hit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
