// tb_xmt_dcache: data cache against a level-2 model (random grant delay,
// 5-cycle line return) holding a reference memory. Random loads and stores
// over a small address range: every load must return the reference value;
// stores must be written through (the model's memory is the reference);
// a repeated load must hit (answered the next cycle, no level-2 request);
// a store miss must not fetch a line; and after inval every load misses.
module tb_xmt_dcache;
  import xmt_pkg::*;
  logic clk = 0, rst_n = 0, req = 0, we = 0, resp, inval = 0;
  word_t addr = 0, wdata = 0, resp_data;
  logic l2_req, l2_we, l2_gnt = 0, l2_rvalid = 0;
  word_t l2_addr, l2_wdata, l2_rdata[LINE_W];
  logic [31:0] hits, misses;
  word_t mem [1024];
  int checks = 0, failures = 0, l2_reads = 0;

  always #5 clk = ~clk;
  xmt_dcache #(.SETS(8)) dut (.clk, .rst_n, .req, .we, .addr, .wdata, .resp, .resp_data, .inval,
    .l2_req, .l2_we, .l2_addr, .l2_wdata, .l2_gnt, .l2_rvalid, .l2_rdata, .hits, .misses);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  // level-2 model
  initial begin
    for (int w = 0; w < LINE_W; w++) l2_rdata[w] = 0;
    forever begin
      @(posedge clk); #1;
      l2_gnt = 0; l2_rvalid = 0;
      if (l2_req && ($urandom % 2 == 0)) begin
        l2_gnt = 1;
        if (l2_we) begin
          automatic word_t wa = l2_addr, wd = l2_wdata;
          @(posedge clk); #1; l2_gnt = 0;
          mem[wa % 1024] = wd;
        end else begin
          automatic word_t a = l2_addr;
          l2_reads++;
          @(posedge clk); #1; l2_gnt = 0;
          repeat (4) @(posedge clk);
          #1;
          for (int w = 0; w < LINE_W; w++) l2_rdata[w] = mem[(a + w) % 1024];
          l2_rvalid = 1;
        end
      end
    end
  end

  task automatic access(input bit w, input word_t a, input word_t d, output word_t r, output int lat);
    req = 1; we = w; addr = a; wdata = d; lat = 0;
    do begin @(posedge clk); #2; lat++; end while (!resp && lat < 500);
    chk(resp, "no response");
    r = resp_data;
    req = 0;
    @(posedge clk); #2;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t r, ref_mem [1024];
    int lat, n_before;
    for (int i = 0; i < 1024; i++) begin mem[i] = $urandom; ref_mem[i] = mem[i]; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      automatic word_t wa = ($urandom % 128);           // word address, 128 words = 2x cache
      automatic bit st = ($urandom % 3 == 0);
      automatic word_t d = $urandom;
      n_before = l2_reads;
      access(st, wa * 4, d, r, lat);
      if (st) begin
        ref_mem[wa] = d;
        chk(mem[wa] == d, "write-through");
        chk(l2_reads == n_before, "store miss fetched a line");
      end else begin
        chk(r == ref_mem[wa], $sformatf("load %0d = %h, expected %h", wa, r, ref_mem[wa]));
        n_before = l2_reads;
        access(0, wa * 4, 0, r, lat);
        chk(r == ref_mem[wa] && lat == 1 && l2_reads == n_before, "repeated load hits");
      end
      if (i == 1000) begin
        inval = 1; @(posedge clk); #2; inval = 0;
        n_before = l2_reads;
        access(0, wa * 4, 0, r, lat);
        chk(l2_reads == n_before + 1, "load after invalidate misses");
      end
    end
    chk(hits > 0 && misses > 0, "hit and miss counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
