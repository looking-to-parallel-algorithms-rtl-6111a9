// tb_xmt_lsb: load-store buffer against a data-cache model that answers after
// a random delay. Checks FIFO order of the operations reaching the cache,
// that each completion goes to the TCU that issued it with the cache's data,
// and that full is raised at DEPTH entries and refuses nothing.
module tb_xmt_lsb;
  import xmt_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0, enq = 0, enq_we = 0, full, dc_req, dc_we, dc_resp = 0, done;
  logic [1:0] enq_tcu = 0, done_tcu;
  word_t enq_addr = 0, enq_wdata = 0, dc_addr, dc_wdata, dc_rdata = 0, done_data;
  int checks = 0, failures = 0, saw_full = 0;
  typedef struct { logic [1:0] tcu; logic we; word_t addr; word_t wdata; } op_t;
  op_t exp_q [$];

  always #5 clk = ~clk;
  xmt_lsb #(.DEPTH(D), .TIDW(2)) dut (.clk, .rst_n, .enq, .enq_tcu, .enq_we, .enq_addr, .enq_wdata,
    .full, .dc_req, .dc_we, .dc_addr, .dc_wdata, .dc_resp, .dc_rdata, .done, .done_tcu, .done_data);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  // cache model: answers a held request after 0..3 idle cycles
  int wait_n = 0;
  always @(posedge clk) begin
    #2;
    dc_resp = 0;
    if (dc_req) begin
      if (wait_n == 0) begin
        dc_resp = 1; dc_rdata = dc_addr ^ 32'h5A5A_0000;
        wait_n = $urandom % 4;
      end else wait_n--;
    end
  end

  // completions
  always @(posedge clk) if (rst_n) begin
    if (done) begin
      chk(exp_q.size() > 0, "completion without operation");
      if (exp_q.size() > 0) begin
        chk(done_tcu == exp_q[0].tcu, "completion TCU");
        chk(dc_addr == exp_q[0].addr && dc_we == exp_q[0].we && dc_wdata == exp_q[0].wdata, "cache sees the oldest entry");
        chk(done_data == (exp_q[0].addr ^ 32'h5A5A_0000), "load data");
        void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      enq = ($urandom % 3 != 0) && !full;
      if (full) saw_full++;
      if (full) chk(exp_q.size() == D, "full at DEPTH entries");
      enq_tcu = $urandom; enq_we = $urandom; enq_addr = $urandom; enq_wdata = $urandom;
      if (enq) exp_q.push_back('{enq_tcu, enq_we, enq_addr, enq_wdata});
      @(posedge clk); #1;
    end
    enq = 0;
    repeat (60) @(posedge clk);
    chk(exp_q.size() == 0, "all operations completed");
    chk(saw_full > 0, "buffer never filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
