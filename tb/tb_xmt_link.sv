// tb_xmt_link: random words into a 4-stage link must come out exactly four
// cycles later, in order; reset clears the pipe.
module tb_xmt_link;
  logic clk = 0, rst_n = 0;
  logic [15:0] d = 0, q;
  logic [15:0] hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  xmt_link #(.WIDTH(16), .DELAY(4)) dut (.clk, .rst_n, .d, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++; if (q != 0) failures++;
    #1 rst_n = 1;
    for (int i = 0; i < 3; i++) hist.push_back(16'h0);
    for (int i = 0; i < 300; i++) begin
      d = $urandom;
      hist.push_back(d);
      @(posedge clk); #1;
      // three edges later than this one the word is at the output
      checks++;
      if (q != hist[hist.size() - 4]) begin
        failures++;
        if (failures < 5) $display("FAIL at %0d: q=%h expected %h", i, q, hist[hist.size() - 4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
