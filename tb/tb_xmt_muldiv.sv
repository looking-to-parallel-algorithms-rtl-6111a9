// tb_xmt_muldiv: random multiplies and unsigned divides; checks the result and
// that done comes exactly 2 (multiply) or 40 (divide) cycles after start, and
// that the unit reports busy in between.
module tb_xmt_muldiv;
  import xmt_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, is_div = 0, busy, done;
  word_t a = 0, b = 0, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  xmt_muldiv dut (.clk, .rst_n, .start, .is_div, .a, .b, .busy, .done, .y);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t ea, eb, ey;
    int lat, want;
    bit d;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 120; i++) begin
      d  = (i % 2 == 1);
      ea = $urandom;
      eb = (i % 10 == 3) ? 0 : ((i % 4 == 1) ? $urandom % 1000 : $urandom);
      if (d) ey = (eb == 0) ? 32'hFFFF_FFFF : ea / eb;
      else   ey = ea * eb;
      want = d ? 40 : 2;
      start <= 1; is_div <= d; a <= ea; b <= eb;
      @(posedge clk);
      start <= 0;
      lat = 0;
      do begin
        @(posedge clk); #1;
        lat++;
        if (!done && lat < want) chk(busy, "busy while working");
      end while (!done && lat < 100);
      chk(done && lat == want, $sformatf("latency %0d, expected %0d", lat, want));
      chk(y == ey, $sformatf("%s %h,%h = %h, expected %h", d ? "div" : "mul", ea, eb, y, ey));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
