// tb_xmt_greg_coord: random writes and prefix-sum additions to the global
// registers, compared with a model; g0 must stay zero.
module tb_xmt_greg_coord;
  import xmt_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0, ps_en = 0;
  greg_t wr_idx = 0, ps_idx = 0, rd_idx = 0;
  word_t wr_data = 0, ps_add = 0, rd_data;
  word_t model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  xmt_greg_coord dut (.clk, .rst_n, .wr_en, .wr_idx, .wr_data, .ps_en, .ps_idx, .ps_add,
                      .rd_idx, .rd_data);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) model[r] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      wr_en = 0; ps_en = 0;
      case ($urandom % 3)
        0: begin wr_en = 1; wr_idx = $urandom % 32; wr_data = $urandom; end
        1: begin ps_en = 1; ps_idx = $urandom % 32; ps_add = $urandom % 129; end
        default: ;
      endcase
      rd_idx = $urandom % 32;
      #1;
      checks++;
      if (rd_data != model[rd_idx]) begin
        failures++;
        if (failures < 5) $display("FAIL g%0d = %h, expected %h", rd_idx, rd_data, model[rd_idx]);
      end
      @(posedge clk);
      if (wr_en && wr_idx != 0) model[wr_idx] = wr_data;
      if (ps_en && ps_idx != 0) model[ps_idx] = model[ps_idx] + ps_add;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
