// tb_xmt_regfile: random writes into all four banks at once, with reads
// compared against a model; checks that the banks are separate.
module tb_xmt_regfile;
  import xmt_pkg::*;
  localparam int T = 4;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra_idx[T], rb_idx[T], w_idx[T];
  word_t ra_data[T], rb_data[T], w_data[T];
  logic [T-1:0] we = '0;
  word_t model [T][32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  xmt_regfile #(.N_TCU(T)) dut (.clk, .rst_n, .ra_idx, .rb_idx, .ra_data, .rb_data, .we,
                                .w_idx, .w_data);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < T; t++) begin
      for (int r = 0; r < 32; r++) model[t][r] = 0;
      ra_idx[t] = 0; rb_idx[t] = 0; w_idx[t] = 0; w_data[t] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      for (int t = 0; t < T; t++) begin
        we[t] = $urandom % 2;
        w_idx[t] = $urandom % 32;
        w_data[t] = $urandom;
        ra_idx[t] = $urandom % 32;
        rb_idx[t] = $urandom % 32;
      end
      #1;
      for (int t = 0; t < T; t++) begin
        checks += 2;
        if (ra_data[t] != model[t][ra_idx[t]]) failures++;
        if (rb_data[t] != model[t][rb_idx[t]]) failures++;
      end
      @(posedge clk);
      for (int t = 0; t < T; t++) if (we[t]) model[t][w_idx[t]] = w_data[t];
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
