// tb_xmt_tcu: TCU 0 on its own. The testbench models the instruction cache
// (hit every other cycle), the register bank, the global register copy, the
// shared functional units (random grant delay, computed here), the data
// memory and the central management (prefix-sum, global write, spawn, end).
// The program runs a counted loop (add, addi, bne), a store and a load, a
// global write, a read of that global, a psi, a mul, a spawn whose thread
// writes a local and joins, and after the end of the spawn a store and halt.
// Checks: memory and register results, the requests the TCU sent, that it
// reports joined while waiting for the end, and halted at the end.
module tb_xmt_tcu;
  import xmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic f_req, f_hit, rf_we, iss_valid, iss_div, iss_we, iss_gnt, res_valid;
  logic ps_done = 0, gwr_ack = 0, spawn_go = 0, end_go = 0, joined, halted, retire;
  word_t f_pc, f_instr, ra_data, rb_data, rf_wdata, ga_data, gb_data, iss_a, iss_b, res_data;
  word_t ps_value = 0, spawn_pc = 0;
  logic [4:0] ra_idx, rb_idx, rf_widx;
  greg_t ga_idx, gb_idx;
  fu_class_e iss_class;
  alu_op_e iss_op;
  cm_req_t cm_req;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  xmt_tcu #(.GID(0)) dut (.clk, .rst_n, .f_req, .f_pc, .f_hit, .f_instr, .ra_idx, .rb_idx,
    .ra_data, .rb_data, .rf_we, .rf_widx, .rf_wdata, .ga_idx, .gb_idx, .ga_data, .gb_data,
    .iss_valid, .iss_class, .iss_op, .iss_div, .iss_we, .iss_a, .iss_b, .iss_gnt, .res_valid,
    .res_data, .cm_req, .ps_done, .ps_value, .gwr_ack, .spawn_go, .spawn_pc, .end_go,
    .joined, .halted, .retire);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  word_t imem [64], dmem [64], lregs [32], gregs [32];
  int n_ps = 0, n_gwr = 0, n_spawn = 0, joined_wait = 0;

  initial begin
    for (int i = 0; i < 64; i++) begin imem[i] = 0; dmem[i] = 0; end
    for (int i = 0; i < 32; i++) begin lregs[i] = 0; gregs[i] = 0; end
    imem[0]  = enc_i(OP_ORI, 33, 0, 5);        // t1 = 5
    imem[1]  = enc_i(OP_ORI, 34, 0, 0);        // t2 = 0
    imem[2]  = enc_r(F_ADD, 34, 34, 33);       // L: t2 += t1
    imem[3]  = enc_i(OP_ADDI, 33, 33, -1);     // t1--
    imem[4]  = enc_i(OP_BNE, 33, 0, -3);       // bne t1, g0, L
    imem[5]  = enc_i(OP_SW, 34, 0, 16);        // mem[16] = t2
    imem[6]  = enc_i(OP_LW, 35, 0, 16);        // t3 = mem[16]
    imem[7]  = enc_i(OP_ORI, 7, 0, 99);        // g7 = 99 (global write)
    imem[8]  = enc_r(F_ADD, 36, 7, 35);        // t4 = g7 + t3
    imem[9]  = enc_i(OP_PSI, 37, 7, 1);        // t5 = ps(g7, 1)
    imem[10] = enc_r(F_MUL, 38, 36, 37);       // t6 = t4 * t5
    imem[11] = enc_i(OP_SPAWN, 0, 0, 2);       // spawn -> 14
    imem[12] = enc_i(OP_SW, 38, 0, 20);        // mem[20] = t6
    imem[13] = {OP_HALT, 26'd0};
    imem[14] = enc_i(OP_ORI, 39, 0, 7);        // thread: t7 = 7
    imem[15] = {OP_JOIN, 26'd0};
  end

  // instruction cache model: hit on odd cycles
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign f_hit   = f_req && cyc[0];
  assign f_instr = imem[f_pc[7:2]];
  // register bank and global copy
  assign ra_data = lregs[ra_idx];
  assign rb_data = lregs[rb_idx];
  assign ga_data = gregs[ga_idx];
  assign gb_data = gregs[gb_idx];
  always @(posedge clk) if (rf_we) lregs[rf_widx] <= rf_wdata;

  // functional units: grant with random delay, answer one cycle later
  word_t fu_res;
  logic  fu_pend = 0;
  assign iss_gnt = iss_valid && ($urandom % 3 != 0);
  always @(posedge clk) begin
    res_valid <= 0;
    if (fu_pend) begin res_valid <= 1; res_data <= fu_res; fu_pend <= 0; end
    if (iss_valid && iss_gnt) begin
      fu_pend <= 1;
      case (iss_class)
        FU_MEM: begin
          if (iss_we) begin dmem[iss_a[7:2]] <= iss_b; fu_res <= 0; end
          else fu_res <= dmem[iss_a[7:2]];
        end
        FU_MD: fu_res <= iss_div ? iss_a / iss_b : iss_a * iss_b;
        default: case (iss_op)
          ALU_ADD: fu_res <= iss_a + iss_b;
          ALU_OR:  fu_res <= iss_a | iss_b;
          ALU_NE:  fu_res <= (iss_a != iss_b) ? 1 : 0;
          ALU_EQ:  fu_res <= (iss_a == iss_b) ? 1 : 0;
          default: fu_res <= 32'hDEAD;
        endcase
      endcase
    end
  end

  // central management model
  always @(posedge clk) begin
    ps_done <= 0; gwr_ack <= 0; spawn_go <= 0; end_go <= 0;
    case (cm_req.kind)
      RQ_PS:  begin n_ps++; ps_done <= 1; ps_value <= gregs[cm_req.greg];
                    gregs[cm_req.greg] <= gregs[cm_req.greg] + cm_req.data; end
      RQ_GWR: begin n_gwr++; gwr_ack <= 1; gregs[cm_req.greg] <= cm_req.data; end
      RQ_SPAWN: begin n_spawn++; spawn_go <= 1; spawn_pc <= cm_req.data; end
      default: ;
    endcase
    if (n_spawn == 1 && joined && !halted && !end_go) begin
      joined_wait++;
      if (joined_wait == 5) end_go <= 1;
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (halted);
    repeat (2) @(posedge clk);
    chk(dmem[16] == 15, $sformatf("loop sum %0d", dmem[16]));
    chk(lregs[3] == 15, "load");
    chk(gregs[7] == 100, $sformatf("g7 = %0d", gregs[7]));
    chk(lregs[4] == 114, $sformatf("t4 = %0d", lregs[4]));
    chk(lregs[5] == 99, $sformatf("psi result %0d", lregs[5]));
    chk(lregs[6] == 114 * 99, "mul");
    chk(dmem[20] == 114 * 99, "store after the spawn");
    chk(lregs[7] == 7, "thread ran");
    chk(n_ps == 1 && n_gwr == 1 && n_spawn == 1, "requests sent");
    chk(joined_wait >= 5, "joined while waiting for the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
