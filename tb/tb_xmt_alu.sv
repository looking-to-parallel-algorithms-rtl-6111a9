// tb_xmt_alu: random operands through every ALU operation, compared with
// results computed here.
module tb_xmt_alu;
  import xmt_pkg::*;
  alu_op_e op;
  word_t a, b, y, exp_y;
  int checks = 0, failures = 0;

  xmt_alu dut (.op, .a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      op = alu_op_e'($urandom % 13);
      a  = (i % 5 == 0) ? 32'hFFFF_FFF0 + $urandom % 32 : $urandom;
      b  = (i % 7 == 0) ? a : ((i % 3 == 0) ? $urandom % 40 : $urandom);
      #1;
      case (op)
        ALU_ADD:  exp_y = a + b;
        ALU_SUB:  exp_y = a - b;
        ALU_AND:  exp_y = a & b;
        ALU_OR:   exp_y = a | b;
        ALU_XOR:  exp_y = a ^ b;
        ALU_NOR:  exp_y = ~(a | b);
        ALU_SLT:  exp_y = (int'(a) < int'(b)) ? 1 : 0;
        ALU_SLTU: exp_y = (longint'(a) < longint'(b)) ? 1 : 0;
        ALU_SLL:  exp_y = a << (b % 32);
        ALU_SRL:  exp_y = a >> (b % 32);
        ALU_LUI:  exp_y = (b & 32'hFFFF) * 65536;
        ALU_EQ:   exp_y = (a == b) ? 1 : 0;
        ALU_NE:   exp_y = (a != b) ? 1 : 0;
        default:  exp_y = 0;
      endcase
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
