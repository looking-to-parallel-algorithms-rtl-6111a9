// xmt_alu: integer ALU / branch-compare unit of an XMT cluster.
//
// Purely combinational: the cluster registers the result, which gives the
// 1-cycle latency listed for ALUs and branch units. The same module serves as
// the branch unit: ALU_EQ / ALU_NE return the outcome of a beq / bne compare in
// bit 0. Shifts take their amount from the low five bits of b. The operation
// set is this design's choice for a MIPS-like instruction set.
module xmt_alu
  import xmt_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = word_t'($signed(a) < $signed(b));
      ALU_SLTU: y = word_t'(a < b);
      ALU_SLL:  y = a << b[4:0];
      ALU_SRL:  y = a >> b[4:0];
      ALU_LUI:  y = {b[15:0], 16'h0000};
      ALU_EQ:   y = word_t'(a == b);
      ALU_NE:   y = word_t'(a != b);
      default:  y = '0;
    endcase
  end
endmodule
