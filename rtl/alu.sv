// alu: 64-bit integer ALU of the bit-partitioned register file core.
//
// Computes result = a OP b, where b is the second register operand or the
// sign-extended 16-bit immediate, depending on the operation. Purely
// combinational; the core registers its output for the write-back stage.
//
// The design only names the ALU (64-bit operands in, 64-bit result out);
// the operation set is this implementation's own small choice.
module alu
  import bprf_pkg::*;
(
  input  alu_op_e          op,
  input  logic [XLEN-1:0]  a,
  input  logic [XLEN-1:0]  b,
  input  logic [IMM_W-1:0] imm,
  output logic [XLEN-1:0]  y
);

  logic [XLEN-1:0] simm;

  always_comb begin
    simm = {{(XLEN - IMM_W){imm[IMM_W-1]}}, imm};
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SLL:  y = a << b[5:0];
      OP_SRL:  y = a >> b[5:0];
      OP_ADDI: y = a + simm;
      OP_SLLI: y = a << imm[5:0];
      OP_SRLI: y = a >> imm[5:0];
      default: y = '0;
    endcase
  end

endmodule
