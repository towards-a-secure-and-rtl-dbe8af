// iu_alu: 32-bit integer ALU of the execute stage (add, subtract, logic
// operations and shifts). Combinational. It is the logic "L" that the
// parity-prediction stage protects, and is instantiated a second time there
// as the replica "L'". The operation set is a reduced SPARC-like set chosen
// by this design.
module iu_alu
  import iu_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_SLL: y = a << b[4:0];
      ALU_SRL: y = a >> b[4:0];
      ALU_SRA: y = $signed(a) >>> b[4:0];
      default: y = '0;
    endcase
  end
endmodule
