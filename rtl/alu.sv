// alu: 32-bit arithmetic-logic unit.
//
// Combinational: result = a OP b with OP given by alu_sel (riscv_pkg::
// alu_sel_t): add, sub, sll, slt, sltu, xor, srl, sra, or, and - the ten
// R-format operations. Shifts use b[4:0] as the shift amount; slt/sltu give 1
// or 0. In the processor it also forms load/store addresses (rs1 + imm) and
// branch targets (PC + imm) with add. The operation set is the reference one;
// the op codes other than add = 0 and sub = 1 are this design's.
module alu
  import riscv_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_sel_t    alu_sel,
  output logic [31:0] result
);

  logic [4:0] shamt;

  always_comb begin
    shamt = b[4:0];
    unique case (alu_sel)
      ALU_ADD:  result = a + b;
      ALU_SUB:  result = a - b;
      ALU_SLL:  result = a << shamt;
      ALU_SLT:  result = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: result = {31'b0, a < b};
      ALU_XOR:  result = a ^ b;
      ALU_SRL:  result = a >> shamt;
      ALU_SRA:  result = 32'($signed(a) >>> shamt);
      ALU_OR:   result = a | b;
      ALU_AND:  result = a & b;
      default:  result = a + b;
    endcase
  end

endmodule
