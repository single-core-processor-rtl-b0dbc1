// control_logic: single-cycle instruction decoder.
//
// Combinational. From the instruction word and the branch comparator's flags
// it produces every datapath control signal for the current cycle:
//   class   PCSel      ImmSel RegWEn BrUn   ASel BSel ALUSel  MemRW WBSel
//   R-ALU   pc+4       -      1      -      reg  reg  funct   read  alu
//   I-ALU   pc+4       I      1      -      reg  imm  funct   read  alu
//   load    pc+4       I      1      -      reg  imm  add     read  mem
//   sw      pc+4       S      0      -      reg  imm  add     write -
//   branch  taken?alu  B      0      f3[1]  pc   imm  add     read  -
// Branch taken: beq br_eq, bne !br_eq, blt/bltu br_lt, bge/bgeu !br_lt, with
// br_un = funct3[1] selecting the unsigned compare. The per-class values are
// the reference ones. Opcodes or funct3 values outside this set (jal, jalr,
// lui, auipc, sb, sh, system) execute as no-ops: no register or memory write,
// PC + 4. That, and the ALUSel codes, are this design's choices.
module control_logic
  import riscv_pkg::*;
(
  input  logic [31:0] inst,
  input  logic        br_eq,
  input  logic        br_lt,
  output logic        pc_sel,
  output imm_sel_t    imm_sel,
  output logic        reg_wen,
  output logic        br_un,
  output logic        a_sel,
  output logic        b_sel,
  output alu_sel_t    alu_sel,
  output logic        mem_rw,
  output logic        wb_sel
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic       f7_alt;   // inst[30]: sub / sra
  logic       taken;

  // ALU operation named by funct3 (and inst[30] where it matters)
  function automatic alu_sel_t alu_of(input logic [2:0] f3, input logic alt, input logic is_reg);
    unique case (f3)
      F3_ADD:  return (alt && is_reg) ? ALU_SUB : ALU_ADD;
      F3_SLL:  return ALU_SLL;
      F3_SLT:  return ALU_SLT;
      F3_SLTU: return ALU_SLTU;
      F3_XOR:  return ALU_XOR;
      F3_SR:   return alt ? ALU_SRA : ALU_SRL;
      F3_OR:   return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    opcode = inst[6:0];
    funct3 = inst[14:12];
    f7_alt = inst[30];

    unique case (funct3)
      F3_BEQ:           taken = br_eq;
      F3_BNE:           taken = !br_eq;
      F3_BLT, F3_BLTU:  taken = br_lt;
      F3_BGE, F3_BGEU:  taken = !br_lt;
      default:          taken = 1'b0;
    endcase

    // defaults: a no-op
    pc_sel  = PCSEL_PC4;
    imm_sel = IMM_I;
    reg_wen = 1'b0;
    br_un   = funct3[1];
    a_sel   = ASEL_REG;
    b_sel   = BSEL_REG;
    alu_sel = ALU_ADD;
    mem_rw  = 1'b0;
    wb_sel  = WBSEL_ALU;

    unique case (opcode)
      OPC_OP: begin
        reg_wen = 1'b1;
        alu_sel = alu_of(funct3, f7_alt, 1'b1);
      end
      OPC_OP_IMM: begin
        reg_wen = 1'b1;
        b_sel   = BSEL_IMM;
        alu_sel = alu_of(funct3, f7_alt, 1'b0);
      end
      OPC_LOAD: begin
        if (funct3 inside {F3_LB, F3_LH, F3_LW, F3_LBU, F3_LHU}) begin
          reg_wen = 1'b1;
          b_sel   = BSEL_IMM;
          wb_sel  = WBSEL_MEM;
        end
      end
      OPC_STORE: begin
        imm_sel = IMM_S;
        b_sel   = BSEL_IMM;
        mem_rw  = (funct3 == F3_SW);
      end
      OPC_BRANCH: begin
        imm_sel = IMM_B;
        a_sel   = ASEL_PC;
        b_sel   = BSEL_IMM;
        pc_sel  = taken ? PCSEL_ALU : PCSEL_PC4;
      end
      default: ;
    endcase
  end

endmodule
