// tb_datapath: self-checking test of the datapath on its own.
//
// The testbench plays control and both memories. It first gives every
// register a known value (addi-style cycles: rs1 = x0, BSel = imm, WBSel =
// alu). Then, every cycle, it applies a random instruction word, random
// control settings and random data-memory read data, and compares against a
// model kept in the testbench: the ALU result on dmem_addr (operands picked
// by ASel/BSel, immediate by ImmSel), dmem_wdata = R[rs2], BrEq/BrLT, the
// write-back value (WBSel: ALU or extended load data) and the next PC
// (PCSel: PC + 4 or ALU). After the rising edge it checks that the PC and
// the destination register (RegWEn, not x0) took the new values.
module tb_datapath;
  import riscv_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] pc, inst, dmem_addr, dmem_wdata, dmem_rdata, wb_data, pc_next;
  logic pc_sel, reg_wen, br_un, a_sel, b_sel, wb_sel, br_eq, br_lt;
  imm_sel_t imm_sel;
  alu_sel_t alu_sel;
  int checks = 0, failures = 0;

  datapath #(.RESET_PC(32'h0000_0200)) dut (
    .clk, .rst_n, .pc, .inst, .pc_sel, .imm_sel, .reg_wen, .br_un, .a_sel, .b_sel,
    .alu_sel, .wb_sel, .br_eq, .br_lt, .dmem_addr, .dmem_wdata, .dmem_rdata, .wb_data, .pc_next
  );

  always #5 clk = ~clk;

  logic [31:0] m_x [32];
  logic [31:0] m_pc;

  function automatic logic [31:0] sext(input logic [31:0] v, input int bits);
    return 32'($signed(v << (32 - bits)) >>> (32 - bits));
  endfunction

  function automatic logic [31:0] ref_imm(input logic [31:0] i, input imm_sel_t s);
    case (s)
      IMM_S:   return sext({20'b0, i[31:25], i[11:7]}, 12);
      IMM_B:   return sext({19'b0, i[31], i[7], i[30:25], i[11:8], 1'b0}, 13);
      default: return sext({20'b0, i[31:20]}, 12);
    endcase
  endfunction

  function automatic logic [31:0] ref_alu(input alu_sel_t op, input logic [31:0] a, input logic [31:0] b);
    case (op)
      ALU_ADD:  return a + b;
      ALU_SUB:  return a - b;
      ALU_SLL:  return a << b[4:0];
      ALU_SLT:  return {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: return {31'b0, a < b};
      ALU_XOR:  return a ^ b;
      ALU_SRL:  return a >> b[4:0];
      ALU_SRA:  return 32'($signed(a) >>> b[4:0]);
      ALU_OR:   return a | b;
      default:  return a & b;
    endcase
  endfunction

  function automatic logic [31:0] ref_load(input logic [31:0] w, input logic [1:0] lo, input logic [2:0] f3);
    logic [31:0] sb = w >> (8 * lo), shw = w >> (16 * lo[1]);
    case (f3)
      3'b000:  return sext(sb & 32'hFF, 8);
      3'b001:  return sext(shw & 32'hFFFF, 16);
      3'b100:  return sb & 32'hFF;
      3'b101:  return shw & 32'hFFFF;
      default: return w;
    endcase
  endfunction

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (inst %h)", what, got, exp, inst);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b, alu_e, wb_e, npc_e;
    logic [4:0] rs1, rs2, rd;
    pc_sel = 0; imm_sel = IMM_I; reg_wen = 0; br_un = 0; a_sel = 0; b_sel = 0;
    alu_sel = ALU_ADD; wb_sel = 1; inst = '0; dmem_rdata = '0;
    @(negedge clk); @(negedge clk);
    expect_eq(pc, 32'h200, "reset PC");
    rst_n = 1'b1;
    m_pc = 32'h200;
    m_x[0] = '0;
    // give every register a value: rd = x0 + imm
    for (int r = 1; r < 32; r++) begin
      inst = {12'($urandom), 5'd0, 3'd0, 5'(r), 7'b0010011};
      reg_wen = 1; b_sel = 1; a_sel = 0; wb_sel = 1; alu_sel = ALU_ADD; imm_sel = IMM_I; pc_sel = 0;
      @(posedge clk); #1;
      m_x[r] = ref_imm(inst, IMM_I);
      m_pc = m_pc + 4;
      @(negedge clk);
    end
    // random cycles
    for (int n = 0; n < 3000; n++) begin
      inst = $urandom;
      pc_sel = 1'($urandom); reg_wen = 1'($urandom); br_un = 1'($urandom);
      a_sel = 1'($urandom); b_sel = 1'($urandom); wb_sel = 1'($urandom);
      imm_sel = imm_sel_t'($urandom_range(0, 2));
      alu_sel = alu_sel_t'($urandom_range(0, 9));
      dmem_rdata = $urandom;
      if (n % 7 == 0) inst[24:20] = inst[19:15];   // equal operands now and then
      #1;
      rs1 = inst[19:15]; rs2 = inst[24:20]; rd = inst[11:7];
      a = a_sel ? m_pc : m_x[rs1];
      b = b_sel ? ref_imm(inst, imm_sel) : m_x[rs2];
      alu_e = ref_alu(alu_sel, a, b);
      wb_e  = wb_sel ? alu_e : ref_load(dmem_rdata, alu_e[1:0], inst[14:12]);
      npc_e = pc_sel ? alu_e : m_pc + 4;
      expect_eq(pc, m_pc, "pc");
      expect_eq(dmem_addr, alu_e, "alu / dmem_addr");
      expect_eq(dmem_wdata, m_x[rs2], "dmem_wdata");
      expect_eq(32'(br_eq), 32'(m_x[rs1] == m_x[rs2]), "br_eq");
      expect_eq(32'(br_lt), 32'(br_un ? (m_x[rs1] < m_x[rs2]) : ($signed(m_x[rs1]) < $signed(m_x[rs2]))), "br_lt");
      expect_eq(wb_data, wb_e, "wb_data");
      expect_eq(pc_next, npc_e, "pc_next");
      @(posedge clk); #1;
      if (reg_wen && rd != 0) m_x[rd] = wb_e;
      m_pc = npc_e;
      expect_eq(pc, m_pc, "pc after edge");
      expect_eq(rd == 0 ? 32'h0 : dut.u_rf.regs[rd], m_x[rd], "rd after edge");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
