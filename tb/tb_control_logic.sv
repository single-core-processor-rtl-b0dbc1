// tb_control_logic: self-checking test of the instruction decoder.
// For every instruction the processor executes (ten R-format ops, nine
// I-format ALU ops, five loads, sw, six branches with both flag values) and a
// set of unsupported encodings, random register/immediate fields are filled
// in and all control outputs are compared with the expected settings per
// instruction class (the control table of the datapath).
module tb_control_logic;
  import riscv_pkg::*;
  logic [31:0] inst;
  logic br_eq, br_lt;
  logic pc_sel, reg_wen, br_un, a_sel, b_sel, mem_rw, wb_sel;
  imm_sel_t imm_sel;
  alu_sel_t alu_sel;
  int checks = 0, failures = 0;

  control_logic dut (.inst, .br_eq, .br_lt, .pc_sel, .imm_sel, .reg_wen, .br_un,
                     .a_sel, .b_sel, .alu_sel, .mem_rw, .wb_sel);

  // expected settings; 'x' fields are don't-care and passed as -1
  task automatic expect_ctl(input string what, input int e_pc, input int e_imm, input int e_wen,
                            input int e_un, input int e_a, input int e_b, input int e_alu,
                            input int e_mem, input int e_wb);
    #1;
    checks++;
    if ((e_pc  >= 0 && pc_sel  !== 1'(e_pc))  ||
        (e_imm >= 0 && imm_sel !== imm_sel_t'(e_imm)) ||
        (e_wen >= 0 && reg_wen !== 1'(e_wen)) ||
        (e_un  >= 0 && br_un   !== 1'(e_un))  ||
        (e_a   >= 0 && a_sel   !== 1'(e_a))   ||
        (e_b   >= 0 && b_sel   !== 1'(e_b))   ||
        (e_alu >= 0 && alu_sel !== alu_sel_t'(e_alu)) ||
        (e_mem >= 0 && mem_rw  !== 1'(e_mem)) ||
        (e_wb  >= 0 && wb_sel  !== 1'(e_wb))) begin
      failures++;
      $display("FAIL %s inst=%h: pc=%b imm=%0d wen=%b un=%b a=%b b=%b alu=%0d mem=%b wb=%b", what, inst,
               pc_sel, imm_sel, reg_wen, br_un, a_sel, b_sel, alu_sel, mem_rw, wb_sel);
    end
  endtask

  function automatic logic [31:0] rnd_fields();
    return $urandom & 32'h01FF_8F80;   // rs2, rs1, rd fields random; rest 0
  endfunction

  // R-format table: {funct7[5], funct3} -> ALU op
  int r_f3 [10]  = '{0, 0, 1, 2, 3, 4, 5, 5, 6, 7};
  int r_alt [10] = '{0, 1, 0, 0, 0, 0, 0, 1, 0, 0};
  int r_op [10]  = '{int'(ALU_ADD), int'(ALU_SUB), int'(ALU_SLL), int'(ALU_SLT), int'(ALU_SLTU), int'(ALU_XOR), int'(ALU_SRL), int'(ALU_SRA), int'(ALU_OR), int'(ALU_AND)};
  int ld_f3 [5]  = '{0, 1, 2, 4, 5};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      br_eq = 1'($urandom); br_lt = 1'($urandom);
      // R-format
      for (int k = 0; k < 10; k++) begin
        inst = rnd_fields() | (32'(r_alt[k]) << 30) | (32'(r_f3[k]) << 12) | 32'b0110011;
        expect_ctl("R", 0, -1, 1, -1, 0, 0, r_op[k], 0, 1);
      end
      // I-format ALU: addi slti sltiu xori ori andi use any imm; shifts use funct7
      for (int k = 0; k < 10; k++) begin
        if (k == 1) continue;   // no subi
        inst = (rnd_fields() & 32'hFFFF_FFFF) | (32'(r_alt[k]) << 30) | (32'(r_f3[k]) << 12) | 32'b0010011;
        if (r_f3[k] != 5 && r_f3[k] != 1) inst[31:20] = 12'($urandom);
        expect_ctl("I", 0, int'(IMM_I), 1, -1, 0, 1, (k == 0) ? int'(ALU_ADD) : r_op[k], 0, 1);
      end
      // loads: ImmSel=I, RegWEn=1, BSel=1, ALUSel=Add, MemRW=Read, WBSel=0
      for (int k = 0; k < 5; k++) begin
        inst = rnd_fields() | (32'(ld_f3[k]) << 12) | 32'b0000011 | ($urandom & 32'hFE00_0000);
        expect_ctl("load", 0, int'(IMM_I), 1, -1, 0, 1, int'(ALU_ADD), 0, 0);
      end
      // sw: ImmSel=S, RegWEn=0, BSel=1, ALUSel=Add, MemRW=Write
      inst = rnd_fields() | (32'd2 << 12) | 32'b0100011;
      expect_ctl("sw", 0, int'(IMM_S), 0, -1, 0, 1, int'(ALU_ADD), 1, -1);
      // sb, sh: not executed
      inst = rnd_fields() | (32'd0 << 12) | 32'b0100011;
      expect_ctl("sb", 0, -1, 0, -1, -1, -1, -1, 0, -1);
      inst = rnd_fields() | (32'd1 << 12) | 32'b0100011;
      expect_ctl("sh", 0, -1, 0, -1, -1, -1, -1, 0, -1);
      // branches: ImmSel=B, RegWEn=0, ASel=1, BSel=1, ALUSel=add, MemRW=read
      begin
        automatic int bf3 [6] = '{0, 1, 4, 5, 6, 7};
        for (int k = 0; k < 6; k++) begin
          int tk;
          case (bf3[k])
            0: tk = int'(br_eq);       1: tk = int'(!br_eq);
            4, 6: tk = int'(br_lt);    default: tk = int'(!br_lt);
          endcase
          inst = rnd_fields() | (32'(bf3[k]) << 12) | 32'b1100011;
          expect_ctl("branch", tk, int'(IMM_B), 0, (bf3[k] >= 6) ? 1 : 0, 1, 1, int'(ALU_ADD), 0, -1);
        end
      end
      // unsupported opcodes: jal, jalr, lui, auipc, system, all-zero
      begin
        automatic logic [6:0] bad [6] = '{7'b1101111, 7'b1100111, 7'b0110111, 7'b0010111, 7'b1110011, 7'b0000000};
        for (int k = 0; k < 6; k++) begin
          inst = $urandom & 32'hFFFF_FF80 | 32'(bad[k]);
          expect_ctl("no-op", 0, -1, 0, -1, -1, -1, -1, 0, -1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
