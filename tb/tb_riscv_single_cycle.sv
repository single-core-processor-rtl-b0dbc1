// tb_riscv_single_cycle: end-to-end test of the single-cycle processor at
// its default sizes (1024-word instruction and data memories).
//
// The testbench assembles a program, loads it through the instruction-memory
// load port while the core is held in reset, releases reset and then, every
// cycle, compares the core's commit trace (PC, register write, memory write,
// next PC) with an instruction-set model written here, which it then steps.
// The program is:
//   1. 31 addi instructions that give every register a known value;
//   2. a counted loop (sw, lw, add, addi, bne back) - a backward taken branch;
//   3. NRAND random instructions: R-format and I-format ALU ops, lb/lh/lw/
//      lbu/lhu, sw, the six branches with short forward offsets, writes to x0
//      and unsupported opcodes (executed as no-ops);
//   4. "beq x0, x0, 0", a branch to itself, which ends the run.
// One instruction must complete per cycle: the cycle count from reset release
// to the final branch must equal the number of instructions the model
// executed. At the end the register file and data memory are compared with
// the model. Each mechanism (every instruction kind, taken and not-taken
// branches, backward branch, x0 write, no-op) is counted and must occur.
module tb_riscv_single_cycle;
  import riscv_pkg::*;

  localparam int NRAND     = 600;
  localparam int DMEM_WORDS = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we = 1'b0;
  logic [31:0] prog_addr = '0, prog_wdata = '0;
  trace_t trace;

  riscv_single_cycle dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .trace);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- assembler ------------------------------------------
  logic [31:0] prog [$];

  function automatic logic [31:0] enc_r(int f7, int rs2, int rs1, int f3, int rd);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'b0110011};
  endfunction
  function automatic logic [31:0] enc_i(int imm, int rs1, int f3, int rd, logic [6:0] op);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), op};
  endfunction
  function automatic logic [31:0] enc_s(int imm, int rs2, int rs1, int f3);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_b(int imm, int rs2, int rs1, int f3);
    logic [12:0] i = 13'(imm);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:1], i[11], 7'b1100011};
  endfunction

  // ---------------- instruction-set model ------------------------------
  logic [31:0] m_x [32];
  logic [31:0] m_mem [DMEM_WORDS];
  logic [31:0] m_pc;

  // mechanism counters
  int n_r, n_i, n_lb, n_lh, n_lw, n_lbu, n_lhu, n_sw, n_taken, n_not_taken,
      n_backward, n_x0, n_nop;

  function automatic logic [31:0] sx(input logic [31:0] v, input int bits);
    return 32'($signed(v << (32 - bits)) >>> (32 - bits));
  endfunction

  // Execute one instruction in the model; report what it should do.
  task automatic model_step(input logic [31:0] in, output logic we, output logic [4:0] rd,
                            output logic [31:0] wd, output logic mwe, output logic [31:0] maddr,
                            output logic [31:0] mwd, output logic [31:0] npc);
    logic [6:0] op = in[6:0];
    logic [2:0] f3 = in[14:12];
    logic [31:0] a = m_x[in[19:15]], b = m_x[in[24:20]];
    logic [31:0] iimm = sx({20'b0, in[31:20]}, 12);
    logic [31:0] simm = sx({20'b0, in[31:25], in[11:7]}, 12);
    logic [31:0] bimm = sx({19'b0, in[31], in[7], in[30:25], in[11:8], 1'b0}, 13);
    logic [31:0] bop;
    logic alt;
    we = 1'b0; rd = in[11:7]; wd = '0; mwe = 1'b0; maddr = '0; mwd = '0; npc = m_pc + 4;
    case (op)
      7'b0110011, 7'b0010011: begin
        bop = (op == 7'b0110011) ? b : iimm;
        alt = in[30] && (op == 7'b0110011 || f3 == 3'b101);
        we = 1'b1;
        case (f3)
          0: wd = alt ? a - bop : a + bop;
          1: wd = a << bop[4:0];
          2: wd = ($signed(a) < $signed(bop)) ? 1 : 0;
          3: wd = (a < bop) ? 1 : 0;
          4: wd = a ^ bop;
          5: wd = alt ? 32'($signed(a) >>> bop[4:0]) : a >> bop[4:0];
          6: wd = a | bop;
          7: wd = a & bop;
        endcase
        if (op == 7'b0110011) n_r++; else n_i++;
      end
      7'b0000011: begin
        logic [31:0] ad = a + iimm;
        logic [31:0] w = m_mem[ad[11:2]];
        logic [31:0] sh = w >> (8 * ad[1:0]);
        we = 1'b1;
        case (f3)
          0: begin wd = sx(sh & 32'hFF, 8);   n_lb++;  end
          1: begin wd = sx(sh & 32'hFFFF, 16); n_lh++; end
          2: begin wd = w;                     n_lw++; end
          4: begin wd = sh & 32'hFF;           n_lbu++; end
          5: begin wd = sh & 32'hFFFF;         n_lhu++; end
          default: begin we = 1'b0; n_nop++; end
        endcase
      end
      7'b0100011: begin
        if (f3 == 2) begin
          mwe = 1'b1; maddr = a + simm; mwd = b;
          m_mem[maddr[11:2]] = b;
          n_sw++;
        end else n_nop++;
      end
      7'b1100011: begin
        logic t;
        case (f3)
          0: t = (a == b);
          1: t = (a != b);
          4: t = ($signed(a) < $signed(b));
          5: t = ($signed(a) >= $signed(b));
          6: t = (a < b);
          7: t = (a >= b);
          default: t = 1'b0;
        endcase
        if (t) begin
          npc = m_pc + bimm;
          n_taken++;
          if ($signed(bimm) < 0) n_backward++;
        end else n_not_taken++;
      end
      default: n_nop++;
    endcase
    if (we && rd == 0) n_x0++;
    if (we && rd != 0) m_x[rd] = wd;
    m_pc = npc;
  endtask

  // ---------------- program --------------------------------------------
  int f3_r [10] = '{0, 0, 1, 2, 3, 4, 5, 5, 6, 7};
  int f7_r [10] = '{0, 32, 0, 0, 0, 0, 0, 32, 0, 0};
  int f3_b [6]  = '{0, 1, 4, 5, 6, 7};
  int f3_l [5]  = '{0, 1, 2, 4, 5};

  task automatic build_program();
    int loop_at;
    for (int r = 1; r < 32; r++) prog.push_back(enc_i(int'($urandom_range(0, 4095)) - 2048, 0, 0, r, 7'b0010011));
    // counted loop over ten words at 0x400
    prog.push_back(enc_i(32'h400, 0, 0, 5, 7'b0010011));   // addi x5, x0, 0x400
    prog.push_back(enc_i(10, 0, 0, 6, 7'b0010011));        // addi x6, x0, 10
    prog.push_back(enc_i(0, 0, 0, 7, 7'b0010011));         // addi x7, x0, 0
    loop_at = prog.size();
    prog.push_back(enc_s(0, 6, 5, 2));                     // sw   x6, 0(x5)
    prog.push_back(enc_i(0, 5, 2, 8, 7'b0000011));         // lw   x8, 0(x5)
    prog.push_back(enc_r(0, 8, 7, 0, 7));                  // add  x7, x7, x8
    prog.push_back(enc_i(4, 5, 0, 5, 7'b0010011));         // addi x5, x5, 4
    prog.push_back(enc_i(-1, 6, 0, 6, 7'b0010011));        // addi x6, x6, -1
    prog.push_back(enc_b(4 * (loop_at - prog.size()), 0, 6, 1));  // bne x6, x0, loop
    loop_exit_pc = 32'(4 * prog.size());
    prog.push_back(enc_i(-4, 5, 2, 9, 7'b0000011));        // lw   x9, -4(x5)
    // random part
    for (int n = 0; n < NRAND; n++) begin
      int kind = $urandom_range(0, 99);
      int rd   = ($urandom_range(0, 19) == 0) ? 0 : $urandom_range(1, 31);
      int rs1  = $urandom_range(0, 31), rs2 = $urandom_range(0, 31);
      if (kind < 25) begin
        int k = $urandom_range(0, 9);
        prog.push_back(enc_r(f7_r[k], rs2, rs1, f3_r[k], rd));
      end else if (kind < 45) begin
        int k = $urandom_range(0, 9);
        if (k == 1) k = 0;
        if (f3_r[k] == 1 || f3_r[k] == 5)
          prog.push_back(enc_i((f7_r[k] << 5) | $urandom_range(0, 31), rs1, f3_r[k], rd, 7'b0010011));
        else
          prog.push_back(enc_i(int'($urandom_range(0, 4095)) - 2048, rs1, f3_r[k], rd, 7'b0010011));
      end else if (kind < 65) begin
        int k = $urandom_range(0, 4);
        int al = (f3_l[k] == 2) ? 4 : (f3_l[k] == 0 || f3_l[k] == 4) ? 1 : 2;
        prog.push_back(enc_i(al * $urandom_range(0, 2047 / al), 0, f3_l[k], rd, 7'b0000011));
      end else if (kind < 78) begin
        prog.push_back(enc_s(4 * $urandom_range(0, 511), rs2, 0, 2));
      end else if (kind < 95 && n < NRAND - 5) begin
        int k = $urandom_range(0, 5);
        if ($urandom_range(0, 3) == 0) rs2 = rs1;   // equal operands now and then
        prog.push_back(enc_b(4 * $urandom_range(1, 4), rs2, rs1, f3_b[k]));
      end else begin
        logic [6:0] unsup [4] = '{7'b0110111, 7'b0010111, 7'b1101111, 7'b1110011};
        prog.push_back({25'($urandom), unsup[$urandom_range(0, 3)]});
      end
    end
    prog.push_back(enc_b(0, 0, 0, 0));                     // beq x0, x0, 0 (end)
  endtask

  // ---------------- run ------------------------------------------------
  int cycles = 0, executed = 0;
  logic [31:0] halt_pc, loop_exit_pc;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d pc=%h %s: got %h expected %h", cycles, m_pc, what, got, exp);
    end
  endtask

  initial begin
    logic we, mwe;
    logic [4:0] rd;
    logic [31:0] wd, maddr, mwd, npc, inst_m;
    n_r = 0; n_i = 0; n_lb = 0; n_lh = 0; n_lw = 0; n_lbu = 0; n_lhu = 0; n_sw = 0;
    n_taken = 0; n_not_taken = 0; n_backward = 0; n_x0 = 0; n_nop = 0;
    build_program();
    halt_pc = 32'(4 * (prog.size() - 1));
    for (int i = 0; i < 32; i++) m_x[i] = '0;
    for (int i = 0; i < DMEM_WORDS; i++) m_mem[i] = '0;
    m_pc = 32'h0;

    // load the program while in reset
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 32'(4 * i); prog_wdata = prog[i];
    end
    @(negedge clk);
    prog_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;

    // run: one instruction per cycle, compared mid-cycle
    forever begin
      #1;
      cycles++;
      expect_eq(32'(trace.valid), 1, "valid");
      expect_eq(trace.pc, m_pc, "pc");
      if (trace.pc == halt_pc) break;
      if (trace.pc == loop_exit_pc) expect_eq(dut.u_dp.u_rf.regs[7], 32'd55, "loop sum 10+9+...+1");
      inst_m = prog[m_pc[31:2]];
      expect_eq(trace.inst, inst_m, "inst");
      model_step(inst_m, we, rd, wd, mwe, maddr, mwd, npc);
      executed++;
      expect_eq(32'(trace.reg_we), 32'(we), "reg_we");
      if (we) begin
        expect_eq(32'(trace.rd), 32'(rd), "rd");
        expect_eq(trace.reg_wdata, wd, "reg_wdata");
      end
      expect_eq(32'(trace.mem_we), 32'(mwe), "mem_we");
      if (mwe) begin
        expect_eq(trace.mem_addr, maddr, "mem_addr");
        expect_eq(trace.mem_wdata, mwd, "mem_wdata");
      end
      expect_eq(trace.next_pc, npc, "next_pc");
      @(negedge clk);
    end
    // the end branch jumps to itself
    expect_eq(trace.next_pc, halt_pc, "halt self-branch");

    // rate: one instruction per clock cycle
    checks++;
    if (cycles - 1 != executed) begin
      failures++;
      $display("FAIL rate: %0d cycles for %0d instructions", cycles - 1, executed);
    end

    // final architectural state
    for (int r = 0; r < 32; r++) expect_eq(r == 0 ? 32'h0 : dut.u_dp.u_rf.regs[r], m_x[r], $sformatf("x%0d", r));
    for (int i = 0; i < DMEM_WORDS; i++) expect_eq(dut.u_dmem.mem[i], m_mem[i], $sformatf("mem[%0d]", i));

    // every mechanism must have happened
    begin
      int cnt [13];
      string nm [13];
      cnt = '{n_r, n_i, n_lb, n_lh, n_lw, n_lbu, n_lhu, n_sw, n_taken, n_not_taken, n_backward, n_x0, n_nop};
      nm = '{"R-format", "I-format", "lb", "lh", "lw", "lbu", "lhu", "sw", "branch taken",
                         "branch not taken", "backward branch", "x0 write", "no-op"};
      for (int k = 0; k < 13; k++) begin
        $display("  %-18s %0d", nm[k], cnt[k]);
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism never happened: %s", nm[k]); end
      end
    end
    $display("%0d instructions in %0d cycles", executed, cycles - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
