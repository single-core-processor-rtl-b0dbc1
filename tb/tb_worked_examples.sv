// tb_worked_examples: the processor on the classic single-cycle examples.
//
// Runs, with the PC placed so that the first example sits at address 1000:
//   1000  add x1, x2, x3
//   1004  add x6, x7, x9
//   1008  lw  x14, 8(x2)      encoded 0x00812703 (imm=+8, rs1=2, lw, rd=14)
// after a short set-up that fills x2, x3, x7, x9 and stores x14 with
// "sw x14, 8(x2)", encoded 0x00E12423 (offset 8 split into imm[11:5]=0 and
// imm[4:0]=01000). Checks the add timing: PC is 1000 for one cycle, then
// 1004, then 1008; pc+4 is 1004 during the first cycle; x1 keeps its old
// value for the whole cycle and holds x2+x3 right after the next rising
// edge. Checks that sw wrote memory word 0x108 and that lw brought the value
// back into x14, and that each instruction takes exactly one cycle.
module tb_worked_examples;
  import riscv_pkg::*;

  localparam logic [31:0] START = 32'd1000 - 32'd28;   // seven set-up instructions

  logic clk = 1'b0, rst_n = 1'b0, prog_we = 1'b0;
  logic [31:0] prog_addr = '0, prog_wdata = '0;
  trace_t trace;
  int checks = 0, failures = 0;

  riscv_single_cycle #(.RESET_PC(START)) dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .trace);

  always #5 clk = ~clk;

  logic [31:0] prog [11] = '{
    32'h1000_0113,  // addi x2, x0, 0x100
    32'h0170_0193,  // addi x3, x0, 23
    32'hFFB0_0393,  // addi x7, x0, -5
    32'h3E80_0493,  // addi x9, x0, 1000
    32'h04D0_0713,  // addi x14, x0, 77
    32'h00E1_2423,  // sw   x14, 8(x2)
    32'h0000_0713,  // addi x14, x0, 0
    32'h0031_00B3,  // 1000: add x1, x2, x3
    32'h0093_8333,  // 1004: add x6, x7, x9
    32'h0081_2703,  // 1008: lw  x14, 8(x2)
    32'h0000_0063   // 1012: beq x0, x0, 0
  };

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (%h) expected %0d (%h)", what, got, got, exp, exp);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x1_before;
    int cycles;
    for (int i = 0; i < 11; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = START + 32'(4 * i); prog_wdata = prog[i];
    end
    @(negedge clk);
    prog_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    #1;
    expect_eq(trace.pc, START, "reset PC");
    // set-up: seven cycles
    repeat (7) @(posedge clk);
    #1;
    // cycle of add x1, x2, x3
    expect_eq(trace.pc, 32'd1000, "PC of first add");
    expect_eq(trace.inst, 32'h0031_00B3, "inst at 1000");
    expect_eq(dut.u_dp.pc_plus4, 32'd1004, "pc+4 during first add");
    expect_eq(trace.reg_wdata, 32'h100 + 32'd23, "alu = Reg[2]+Reg[3]");
    x1_before = dut.u_dp.u_rf.regs[1];
    @(negedge clk);
    expect_eq(dut.u_dp.u_rf.regs[1], x1_before, "x1 unchanged before the rising edge");
    expect_eq(trace.pc, 32'd1000, "PC still 1000 in the second half of the cycle");
    @(posedge clk); #1;
    expect_eq(dut.u_dp.u_rf.regs[1], 32'h100 + 32'd23, "x1 = x2 + x3 after the edge");
    expect_eq(trace.pc, 32'd1004, "PC of second add");
    expect_eq(trace.reg_wdata, 32'd995, "alu = Reg[7]+Reg[9]");
    @(posedge clk); #1;
    expect_eq(dut.u_dp.u_rf.regs[6], 32'd995, "x6 = x7 + x9");
    expect_eq(trace.pc, 32'd1008, "PC of lw");
    expect_eq(trace.mem_addr, 32'h108, "lw address = x2 + 8");
    expect_eq(dut.u_dmem.mem[32'h108 >> 2], 32'd77, "sw x14, 8(x2) stored 77");
    @(posedge clk); #1;
    expect_eq(dut.u_dp.u_rf.regs[14], 32'd77, "lw x14, 8(x2) loaded 77");
    // one instruction per cycle: 10 instructions from reset to the end branch
    cycles = 10;
    expect_eq(trace.pc, START + 32'(4 * cycles), "PC after 10 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
