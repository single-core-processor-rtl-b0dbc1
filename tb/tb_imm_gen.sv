// tb_imm_gen: self-checking test of the immediate generator.
// For each format the testbench picks an immediate value, scatters its bits
// into an instruction word the way the format encodes them (other bits
// random), and checks that the generator returns the sign-extended value.
// Includes the worked example offsets (+8 for lw and sw) and the extremes
// of each range (I/S: -2048..2047, B: -4096..4094 in steps of 2).
module tb_imm_gen;
  import riscv_pkg::*;
  logic [31:0] inst, imm;
  imm_sel_t imm_sel;
  int checks = 0, failures = 0;

  imm_gen dut (.inst, .imm_sel, .imm);

  task automatic check_i(input int v);
    logic [11:0] f = 12'(v);
    inst = {f, 20'($urandom)};
    imm_sel = IMM_I; #1;
    checks++;
    if (imm !== 32'(v)) begin failures++; $display("FAIL I imm=%0d got %0d", v, $signed(imm)); end
  endtask

  task automatic check_s(input int v);
    logic [11:0] f = 12'(v);
    logic [31:0] r = $urandom;
    inst = {f[11:5], r[24:12], f[4:0], r[6:0]};
    imm_sel = IMM_S; #1;
    checks++;
    if (imm !== 32'(v)) begin failures++; $display("FAIL S imm=%0d got %0d", v, $signed(imm)); end
  endtask

  task automatic check_b(input int v);   // v even
    logic [12:0] f = 13'(v);
    logic [31:0] r = $urandom;
    inst = {f[12], f[10:5], r[24:12], f[4:1], f[11], r[6:0]};
    imm_sel = IMM_B; #1;
    checks++;
    if (imm !== 32'(v)) begin failures++; $display("FAIL B imm=%0d got %0d", v, $signed(imm)); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // lw x14, 8(x2) and sw x14, 8(x2) as encoded in the reference examples
    inst = 32'b000000001000_00010_010_01110_0000011; imm_sel = IMM_I; #1;
    checks++; if (imm !== 32'd8) begin failures++; $display("FAIL lw example"); end
    inst = 32'b0000000_01110_00010_010_01000_0100011; imm_sel = IMM_S; #1;
    checks++; if (imm !== 32'd8) begin failures++; $display("FAIL sw example"); end
    check_i(-2048); check_i(2047); check_i(-1); check_i(0);
    check_s(-2048); check_s(2047); check_s(-1); check_s(0);
    check_b(-4096); check_b(4094); check_b(-2); check_b(0);
    for (int i = 0; i < 1000; i++) begin
      check_i(int'($urandom_range(0, 4095)) - 2048);
      check_s(int'($urandom_range(0, 4095)) - 2048);
      check_b(2 * (int'($urandom_range(0, 4095)) - 2048));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
