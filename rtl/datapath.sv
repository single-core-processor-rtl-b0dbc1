// datapath: the processor's single-cycle datapath, without its control.
//
// Holds the state an instruction reads and updates - the PC and the 32 x 32
// register file - and the combinational units between them: the PC + 4
// adder, the immediate generator, the branch comparator, the ALU with its A
// and B operand muxes, the load extender, and the PCSel and WBSel muxes.
// It is steered entirely by the control inputs (PCSel, ImmSel, RegWEn, BrUn,
// ASel, BSel, ALUSel, WBSel) and reports BrEq / BrLT back to the control.
//
//   next PC  = PCSel ? alu : PC + 4            (loaded every rising edge)
//   A        = ASel ? PC : R[inst[19:15]]      B = BSel ? imm : R[inst[24:20]]
//   alu      = A ALUSel B                      -> dmem_addr
//   dmem_wdata = R[inst[24:20]]
//   R[inst[11:7]] <= WBSel ? alu : load_ext(dmem_rdata)   when RegWEn
//
// The instruction and data memories sit outside: pc is the instruction
// address, inst the word read back in the same cycle; dmem_addr/dmem_wdata go
// to data memory and dmem_rdata comes back combinationally. rst_n
// (synchronous, active low) holds the PC at RESET_PC and blocks register
// writes. The units and their connections follow the reference datapath; the
// reset is this design's addition.
module datapath
  import riscv_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory
  output logic [31:0] pc,
  input  logic [31:0] inst,
  // control
  input  logic        pc_sel,
  input  imm_sel_t    imm_sel,
  input  logic        reg_wen,
  input  logic        br_un,
  input  logic        a_sel,
  input  logic        b_sel,
  input  alu_sel_t    alu_sel,
  input  logic        wb_sel,
  output logic        br_eq,
  output logic        br_lt,
  // data memory
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  // value written back and next PC (for observation)
  output logic [31:0] wb_data,
  output logic [31:0] pc_next
);

  logic [31:0] pc_plus4;
  logic [31:0] rs1_data, rs2_data, imm;
  logic [31:0] alu_a, alu_b, alu_out;
  logic [31:0] load_data;
  logic        pc_carry;   // carry out of PC + 4, not used

  // ---- instruction fetch ----------------------------------------------
  register_we #(.N(32), .RESET_VALUE(RESET_PC)) u_pc (
    .clk, .rst_n, .we(1'b1), .d(pc_next), .q(pc)
  );

  adder #(.WIDTH(32)) u_pc_add (
    .a(pc), .b(32'd4), .carry_in(1'b0), .sum(pc_plus4), .carry_out(pc_carry)
  );

  mux2 #(.WIDTH(32)) u_pc_mux (.a(pc_plus4), .b(alu_out), .sel(pc_sel), .y(pc_next));

  // ---- decode / register read -----------------------------------------
  regfile #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk, .we(reg_wen && rst_n), .ra(inst[19:15]), .rb(inst[24:20]), .rw(inst[11:7]),
    .busw(wb_data), .busa(rs1_data), .busb(rs2_data)
  );

  imm_gen u_imm (.inst, .imm_sel, .imm);

  // ---- execute ----------------------------------------------------------
  branch_comp u_bcmp (.a(rs1_data), .b(rs2_data), .br_un, .br_eq, .br_lt);

  mux2 #(.WIDTH(32)) u_a_mux (.a(rs1_data), .b(pc),  .sel(a_sel), .y(alu_a));
  mux2 #(.WIDTH(32)) u_b_mux (.a(rs2_data), .b(imm), .sel(b_sel), .y(alu_b));

  alu u_alu (.a(alu_a), .b(alu_b), .alu_sel, .result(alu_out));

  // ---- memory access ----------------------------------------------------
  always_comb begin
    dmem_addr  = alu_out;
    dmem_wdata = rs2_data;
  end

  load_ext u_lext (
    .word(dmem_rdata), .addr_lo(alu_out[1:0]), .funct3(inst[14:12]), .data(load_data)
  );

  // ---- write back -------------------------------------------------------
  mux2 #(.WIDTH(32)) u_wb_mux (.a(load_data), .b(alu_out), .sel(wb_sel), .y(wb_data));

endmodule
