// riscv_single_cycle: one-instruction-per-cycle RV32 processor with its
// instruction and data memories.
//
// Every instruction completes in one clock cycle. Between two rising edges
// the PC addresses instruction memory, the instruction selects two registers
// (rs1, rs2) and an immediate, the ALU combines them, data memory is read or
// prepared for a write, and the value for rd is chosen; at the next rising
// edge the PC, the destination register and (for a store) the memory word are
// all updated together. Fetch, decode/register read, execute, memory access
// and write back are thus phases of one combinational path, not pipeline
// stages.
//
// Structure: the processor is the datapath (PC, register file, ALU and the
// units around them) plus the control logic that decodes each instruction
// into the datapath's select and enable signals; beside it sit two magic
// memories, IMEM for instructions and DMEM for data, each read
// combinationally and written at the rising edge. The processor executes the
// R-format ALU group, the I-format ALU group, lb/lh/lw/lbu/lhu, sw and the
// six conditional branches; other opcodes are no-ops.
//
// Interface: clk, rst_n (synchronous, active low; PC <= RESET_PC, no register
// or memory writes). The prog_* port writes instruction memory (one word per
// cycle, byte address) and is meant for loading a program while rst_n is low.
// trace reports, in the cycle an instruction executes, its PC, encoding,
// register write, memory write and next PC; these take effect at the next
// rising edge. The load port, the trace, the reset and the memory sizes are
// this design's additions; the datapath and its control signals follow the
// reference design.
module riscv_single_cycle
  import riscv_pkg::*;
#(
  parameter int          IMEM_WORDS = 1024,
  parameter int          DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_wdata,
  output trace_t      trace
);

  logic [31:0] pc, pc_next, inst, imem_addr;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata, wb_data;

  logic     pc_sel, reg_wen, br_un, a_sel, b_sel, mem_rw, wb_sel;
  logic     br_eq, br_lt;
  imm_sel_t imm_sel;
  alu_sel_t alu_sel;

  // ---- processor: datapath + control ----------------------------------
  datapath #(.RESET_PC(RESET_PC)) u_dp (
    .clk, .rst_n, .pc, .inst,
    .pc_sel, .imm_sel, .reg_wen, .br_un, .a_sel, .b_sel, .alu_sel, .wb_sel,
    .br_eq, .br_lt,
    .dmem_addr, .dmem_wdata, .dmem_rdata, .wb_data, .pc_next
  );

  control_logic u_ctrl (
    .inst, .br_eq, .br_lt, .pc_sel, .imm_sel, .reg_wen, .br_un,
    .a_sel, .b_sel, .alu_sel, .mem_rw, .wb_sel
  );

  // ---- memories -----------------------------------------------------------
  // The load port borrows the IMEM address while it writes.
  always_comb imem_addr = prog_we ? prog_addr : pc;

  magic_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .we(prog_we), .addr(imem_addr), .din(prog_wdata), .dout(inst)
  );

  magic_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .we(mem_rw && rst_n), .addr(dmem_addr), .din(dmem_wdata), .dout(dmem_rdata)
  );

  // ---- commit trace -----------------------------------------------------
  always_comb begin
    trace.valid     = rst_n;
    trace.pc        = pc;
    trace.inst      = inst;
    trace.reg_we    = reg_wen && rst_n;
    trace.rd        = inst[11:7];
    trace.reg_wdata = wb_data;
    trace.mem_we    = mem_rw && rst_n;
    trace.mem_addr  = dmem_addr;
    trace.mem_wdata = dmem_wdata;
    trace.next_pc   = pc_next;
  end

  // A program is loaded only while the core is held in reset.
  a_prog_in_reset: assert property (@(posedge clk) prog_we |-> !rst_n)
    else $error("instruction memory written while the processor runs");

endmodule
