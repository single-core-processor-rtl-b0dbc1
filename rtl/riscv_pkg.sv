// riscv_pkg: types and constants shared by the single-cycle RV32 processor.
//
// Holds the major opcodes and funct3 codes of the instructions the datapath
// executes (R-format ALU ops, I-format ALU ops, loads, sw, branches), the
// encodings of the control signals ImmSel and ALUSel, and the commit-trace
// record the top level reports once per clock cycle.
// The instruction encodings are the standard RV32I ones. ALUSel keeps
// add = 0 and sub = 1 as in the reference datapath; the codes of the other
// ALU operations and of ImmSel are this design's own choice.
package riscv_pkg;

  localparam int XLEN = 32;

  // Major opcodes, inst[6:0]
  localparam logic [6:0] OPC_OP     = 7'b0110011;  // R-format ALU
  localparam logic [6:0] OPC_OP_IMM = 7'b0010011;  // I-format ALU (addi ...)
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;

  // funct3 of ALU operations
  localparam logic [2:0] F3_ADD  = 3'b000;  // add / sub / addi
  localparam logic [2:0] F3_SLL  = 3'b001;
  localparam logic [2:0] F3_SLT  = 3'b010;
  localparam logic [2:0] F3_SLTU = 3'b011;
  localparam logic [2:0] F3_XOR  = 3'b100;
  localparam logic [2:0] F3_SR   = 3'b101;  // srl / sra
  localparam logic [2:0] F3_OR   = 3'b110;
  localparam logic [2:0] F3_AND  = 3'b111;

  // funct3 of loads and stores
  localparam logic [2:0] F3_LB  = 3'b000;
  localparam logic [2:0] F3_LH  = 3'b001;
  localparam logic [2:0] F3_LW  = 3'b010;
  localparam logic [2:0] F3_LBU = 3'b100;
  localparam logic [2:0] F3_LHU = 3'b101;
  localparam logic [2:0] F3_SW  = 3'b010;

  // funct3 of branches
  localparam logic [2:0] F3_BEQ  = 3'b000;
  localparam logic [2:0] F3_BNE  = 3'b001;
  localparam logic [2:0] F3_BLT  = 3'b100;
  localparam logic [2:0] F3_BGE  = 3'b101;
  localparam logic [2:0] F3_BLTU = 3'b110;
  localparam logic [2:0] F3_BGEU = 3'b111;

  // ImmSel: which instruction format the immediate generator decodes
  typedef enum logic [1:0] {
    IMM_I = 2'd0,
    IMM_S = 2'd1,
    IMM_B = 2'd2
  } imm_sel_t;

  // ALUSel: add = 0 and sub = 1 as in the reference datapath
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_SLL  = 4'd2,
    ALU_SLT  = 4'd3,
    ALU_SLTU = 4'd4,
    ALU_XOR  = 4'd5,
    ALU_SRL  = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_OR   = 4'd8,
    ALU_AND  = 4'd9
  } alu_sel_t;

  // Mux select values
  localparam logic PCSEL_PC4 = 1'b0, PCSEL_ALU = 1'b1;
  localparam logic ASEL_REG  = 1'b0, ASEL_PC   = 1'b1;
  localparam logic BSEL_REG  = 1'b0, BSEL_IMM  = 1'b1;
  localparam logic WBSEL_MEM = 1'b0, WBSEL_ALU = 1'b1;

  // What the instruction executed in the current cycle does to the
  // architectural state; it takes effect at the next rising clock edge.
  typedef struct packed {
    logic            valid;     // out of reset: an instruction executes
    logic [XLEN-1:0] pc;
    logic [31:0]     inst;
    logic            reg_we;    // RegWEn (writes to x0 included)
    logic [4:0]      rd;
    logic [XLEN-1:0] reg_wdata;
    logic            mem_we;    // MemRW = write
    logic [XLEN-1:0] mem_addr;
    logic [XLEN-1:0] mem_wdata;
    logic [XLEN-1:0] next_pc;
  } trace_t;

endpackage
