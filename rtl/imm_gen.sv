// imm_gen: immediate generator for the I, S and B instruction formats.
//
// Combinational. Every immediate bit is wired from a fixed instruction bit,
// chosen per format by imm_sel:
//   I: imm[31:11] = inst[31], imm[10:5] = inst[30:25], imm[4:0] = inst[24:20]
//   S: imm[31:11] = inst[31], imm[10:5] = inst[30:25], imm[4:0] = inst[11:7]
//   B: imm[31:12] = inst[31], imm[11] = inst[7], imm[10:5] = inst[30:25],
//      imm[4:1] = inst[11:8], imm[0] = 0
// so I and S differ only in a 5-bit mux on the low bits, and the B immediate
// is an even, 13-bit signed byte offset (-4096 to +4094). The bit layouts are
// the reference ones; the imm_sel encoding is from riscv_pkg.
module imm_gen
  import riscv_pkg::*;
(
  input  logic [31:0] inst,
  input  imm_sel_t    imm_sel,
  output logic [31:0] imm
);

  always_comb begin
    unique case (imm_sel)
      IMM_S:   imm = {{21{inst[31]}}, inst[30:25], inst[11:7]};
      IMM_B:   imm = {{20{inst[31]}}, inst[7], inst[30:25], inst[11:8], 1'b0};
      default: imm = {{21{inst[31]}}, inst[30:25], inst[24:20]};  // IMM_I
    endcase
  end

endmodule
