// load_ext: load data alignment and extension.
//
// Combinational. Takes the 32-bit word read from data memory, the low two
// bits of the byte address and the load's funct3, picks the byte or halfword
// the address names (little-endian: byte k is word[8k +: 8], halfword
// addr_lo[1] is word[16*addr_lo[1] +: 16]) and sign-extends (lb, lh) or
// zero-extends (lbu, lhu) it to 32 bits; lw passes the word through. Any
// other funct3 also passes the word. A mux and a few gates, as the reference
// describes it; byte order and the handling of misaligned addresses (the lane
// is picked from the aligned word, no trap) are this design's choices.
module load_ext
  import riscv_pkg::*;
(
  input  logic [31:0] word,
  input  logic [1:0]  addr_lo,
  input  logic [2:0]  funct3,
  output logic [31:0] data
);

  logic [7:0]  byte_sel;
  logic [15:0] half_sel;

  always_comb begin
    byte_sel = word[8*addr_lo +: 8];
    half_sel = word[16*addr_lo[1] +: 16];
    unique case (funct3)
      F3_LB:   data = {{24{byte_sel[7]}}, byte_sel};
      F3_LH:   data = {{16{half_sel[15]}}, half_sel};
      F3_LBU:  data = {24'b0, byte_sel};
      F3_LHU:  data = {16'b0, half_sel};
      default: data = word;  // F3_LW
    endcase
  end

endmodule
