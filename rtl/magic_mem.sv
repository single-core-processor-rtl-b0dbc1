// magic_mem: idealised word memory with a combinational read port.
//
// Read: addr selects the word put on dout, with no clock involved (valid
// after the access time). Write: on a rising clk edge with we = 1 the word
// selected by addr takes din. addr is a byte address; the word index is
// addr[2 +: log2(WORDS)] and higher bits wrap. The processor instantiates it
// twice, as instruction memory (IMEM) and data memory (DMEM). Depth WORDS and
// the clearing of the array at time zero are this design's choices.
module magic_mem #(
  parameter int WORDS = 1024,
  localparam int IW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] din,
  output logic [31:0] dout
);

  logic [31:0] mem [WORDS];
  logic [IW-1:0] idx;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always_comb begin
    idx  = addr[2 +: IW];
    dout = mem[idx];
  end

  always_ff @(posedge clk) begin
    if (we) mem[idx] <= din;
  end

endmodule
