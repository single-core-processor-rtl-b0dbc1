// mux2: WIDTH-bit two-input multiplexer.
//
// y = a when sel = 0, y = b when sel = 1; combinational. The processor uses
// four of them: PCSel (pc+4 / alu), ASel (R[rs1] / PC), BSel (R[rs2] / Imm)
// and WBSel (mem / alu), with the input numbering of the datapath drawings.
module mux2 #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    y = sel ? b : a;
  end

endmodule
