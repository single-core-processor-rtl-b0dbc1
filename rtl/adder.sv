// adder: WIDTH-bit binary adder with carry in and carry out.
//
// {carry_out, sum} = a + b + carry_in, purely combinational. In the processor
// it forms PC + 4 (carry_in tied to 0, carry_out unused). Ports and the 32-bit
// width follow the adder symbol of the datapath; the single behavioural
// addition inside is this design's choice, left to synthesis to map.
module adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             carry_in,
  output logic [WIDTH-1:0] sum,
  output logic             carry_out
);

  always_comb begin
    {carry_out, sum} = {1'b0, a} + {1'b0, b} + {{WIDTH{1'b0}}, carry_in};
  end

endmodule
