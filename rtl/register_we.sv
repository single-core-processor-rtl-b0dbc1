// register_we: N-bit register with write enable.
//
// On a rising clk edge q takes d when we = 1 and holds its value when we = 0;
// between edges q does not change. The processor's PC is one of these with we
// tied to 1, so it is updated every cycle. The synchronous active-low reset to
// RESET_VALUE is this design's addition; the enable behaviour is the
// reference one.
module register_we #(
  parameter int          N           = 32,
  parameter logic [N-1:0] RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= RESET_VALUE;
    else if (we) q <= d;
  end

endmodule
