// regfile: register file of NREGS registers, WIDTH bits each (32 x 32).
//
// Two read ports behave as combinational logic: ra selects the register put
// on busa, rb the one put on busb, valid after the access time with no clock
// involved. One write port: on a rising clk edge with we = 1 the register
// selected by rw takes busw. A read of the register being written returns the
// old value until the edge. Register 0 always reads 0 and ignores writes (the
// RISC-V rule, kept here as this design's reading); the registers have no
// reset.
module regfile #(
  parameter int NREGS = 32,
  parameter int WIDTH = 32,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  input  logic [AW-1:0]    rw,
  input  logic [WIDTH-1:0] busw,
  output logic [WIDTH-1:0] busa,
  output logic [WIDTH-1:0] busb
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && rw != '0) regs[rw] <= busw;
  end

  always_comb begin
    busa = (ra == '0) ? '0 : regs[ra];
    busb = (rb == '0) ? '0 : regs[rb];
  end

endmodule
