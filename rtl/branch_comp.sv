// branch_comp: branch comparator.
//
// Combinational. br_eq = 1 when a == b; br_lt = 1 when a < b, compared as
// signed numbers when br_un = 0 and as unsigned numbers when br_un = 1.
// The control logic derives every branch condition from these two flags
// (for example bge taken when !(a < b)). Function and signal names are the
// reference ones.
module branch_comp (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        br_un,
  output logic        br_eq,
  output logic        br_lt
);

  always_comb begin
    br_eq = (a == b);
    br_lt = br_un ? (a < b) : ($signed(a) < $signed(b));
  end

endmodule
