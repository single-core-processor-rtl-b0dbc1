// tb_branch_comp: self-checking test of the branch comparator.
// BrEq and BrLT are compared, for both values of BrUn, with 64-bit integer
// comparisons of the operands read as signed or unsigned numbers, on corner
// pairs (equal, sign boundary) and random pairs.
module tb_branch_comp;
  logic [31:0] a, b;
  logic br_un, br_eq, br_lt;
  int checks = 0, failures = 0;

  branch_comp dut (.a, .b, .br_un, .br_eq, .br_lt);

  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic u);
    logic e_eq, e_lt;
    a = x; b = y; br_un = u; #1;
    e_eq = (longint'(x) == longint'(y));
    e_lt = u ? (longint'({32'b0, x}) < longint'({32'b0, y}))
             : (longint'($signed(x)) < longint'($signed(y)));
    checks++;
    if (br_eq !== e_eq || br_lt !== e_lt) begin
      failures++;
      $display("FAIL a=%h b=%h un=%b: eq=%b lt=%b expected %b %b", x, y, u, br_eq, br_lt, e_eq, e_lt);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < 2; u++) begin
      check(32'h8000_0000, 32'h7FFF_FFFF, 1'(u));
      check(32'h7FFF_FFFF, 32'h8000_0000, 1'(u));
      check(32'hFFFF_FFFF, 32'h0, 1'(u));
      check(32'h0, 32'hFFFF_FFFF, 1'(u));
      check(32'h1234_5678, 32'h1234_5678, 1'(u));
      for (int i = 0; i < 1000; i++) begin
        automatic logic [31:0] x = $urandom;
        check(x, (i % 4 == 0) ? x : $urandom, 1'(u));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
