// tb_adder: self-checking test of the carry-in/carry-out adder.
// Drives corner values (all ones, carry propagation through every bit) and
// random operands, and compares sum and carry_out with a 64-bit reference
// sum computed in the testbench.
module tb_adder;
  logic [31:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  adder #(.WIDTH(32)) dut (.a, .b, .carry_in(cin), .sum, .carry_out(cout));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    longint unsigned ref_sum;
    a = ta; b = tb_; cin = tc;
    #1;
    ref_sum = longint'(ta) + longint'(tb_) + longint'(tc);
    checks++;
    if (sum !== ref_sum[31:0] || cout !== ref_sum[32]) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b: sum=%h cout=%b expected %h %b", ta, tb_, tc, sum, cout, ref_sum[31:0], ref_sum[32]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'hFFFF_FFFF, 32'h0, 1'b1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check(32'h0000_1000, 32'd4, 1'b0);
    check(32'h7FFF_FFFF, 32'd1, 1'b0);
    for (int i = 0; i < 32; i++) check((32'h1 << i) - 1, 32'h1, 1'b0);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
