// tb_register_we: self-checking test of the write-enabled register.
// Checks the reset value, that q follows d only at a rising edge with
// we = 1, that q holds with we = 0, and that q does not change between
// edges when d changes.
module tb_register_we;
  logic clk = 1'b0, rst_n, we;
  logic [31:0] d, q, model;
  int checks = 0, failures = 0;

  register_we #(.N(32), .RESET_VALUE(32'h0000_1000)) dut (.clk, .rst_n, .we, .d, .q);

  always #5 clk = ~clk;

  task automatic expect_q(input logic [31:0] v, input string what);
    checks++;
    if (q !== v) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, v);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b1; d = 32'hDEAD_BEEF;
    @(posedge clk); #1;
    expect_q(32'h0000_1000, "reset");
    rst_n = 1'b1;
    model = 32'h0000_1000;
    for (int i = 0; i < 300; i++) begin
      we = 1'($urandom);
      d  = $urandom;
      #2;                          // d changed, no edge yet
      expect_q(model, "between edges");
      @(posedge clk); #1;
      if (we) model = d;
      expect_q(model, we ? "load" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
