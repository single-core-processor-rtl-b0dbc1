// tb_magic_mem: self-checking test of the magic memory.
// Random writes and reads against a model: the read port must follow the
// address with no clock edge, a write must land at the rising edge with
// we = 1 only, and address bits [1:0] must not change the word selected.
module tb_magic_mem;
  localparam int WORDS = 64;
  logic clk = 1'b0, we;
  logic [31:0] addr, din, dout;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  magic_mem #(.WORDS(WORDS)) dut (.clk, .we, .addr, .din, .dout);

  always #5 clk = ~clk;

  task automatic read_check(input logic [31:0] a);
    addr = a;
    #1;
    checks++;
    if (dout !== model[a[7:2]]) begin
      failures++;
      $display("FAIL read addr=%h: dout=%h expected %h", a, dout, model[a[7:2]]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; addr = '0; din = '0;
    for (int i = 0; i < WORDS; i++) model[i] = '0;
    for (int i = 0; i < WORDS; i++) read_check(32'(i * 4));   // cleared at start
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1'b1; addr = 32'(i * 4); din = $urandom;
      @(posedge clk); #1;
      model[i] = din;
      we = 1'b0;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); din = $urandom;
      read_check({24'b0, 6'($urandom), 2'($urandom)});
      @(posedge clk); #1;
      if (we) model[addr[7:2]] = din;
      we = 1'b0;
      read_check(addr ^ 32'h3);   // same word, other byte offset
      read_check(32'($urandom) & 32'hFF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
