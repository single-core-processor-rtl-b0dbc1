// tb_regfile: self-checking test of the 32 x 32 register file.
// Writes every register, then runs random write/read cycles against a model
// array. Checks that both read ports are combinational (new ra/rb give new
// data with no clock edge), that a write lands only at the rising edge and
// only with we = 1, and that register 0 reads 0 whatever is written to it.
module tb_regfile;
  logic clk = 1'b0, we;
  logic [4:0] ra, rb, rw;
  logic [31:0] busw, busa, busb;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile #(.NREGS(32), .WIDTH(32)) dut (.clk, .we, .ra, .rb, .rw, .busw, .busa, .busb);

  always #5 clk = ~clk;

  task automatic read_check(input logic [4:0] x, input logic [4:0] y);
    ra = x; rb = y;
    #1;
    checks++;
    if (busa !== model[x] || busb !== model[y]) begin
      failures++;
      $display("FAIL read ra=%0d rb=%0d: busa=%h busb=%h expected %h %h", x, y, busa, busb, model[x], model[y]);
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
    model[0] = '0;
    we = 1'b0; ra = '0; rb = '0; rw = '0; busw = '0;
    // fill every register (register 0 included)
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1'b1; rw = 5'(r); busw = $urandom;
      if (r != 0) model[r] = busw;
    end
    @(negedge clk); we = 1'b0;
    for (int r = 0; r < 32; r++) read_check(5'(r), 5'(31 - r));
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); rw = 5'($urandom); busw = $urandom;
      read_check(rw, 5'($urandom));   // before the edge: old value
      @(posedge clk); #1;
      if (we && rw != 0) model[rw] = busw;
      we = 1'b0;
      read_check(rw, 5'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
