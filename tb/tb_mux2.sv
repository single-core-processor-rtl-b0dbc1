// tb_mux2: self-checking test of the two-input multiplexer: y must equal a
// for sel = 0 and b for sel = 1, over random data.
module tb_mux2;
  logic [31:0] a, b, y;
  logic sel;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(32)) dut (.a, .b, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a = $urandom; b = $urandom; sel = 1'(i % 2);
      #1;
      checks++;
      if (y !== (sel ? b : a)) begin
        failures++;
        $display("FAIL sel=%b a=%h b=%h y=%h", sel, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
