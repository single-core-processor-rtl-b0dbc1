// tb_alu: self-checking test of the ALU.
// Every operation is checked on corner operands (0, 1, -1, most negative,
// most positive, shift amounts 0 and 31) and on random operands against a
// reference written with 64-bit integer arithmetic in the testbench.
module tb_alu;
  import riscv_pkg::*;
  logic [31:0] a, b, result;
  alu_sel_t alu_sel;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alu_sel, .result);

  function automatic logic [31:0] ref_alu(input alu_sel_t op, input logic [31:0] x, input logic [31:0] y);
    longint sx = longint'($signed(x));
    longint sy = longint'($signed(y));
    longint unsigned ux = {32'b0, x};
    longint unsigned uy = {32'b0, y};
    int sh = int'(y & 32'h1F);
    logic [63:0] r;
    case (op)
      ALU_ADD:  r = ux + uy;
      ALU_SUB:  r = ux - uy;
      ALU_SLL:  r = ux * (64'd1 << sh);
      ALU_SLT:  r = (sx < sy) ? 1 : 0;
      ALU_SLTU: r = (ux < uy) ? 1 : 0;
      ALU_XOR:  r = ux ^ uy;
      ALU_SRL:  r = ux / (64'd1 << sh);
      ALU_SRA:  r = 64'(sx >>> sh);
      ALU_OR:   r = ux | uy;
      default:  r = ux & uy;
    endcase
    return r[31:0];
  endfunction

  task automatic check(input alu_sel_t op, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] e;
    a = x; b = y; alu_sel = op; #1;
    e = ref_alu(op, x, y);
    checks++;
    if (result !== e) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h: %h expected %h", op.name(), x, y, result, e);
    end
  endtask

  logic [31:0] corners [7] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1F, 32'h20};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op <= int'(ALU_AND); op++) begin
      for (int i = 0; i < 7; i++)
        for (int j = 0; j < 7; j++)
          check(alu_sel_t'(op), corners[i], corners[j]);
      for (int k = 0; k < 500; k++) check(alu_sel_t'(op), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
