// tb_load_ext: self-checking test of the load alignment/extension logic.
// For random words, every byte offset and every load funct3 (lb, lh, lw,
// lbu, lhu), the output is compared with a reference that shifts the word
// right by the byte offset and extends from the top bit of the access.
module tb_load_ext;
  import riscv_pkg::*;
  logic [31:0] word, data;
  logic [1:0] addr_lo;
  logic [2:0] funct3;
  int checks = 0, failures = 0;

  load_ext dut (.word, .addr_lo, .funct3, .data);

  function automatic logic [31:0] ref_load(input logic [31:0] w, input logic [1:0] lo, input logic [2:0] f3);
    logic [31:0] sh_b = w >> (8 * lo);
    logic [31:0] sh_h = w >> (lo[1] ? 16 : 0);
    case (f3)
      3'b000:  return sh_b[7] ? (sh_b | 32'hFFFF_FF00) : (sh_b & 32'hFF);
      3'b001:  return sh_h[15] ? (sh_h | 32'hFFFF_0000) : (sh_h & 32'hFFFF);
      3'b100:  return sh_b & 32'hFF;
      3'b101:  return sh_h & 32'hFFFF;
      default: return w;
    endcase
  endfunction

  logic [2:0] f3s [5] = '{3'b000, 3'b001, 3'b010, 3'b100, 3'b101};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      word = (i == 0) ? 32'h80FF_7F01 : (i == 1) ? 32'h7F80_8000 : $urandom;
      for (int lo = 0; lo < 4; lo++)
        for (int k = 0; k < 5; k++) begin
          if (f3s[k][0] && lo[0]) continue;   // halfwords aligned
          if (f3s[k] == 3'b010 && lo != 0) continue;
          addr_lo = 2'(lo); funct3 = f3s[k]; #1;
          checks++;
          if (data !== ref_load(word, 2'(lo), f3s[k])) begin
            failures++;
            $display("FAIL word=%h lo=%0d f3=%b: %h expected %h", word, lo, f3s[k], data, ref_load(word, 2'(lo), f3s[k]));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
