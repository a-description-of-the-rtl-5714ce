// Testbench of mat_alu at 64 bits: all 32 functions with random operands and
// carry-in against an independent model of the function table (arithmetic
// rows as P+Q+cin, logical rows as bitwise functions), including carry out
// and two's complement overflow of A+B and A-B. Combinational.
`timescale 1ns/1ps
module tb_mat_alu;
  logic [63:0] a, b, f;
  logic [4:0] fn;
  logic cin, cout, ovf2, ovf1;
  mat_alu #(.W(64)) dut (.*);
  int checks = 0, failures = 0;

  function automatic logic [64:0] model(input logic [63:0] x, input logic [63:0] y,
                                        input logic [4:0] code, input logic c);
    logic [63:0] p, q;
    if (code[4]) begin
      case (code[3:0])
        0: return {1'b0, ~x};        1: return {1'b0, ~(x | y)};
        2: return {1'b0, ~x & y};    3: return 65'd0;
        4: return {1'b0, ~(x & y)};  5: return {1'b0, ~y};
        6: return {1'b0, x ~^ y};    7: return {1'b0, x & ~y};
        8: return {1'b0, ~x | y};    9: return {1'b0, x ^ y};
        10: return {1'b0, y};        11: return {1'b0, x & y};
        12: return {1'b0, {64{1'b1}}}; 13: return {1'b0, x | ~y};
        14: return {1'b0, x | y};    default: return {1'b0, x};
      endcase
    end
    case (code[3:0])
      0: begin p = x; q = 0; end            1: begin p = x | y; q = 0; end
      2: begin p = x | ~y; q = 0; end       3: begin p = 0; q = '1; end
      4: begin p = x; q = x & ~y; end       5: begin p = x | y; q = x & ~y; end
      6: begin p = x; q = ~y; end           7: begin p = x & ~y; q = '1; end
      8: begin p = x; q = x & y; end        9: begin p = x; q = y; end
      10: begin p = x | ~y; q = x & y; end  11: begin p = x & y; q = '1; end
      12: begin p = x; q = x; end           13: begin p = x | y; q = x; end
      14: begin p = x | ~y; q = x; end      default: begin p = x; q = '1; end
    endcase
    return {1'b0, p} + {1'b0, q} + 65'(c);
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [64:0] m;
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (n % 7 == 0) b = a;
      fn = 5'($urandom); cin = 1'($urandom);
      #1;
      m = model(a, b, fn, cin);
      checks++;
      if (f !== m[63:0] || (!fn[4] && cout !== m[64])) begin
        failures++;
        if (failures < 5) $display("FAIL fn=%h a=%h b=%h f=%h exp=%h", fn, a, b, f, m[63:0]);
      end
      if (fn == 5'b0_1001) begin
        checks++;
        if (ovf2 !== ((a[63] == b[63]) && (f[63] != a[63]))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
