// Testbench of mat_mask_gen: all 128 codes. Code bit 6 = 0: n = code(5:0)
// zeros from bit 63 down, ones below; bit 6 = 1: 128 - code zeros counted
// from bit 0 (ones above them), checked
// against a bit-by-bit model. Combinational.
`timescale 1ns/1ps
module tb_mat_mask_gen;
  logic [6:0] code;
  logic [63:0] mask;
  mat_mask_gen dut (.code, .mask);
  int checks = 0, failures = 0;
  initial begin
    for (int c = 0; c < 128; c++) begin
      logic [63:0] m;
      int zeros;
      code = 7'(c);
      #1;
      m = '1;
      if (c < 64) begin
        for (int i = 0; i < c; i++) m[63 - i] = 1'b0;
      end else begin
        zeros = 128 - c;
        for (int i = 0; i < zeros; i++) m[i] = 1'b0;
      end
      checks++;
      if (mask !== m) begin
        failures++;
        $display("FAIL code %0d mask %h expected %h", c, mask, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
