// Testbench of mat_status_port: 64 random 16-bit inputs; the pointer is
// loaded, incremented, decremented and cleared, and the 64-bit output must be
// the selected input zero-extended, from the clock after the pointer change.
`timescale 1ns/1ps
module tb_mat_status_port;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rop_e op;
  logic [5:0] val, spp;
  logic [15:0] din [64];
  logic [63:0] sp;
  mat_status_port dut (.*);
  int checks = 0, failures = 0;
  logic [5:0] m_p;
  initial begin
    op = R_NOP; val = 0; m_p = 0;
    for (int i = 0; i < 64; i++) din[i] = 16'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      case ($urandom_range(0, 4))
        0: op = R_LD; 1: op = R_INC; 2: op = R_DEC; 3: op = R_CLR; default: op = R_NOP;
      endcase
      val = 6'($urandom);
      @(posedge clk);
      case (op)
        R_LD: m_p = val; R_INC: m_p = m_p + 1; R_DEC: m_p = m_p - 1; R_CLR: m_p = 0;
        default: ;
      endcase
      #1;
      checks++;
      if (spp !== m_p || sp !== {48'd0, din[m_p]}) failures++;
      @(negedge clk);
      din[$urandom_range(0, 63)] = 16'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
