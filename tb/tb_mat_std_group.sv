// Testbench of mat_std_group: random pointer, Save1, Save2 and element
// operations against a reference model, 16-bit elements. Checks the read
// element, the pointer, both save registers and the overflow flag after each
// clock (all operations take effect at the next rising edge).
`timescale 1ns/1ps
module tb_mat_std_group;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  sg_cmd_t cmd;
  logic we;
  logic [15:0] wd, rd;
  logic [3:0] ptr, s1, s2;
  logic ovf;
  mat_std_group #(.W(16)) dut (.clk, .rst_n, .cmd, .we, .wd, .rd, .ptr, .s1, .s2, .ptr_ovf(ovf));

  int checks = 0, failures = 0;
  logic [15:0] m_el [16];
  logic [3:0] m_p, m_s1, m_s2;

  initial begin
    cmd = SG_IDLE; we = 0; wd = 0;
    for (int i = 0; i < 16; i++) m_el[i] = 0;
    m_p = 0; m_s1 = 0; m_s2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      cmd.p_op  = rop_e'($urandom_range(0, 6));
      cmd.s1_op = ($urandom_range(0, 2) == 0) ? R_LD : ($urandom_range(0, 1) ? R_LS2 : R_NOP);
      cmd.s2_ld = $urandom_range(0, 3) == 0;
      cmd.val   = 4'($urandom);
      we = $urandom_range(0, 1);
      wd = 16'($urandom);
      @(posedge clk);
      begin
        logic [3:0] p0;
        p0 = m_p;
        if (we) m_el[p0] = wd;
        case (cmd.p_op)
          R_LD: m_p = cmd.val;
          R_LS1: m_p = m_s1;
          R_LS2: m_p = m_s2;
          R_INC: m_p = p0 + 1;
          R_DEC: m_p = p0 - 1;
          R_CLR: m_p = 0;
          default: ;
        endcase
        case (cmd.s1_op)
          R_LD: m_s1 = cmd.val;
          R_LS2: m_s1 = m_s2;
          default: ;
        endcase
        if (cmd.s2_ld) m_s2 = p0;
      end
      #1;
      checks++;
      if (ptr !== m_p || s1 !== m_s1 || s2 !== m_s2 || rd !== m_el[m_p] || ovf !== (m_p == 15)) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d ptr %0d/%0d s1 %0d/%0d s2 %0d/%0d rd %h/%h",
                                   n, ptr, m_p, s1, m_s1, s2, m_s2, rd, m_el[m_p]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
