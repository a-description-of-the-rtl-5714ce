// Testbench of mat_counter (16 bits): random load, group load, increment,
// decrement, clear and "group := counter" against a model. Checks the count,
// the zero condition and that a group write in the same clock as a counter
// change saves the old count. One clock per operation.
`timescale 1ns/1ps
module tb_mat_counter;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rop_e op;
  logic [15:0] val, cnt;
  sg_cmd_t sg_cmd;
  logic sg_we, zero, sg_ovf;
  logic [3:0] sg_ptr;
  mat_counter #(.W(16)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] m_c, m_g [16];
  logic [3:0] m_p;

  initial begin
    op = R_NOP; val = 0; sg_cmd = SG_IDLE; sg_we = 0;
    m_c = 0; m_p = 0;
    for (int i = 0; i < 16; i++) m_g[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      case ($urandom_range(0, 5))
        0: op = R_LD; 1: op = R_LSG; 2: op = R_INC; 3: op = R_DEC; 4: op = R_CLR; default: op = R_NOP;
      endcase
      val = ($urandom_range(0, 3) == 0) ? 16'hFFFF : 16'($urandom);
      sg_we = $urandom_range(0, 2) == 0;
      sg_cmd = SG_IDLE;
      if ($urandom_range(0, 2) == 0) begin sg_cmd.p_op = R_LD; sg_cmd.val = 4'($urandom); end
      @(posedge clk);
      begin
        logic [15:0] c0;
        c0 = m_c;
        case (op)
          R_LD: m_c = val;
          R_LSG: m_c = m_g[m_p];
          R_INC: m_c = c0 + 1;
          R_DEC: m_c = c0 - 1;
          R_CLR: m_c = 0;
          default: ;
        endcase
        if (sg_we) m_g[m_p] = c0;
        if (sg_cmd.p_op == R_LD) m_p = sg_cmd.val;
      end
      #1;
      checks++;
      if (cnt !== m_c || zero !== (m_c == 0) || sg_ptr !== m_p || sg_ovf !== (m_p == 15)) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d cnt %h/%h", n, cnt, m_c);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
