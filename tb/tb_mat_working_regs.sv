// Testbench of mat_working_regs (256 x 64): fills all registers through the
// coupled 8-bit pointer (increment carries U into G), reads them back,
// checks uncoupled counting (U wraps without touching G), saving and
// restoring U and G through their Standard Groups, and a masked write
// through a loading mask (only mask bits change).
`timescale 1ns/1ps
module tb_mat_working_regs;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rop_e u_op, g_op;
  logic [3:0] u_val, g_val;
  logic couple, uncouple, us_we, gs_we, lm_we, we;
  sg_cmd_t us_cmd, gs_cmd, lm_cmd;
  logic [63:0] sb, rdata;
  logic [7:0] ptr;
  logic coupled, p_ovf, u_ovf, g_ovf, us_ovf, gs_ovf;
  mat_working_regs #(.NREG(256)) dut (.*);
  int checks = 0, failures = 0;
  logic [63:0] m [256];
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", what); end
  endtask
  task automatic idle();
    u_op = R_NOP; g_op = R_NOP; u_val = 0; g_val = 0; couple = 0; uncouple = 0;
    us_we = 0; gs_we = 0; lm_we = 0; we = 0; us_cmd = SG_IDLE; gs_cmd = SG_IDLE;
    lm_cmd = SG_IDLE; sb = 0;
  endtask
  initial begin
    idle();
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(coupled && ptr == 0, "reset: coupled, pointer 0");
    for (int i = 0; i < 256; i++) begin
      m[i] = {$urandom, $urandom};
      we = 1; sb = m[i]; u_op = R_INC;
      @(negedge clk);
    end
    idle();
    check(ptr == 0, "pointer wrapped after 256 increments");
    for (int i = 0; i < 256; i++) begin
      check(rdata == m[i] && p_ovf == (i == 255), $sformatf("read %0d", i));
      u_op = R_INC;
      @(negedge clk);
    end
    idle();
    // uncoupled: U wraps, G stays
    g_op = R_LD; g_val = 4'd3; u_op = R_LD; u_val = 4'd15; uncouple = 1;
    @(negedge clk); idle();
    u_op = R_INC; @(negedge clk); idle();
    check(ptr == 8'h30 && !coupled, "uncoupled U wraps without carry");
    // coupled decrement borrows
    couple = 1; @(negedge clk); idle();
    u_op = R_DEC; @(negedge clk); idle();
    check(ptr == 8'h2F, "coupled decrement borrows from G");
    // save and restore both halves
    us_we = 1; gs_we = 1; @(negedge clk); idle();
    u_op = R_CLR; g_op = R_CLR; @(negedge clk); idle();
    check(ptr == 0, "cleared");
    u_op = R_LSG; g_op = R_LSG; @(negedge clk); idle();
    check(ptr == 8'h2F, "restored from save groups");
    // masked write through the loading mask
    sb = 64'h0000_FFFF_0000_FFFF; lm_we = 1; @(negedge clk); idle();
    sb = 64'hAAAA_AAAA_AAAA_AAAA; we = 1; @(negedge clk); idle();
    check(rdata == ((m[8'h2F] & ~64'h0000_FFFF_0000_FFFF) | (64'hAAAA_AAAA_AAAA_AAAA & 64'h0000_FFFF_0000_FFFF)),
          "masked write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
