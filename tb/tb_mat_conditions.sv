// Testbench of mat_conditions: the selector must return cond[csb] for random
// condition vectors and all 128 codes; CR stores the selected condition at
// its pointer and reads it back; KC/KD load, set and clear; CYL/CYS switch
// the cycle mode from the next clock.
`timescale 1ns/1ps
module tb_mat_conditions;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [127:0] cond;
  logic [6:0] csb;
  logic sc, cr_ld, kc_ld, kc_set, kc_clr, kd_ld, kd_set, kd_clr, cyl, cys;
  sg_cmd_t cr_cmd;
  logic cr, crp_ovf, kc, kd, long_mode;
  mat_conditions dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    logic [15:0] saved;
    cond = 0; csb = 0; cr_ld = 0; kc_ld = 0; kc_set = 0; kc_clr = 0; kd_ld = 0; kd_set = 0;
    kd_clr = 0; cyl = 0; cys = 0; cr_cmd = SG_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      cond = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 128; i++) begin
        csb = 7'(i);
        #1;
        checks++;
        if (sc !== cond[i]) failures++;
      end
    end
    // CR: store 16 selected conditions, read them back
    csb = 7'd5;
    for (int i = 0; i < 16; i++) begin
      cond[5] = 1'($urandom); saved[i] = cond[5];
      cr_cmd = SG_IDLE; cr_cmd.p_op = R_LD; cr_cmd.val = 4'(i);
      @(negedge clk);
      cr_cmd = SG_IDLE; cr_ld = 1;
      @(negedge clk);
      cr_ld = 0;
    end
    for (int i = 0; i < 16; i++) begin
      cr_cmd = SG_IDLE; cr_cmd.p_op = R_LD; cr_cmd.val = 4'(i);
      @(negedge clk);
      cr_cmd = SG_IDLE;
      check(cr == saved[i] && crp_ovf == (i == 15), $sformatf("CR[%0d]", i));
    end
    cond[5] = 1; kc_ld = 1; kd_set = 1; @(negedge clk); kc_ld = 0; kd_set = 0;
    check(kc && kd, "KC := condition, set KD");
    kc_clr = 1; cond[5] = 1; kd_ld = 1; cond[5] = 0; @(negedge clk); kc_clr = 0; kd_ld = 0;
    check(!kc && !kd, "clear KC, KD := condition");
    check(!long_mode, "short cycle after reset");
    cyl = 1; #1; check(!long_mode, "CYL acts from the next clock");
    @(negedge clk); cyl = 0;
    check(long_mode, "long cycle");
    cys = 1; @(negedge clk); cys = 0;
    check(!long_mode, "short cycle again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
