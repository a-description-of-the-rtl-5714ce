// Testbench of mat_double_shifter (DS): random two-place shifts, loads and
// fill selections against a model; checks the register, the variable pair
// {DS(V+1), DS(V)} and the V position after every clock.
`timescale 1ns/1ps
module tb_mat_double_shifter;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  shctl_e ctl;
  logic [63:0] sb, q;
  logic [1:0] r_ext [8];
  logic [1:0] l_ext [8];
  logic slo_ld, shi_ld, set_ll, set_lr;
  logic [2:0] src_val;
  rop_e v_op;
  logic [5:0] v_val, vsel;
  logic [1:0] vpair;
  mat_double_shifter dut (.*);
  int checks = 0, failures = 0;
  logic [63:0] mq;
  logic [2:0] ml, mh;
  logic [5:0] mv;
  initial begin
    ctl = SH_IDLE; sb = 0; slo_ld = 0; shi_ld = 0; set_ll = 0; set_lr = 0; src_val = 0;
    v_op = R_NOP; v_val = 0;
    for (int i = 0; i < 8; i++) begin r_ext[i] = 0; l_ext[i] = 0; end
    mq = 0; ml = 0; mh = 0; mv = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      logic [1:0] rc [8];
      logic [1:0] lc [8];
      logic [1:0] vp;
      ctl = shctl_e'($urandom_range(0, 3));
      sb = {$urandom, $urandom};
      for (int i = 0; i < 8; i++) begin r_ext[i] = 2'($urandom); l_ext[i] = 2'($urandom); end
      slo_ld = $urandom_range(0, 5) == 0; shi_ld = $urandom_range(0, 5) == 0;
      set_ll = $urandom_range(0, 9) == 0; set_lr = $urandom_range(0, 9) == 0;
      src_val = 3'($urandom);
      v_op = ($urandom_range(0, 4) == 0) ? R_LD : ($urandom_range(0, 4) == 0 ? R_DEC : R_NOP);
      v_val = 6'($urandom);
      #1;
      vp = {mq[6'(mv + 1)], mq[mv]};
      for (int i = 0; i < 8; i++) begin rc[i] = r_ext[i]; lc[i] = l_ext[i]; end
      rc[0] = 0; lc[0] = 0; rc[1] = 3; lc[1] = 3; rc[2] = mq[1:0]; lc[2] = mq[63:62];
      rc[6] = vp; lc[6] = vp;
      checks++;
      if (vpair !== vp) failures++;
      @(posedge clk);
      case (ctl)
        SH_RIGHT: mq = {rc[mh], mq[63:2]};
        SH_LEFT:  mq = {mq[61:0], lc[ml]};
        SH_LOAD:  mq = sb;
        default: ;
      endcase
      if (slo_ld) ml = src_val; else if (set_ll) ml = 0;
      if (shi_ld) mh = src_val; else if (set_lr) mh = 0;
      if (v_op == R_LD) mv = v_val; else if (v_op == R_DEC) mv = mv - 1;
      #1;
      checks++;
      if (q !== mq || vsel !== mv) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d q=%h exp=%h", n, q, mq);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
