// Testbench of mat_bit_shifter (AS/VS): random shift right/left/load/idle
// with random fill selections S0/S63 and V position, against a model of the
// eight fill candidates (0, 1, cyclic, external 3, 4, 5, V, external 7).
// Checks the register, V bit and selections after every clock.
`timescale 1ns/1ps
module tb_mat_bit_shifter;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  shctl_e ctl;
  logic [63:0] sb, q;
  logic [7:0] r_ext, l_ext;
  logic s0_ld, s63_ld, set_ll, set_lr, vbit;
  logic [2:0] src_val, s0, s63;
  rop_e v_op;
  logic [5:0] v_val, vsel;
  mat_bit_shifter dut (.*);
  int checks = 0, failures = 0;
  logic [63:0] mq;
  logic [2:0] m0, m63;
  logic [5:0] mv;
  initial begin
    ctl = SH_IDLE; sb = 0; r_ext = 0; l_ext = 0; s0_ld = 0; s63_ld = 0; set_ll = 0; set_lr = 0;
    src_val = 0; v_op = R_NOP; v_val = 0;
    mq = 0; m0 = 0; m63 = 0; mv = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      logic [7:0] rc, lc;
      ctl = shctl_e'($urandom_range(0, 3));
      sb = {$urandom, $urandom};
      r_ext = 8'($urandom); l_ext = 8'($urandom);
      s0_ld = $urandom_range(0, 5) == 0; s63_ld = $urandom_range(0, 5) == 0;
      set_ll = $urandom_range(0, 9) == 0; set_lr = $urandom_range(0, 9) == 0;
      src_val = 3'($urandom);
      v_op = ($urandom_range(0, 4) == 0) ? R_LD : ($urandom_range(0, 4) == 0 ? R_INC : R_NOP);
      v_val = 6'($urandom);
      #1;
      rc = r_ext; lc = l_ext;
      rc[0] = 0; lc[0] = 0; rc[1] = 1; lc[1] = 1; rc[2] = mq[0]; lc[2] = mq[63];
      rc[6] = mq[mv]; lc[6] = mq[mv];
      checks++;
      if (vbit !== mq[mv]) failures++;
      @(posedge clk);
      case (ctl)
        SH_RIGHT: mq = {rc[m63], mq[63:1]};
        SH_LEFT:  mq = {mq[62:0], lc[m0]};
        SH_LOAD:  mq = sb;
        default: ;
      endcase
      if (s0_ld) m0 = src_val; else if (set_ll) m0 = 0;
      if (s63_ld) m63 = src_val; else if (set_lr) m63 = 0;
      if (v_op == R_LD) mv = v_val; else if (v_op == R_INC) mv = mv + 1;
      #1;
      checks++;
      if (q !== mq || s0 !== m0 || s63 !== m63 || vsel !== mv) begin
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
