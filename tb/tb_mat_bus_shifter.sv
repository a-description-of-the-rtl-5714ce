// Testbench of mat_bus_shifter: right rotation of random words by amounts
// from each of the four sources (immediate, EX, bit encoder, the 6-bit
// Standard Group) selected by BSS, and pass-through when the enable bit is
// off. The rotation is combinational; BSS and the group change at the edge.
`timescale 1ns/1ps
module tb_mat_bus_shifter;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en;
  logic [5:0] cm_amt, ex_amt, be_amt, sb6, amount;
  rop_e bss_op;
  logic [1:0] bss_val, bss;
  sg_cmd_t sg_cmd;
  logic sg_we;
  logic [63:0] din, dout;
  mat_bus_shifter dut (.*);
  int checks = 0, failures = 0;
  function automatic logic [63:0] rotr(input logic [63:0] x, input int n);
    return n == 0 ? x : (x >> n) | (x << (64 - n));
  endfunction
  initial begin
    en = 0; cm_amt = 0; ex_amt = 0; be_amt = 0; sb6 = 0; bss_op = R_NOP; bss_val = 0;
    sg_cmd = SG_IDLE; sg_we = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // group element 0 := 13
    sb6 = 6'd13; sg_we = 1; @(negedge clk); sg_we = 0;
    for (int s = 0; s < 4; s++) begin
      bss_op = R_LD; bss_val = 2'(s); @(negedge clk); bss_op = R_NOP;
      checks++;
      if (bss !== 2'(s)) failures++;
      for (int n = 0; n < 500; n++) begin
        logic [5:0] e;
        din = {$urandom, $urandom};
        cm_amt = 6'($urandom); ex_amt = 6'($urandom); be_amt = 6'($urandom);
        en = $urandom_range(0, 3) != 0;
        #1;
        e = (s == 0) ? cm_amt : (s == 1) ? ex_amt : (s == 2) ? be_amt : 6'd13;
        checks++;
        if (amount !== e || dout !== (en ? rotr(din, int'(e)) : din)) begin
          failures++;
          if (failures < 5) $display("FAIL s=%0d amt %0d/%0d", s, amount, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
