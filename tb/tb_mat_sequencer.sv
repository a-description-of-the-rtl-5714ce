// Testbench of mat_sequencer: directed checks of every next-address source
// (EX, CUAL with each B-data choice, RA/RB return adders, SA, A-1, A+1, A)
// chosen by the condition between Af and At, the carry-in rule (c when CISB
// = 1, not-c when 0), the forced jump to 0 with IRA, STOP and continue,
// CS LOAD (write address = selected address, next = A+1), and the timing:
// in short cycle one address per clock, in long cycle the address changes
// only on the sequencing clock.
`timescale 1ns/1ps
module tb_mat_sequencer;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic exec, seq, cisb, c, cualf_ld, cualf_add, cualf_b;
  adsel_e af, at;
  bsel_e bisb;
  logic [5:0] tt_hi, tt_lo;
  rop_e sa_op;
  logic [11:0] sb12, addr, sa, ira, cs_waddr;
  logic [4:0] cualf_val;
  logic ra_push, ra_pop, ra_clr, rb_push, rb_pop, rb_clr, ex_ld, ex_shift, inton, intoff;
  logic cs_load, stop_req, cont, ext_sig, snoop, int_en, halted, cs_we;
  logic [15:0] ex_in, ex;
  logic c_rapov, c_rapun, c_rbpov, c_rbpun, c_cualov;
  mat_sequencer dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (addr %0d)", what, addr); end
  endtask
  task automatic idle();
    exec = 1; seq = 1; af = AD_AP1; at = AD_AP1; bisb = BD_ZERO; cisb = 0; c = 0;
    tt_hi = 0; tt_lo = 0; sa_op = R_NOP; sb12 = 0; cualf_ld = 0; cualf_val = 0;
    cualf_add = 0; cualf_b = 0; ra_push = 0; ra_pop = 0; ra_clr = 0; rb_push = 0; rb_pop = 0;
    rb_clr = 0; ex_ld = 0; ex_shift = 0; ex_in = 0; inton = 0; intoff = 0; cs_load = 0;
    stop_req = 0; cont = 0; ext_sig = 0; snoop = 0;
  endtask
  task automatic step(); @(negedge clk); endtask
  task automatic jump(input logic [11:0] a);
    idle(); af = AD_AL; bisb = BD_TT; tt_hi = a[11:6]; tt_lo = a[5:0]; step(); idle();
  endtask
  initial begin
    logic [11:0] a0;
    idle();
    repeat (2) step();
    rst_n = 1;
    check(addr == 0, "reset address");
    step(); check(addr == 1, "A+1");
    af = AD_A; step(); check(addr == 1, "A");
    af = AD_AM1; step(); check(addr == 0, "A-1");
    idle(); c = 1; at = AD_A; step(); check(addr == 0, "c selects At");
    idle();
    jump(12'd1234); check(addr == 1234, "CUAL with T.t");
    // CUAL = A + B + carry: t sign-extended, carry-in = not c (CISB 0, c 0)
    cualf_add = 1; step(); idle(); check(addr == 1235, "CUALF := A+B");
    af = AD_AL; bisb = BD_T; tt_lo = 6'h3E; cisb = 0; c = 0; step(); idle();
    check(addr == 1235 - 2 + 1, "A + t(-2) + not c");
    af = AD_AL; bisb = BD_T; tt_lo = 6'd5; cisb = 1; c = 0; step(); idle();
    check(addr == 1234 + 5, "A + t + c");
    cualf_b = 1; step(); idle();
    // subroutine via RA
    a0 = addr;
    ra_push = 1; af = AD_AL; bisb = BD_TT; tt_hi = 6'd10; tt_lo = 6'd0; step(); idle();
    check(addr == 640 && !c_rapun, "call");
    af = AD_RA; bisb = BD_ZERO; cisb = 0; c = 0; step(); idle();
    check(addr == a0 + 1 && c_rapun, "return to caller + 1");
    rb_push = 1; step(); idle();
    a0 = addr - 1;
    af = AD_RB; bisb = BD_T; tt_lo = 6'd3; cisb = 1; c = 0; step(); idle();
    check(addr == a0 + 3, "RB + t");
    // SA and EX
    sa_op = R_LD; sb12 = 12'd77; step(); idle();
    af = AD_SA; step(); idle(); check(addr == 77 && sa == 77, "SA");
    ex_ld = 1; ex_in = 16'hA123; step(); idle();
    af = AD_EX; step(); idle(); check(addr == 12'h123, "EX(11:0)");
    ex_shift = 1; step(); idle(); check(ex == 16'h3A12, "EX rotated by 4");
    // forced jump
    jump(12'd500);
    inton = 1; step(); idle();
    check(int_en, "INTON");
    ext_sig = 1; step(); idle();
    check(addr == 0 && ira == 502 && !int_en, "forced jump to 0, IRA");
    ext_sig = 1; step(); idle();
    check(addr == 1, "no forced jump while interrupts off");
    // CS LOAD
    jump(12'd20);
    cs_load = 1; af = AD_AL; bisb = BD_TT; tt_hi = 6'd1; tt_lo = 6'd2;
    #1;
    check(cs_we && cs_waddr == 12'd66, "CS LOAD write address");
    step(); idle();
    check(addr == 21, "CS LOAD continues at A+1");
    // STOP and continue
    stop_req = 1; step(); idle();
    check(halted && addr == 22, "halt after this microinstruction");
    exec = 0; seq = 0; repeat (3) step();
    check(addr == 22, "no sequencing while halted");
    cont = 1; step(); idle();
    check(!halted, "continue");
    // long cycle: exec clock then seq clock
    a0 = addr;
    exec = 1; seq = 0; step();
    check(addr == a0, "long cycle: no change after the first clock");
    exec = 0; seq = 1; step();
    check(addr == a0 + 1, "long cycle: next address after the second clock");
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
