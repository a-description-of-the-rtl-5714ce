// Arithmetical and Logical unit (AL) of the main data path.
//
// A 64-bit mat_alu runs continuously on A = the Local Register at the output
// pointer and B = the Accumulator Shifter; its result is a bus source. The
// 6-bit AL function register ALF = {carry_in, logic_mode, select[3:0]} is
// loaded from a value chosen outside (immediate, EX, SB), from the element of
// the 6-bit Standard Group ALSG, or set to one of the frequent functions
// (A+B, A-B, A, A+1, B, all zeros, all ones). A new function acts from the
// next microinstruction on, since the ALF changes at the clock edge.
// Conditions: result all ones (AL), bits 0 and 63, carry out (ALOV), one's
// and two's complement overflow.
module mat_al_unit
  import mat_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       alf_ld,    // ALF := alf_val
  input  logic       alf_ldsg,  // ALF := ALSG[ALP]
  input  logic [5:0] alf_val,
  input  sg_cmd_t    sg_cmd,
  input  logic       sg_we,     // ALSG := sb6
  input  logic [5:0] sb6,
  input  word_t      a,         // LR[LROP]
  input  word_t      b,         // AS
  output word_t      f,
  output logic [5:0] alf,
  output logic       c_all1,
  output logic       c_ovf,
  output logic       c_oneov,
  output logic       c_twoov
);
  logic [5:0] sg_rd;
  logic [3:0] x1_unused, x2_unused, x3_unused;
  logic ovf1_unused;

  mat_std_group #(.W(6)) u_sg (
    .clk, .rst_n, .cmd(sg_cmd), .we(sg_we), .wd(sb6), .rd(sg_rd),
    .ptr(x1_unused), .s1(x2_unused), .s2(x3_unused), .ptr_ovf(ovf1_unused));

  mat_alu #(.W(64)) u_alu (
    .a, .b, .fn(alf[4:0]), .cin(alf[5]), .f, .cout(c_ovf), .ovf2(c_twoov), .ovf1(c_oneov));

  assign c_all1 = &f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        alf <= ALF_A;
    else if (alf_ld)   alf <= alf_val;
    else if (alf_ldsg) alf <= sg_rd;
  end
endmodule
