// Conditions, condition selector, condition save registers and switches.
//
// All 128 testable conditions enter a selector; the 7 CSB bits of the
// microinstruction pick the selected condition sc, which steers sequencing
// and the carry-in of the address adders, and can be stored in the condition
// save registers CR (a 16 x 1-bit Standard Group, CR := sc) or in the
// programmable switches KC and KD (load sc, set, clear). KA and KB are
// console switches (inputs). CR at its pointer, KA..KD and the cycle mode
// are themselves conditions, fed back by the top level.
//
// Cycle mode: CYL selects long cycle and CYS short cycle for all following
// microinstructions (not the one that executes it); the mode is an output
// (long_mode) and the condition CYL. Reset selects short cycle.
// All loads happen at the rising edge.
module mat_conditions
  import mat_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] cond,
  input  logic [6:0]   csb,
  output logic         sc,
  input  sg_cmd_t      cr_cmd,
  input  logic         cr_ld,     // CR[CRP] := sc
  input  logic         kc_ld, kc_set, kc_clr,
  input  logic         kd_ld, kd_set, kd_clr,
  input  logic         cyl, cys,
  output logic         cr,        // CR[CRP]
  output logic         crp_ovf,
  output logic         kc,
  output logic         kd,
  output logic         long_mode
);
  logic [3:0] x1_unused, x2_unused, x3_unused;

  assign sc = cond[csb];

  mat_std_group #(.W(1)) u_cr (
    .clk, .rst_n, .cmd(cr_cmd), .we(cr_ld), .wd(sc), .rd(cr),
    .ptr(x1_unused), .s1(x2_unused), .s2(x3_unused), .ptr_ovf(crp_ovf));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kc <= 1'b0;
      kd <= 1'b0;
      long_mode <= 1'b0;
    end else begin
      if (kc_ld)       kc <= sc;
      else if (kc_set) kc <= 1'b1;
      else if (kc_clr) kc <= 1'b0;
      if (kd_ld)       kd <= sc;
      else if (kd_set) kd <= 1'b1;
      else if (kd_clr) kd <= 1'b0;
      if (cyl)         long_mode <= 1'b1;
      else if (cys)    long_mode <= 1'b0;
    end
  end
endmodule
