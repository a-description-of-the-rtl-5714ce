// Microinstruction decoder.
//
// Splits the 64-bit microinstruction into its fields (uinst_t, most
// significant first: F1, S1, M/D2, F2, M/D3, F3, S3, M/D4, F4, BS enable,
// SBD, SOURCE, BISB, CISB, CSB, Af, At, AS, VS, DS control) and decodes the
// microoperation fields. F1 always holds a microoperation; F2, F3 and F4 hold
// one when their M/D bit is 1 ('M') and immediate data when it is 0 ('D').
// Each field has its own code table (mat_mop_pkg). The result is one bit per
// microoperation (act), set when any field names it. Purely combinational.
// act is 512 bits wide (the 9-bit mop_e range); bits past the last
// microoperation, and bit MOP_NONE, are always zero.
module mat_mop_decode
  import mat_pkg::*;
  import mat_mop_pkg::*;
(
  input  logic [63:0]  ui,
  output uinst_t       u,
  output logic [511:0] act
);
  mop_e m1, m2, m3, m4;

  assign u  = uinst_t'(ui);
  assign m1 = f1_decode(u.f1);
  assign m2 = u.md2 ? f2_decode(u.f2) : MOP_NONE;
  assign m3 = u.md3 ? f3_decode(u.f3) : MOP_NONE;
  assign m4 = u.md4 ? f4_decode(u.f4) : MOP_NONE;

  always_comb begin
    act = '0;
    act[m1] = 1'b1;
    act[m2] = 1'b1;
    act[m3] = 1'b1;
    act[m4] = 1'b1;
    act[MOP_NONE] = 1'b0;
  end
endmodule
