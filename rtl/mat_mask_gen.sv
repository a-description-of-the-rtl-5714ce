// Postshift Mask Generator (PG): turns a 7-bit code into a 64-bit mask that
// is a run of zeros at one end and ones elsewhere, so that together with the
// right cyclic bus shifter it realises logical shifts.
//
// Code n with n(6)=0: n(5:0) zeros from the most significant end (b63 down),
//   0 giving all ones. This is the mask for a logical right shift by n.
// Code n with n(6)=1: 128-n zeros from the least significant end (b0 up),
//   64 giving all zeros, 127 a single zero in b0. This is the mask for a
//   logical left shift by 128-n.
// This follows the code table of the design; it is purely combinational.
module mat_mask_gen
  import mat_pkg::*;
(
  input  logic [6:0] code,
  output word_t      mask
);
  logic [6:0] zeros;   // number of zero bits, 0..64
  always_comb begin
    if (!code[6]) begin
      zeros = {1'b0, code[5:0]};
      mask  = {64{1'b1}} >> zeros[5:0];
    end else begin
      zeros = 7'd64 - {1'b0, code[5:0]};
      mask  = (zeros == 7'd64) ? '0 : ({64{1'b1}} << zeros[5:0]);
    end
  end
endmodule
