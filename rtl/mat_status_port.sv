// Status Port (SP): a 64-input, 16-bit wide selector that widens the choice
// of bus sources. Input SPP of the selector, zero-extended to 64 bits, is the
// SP bus source. The 6-bit pointer SPP is loaded from a value chosen outside
// (immediate, EX, SB), incremented, decremented and cleared; SPP = 0 is the
// programming convention and selects the immediate constant of the
// microinstruction. Which resource sits on which input is wired at the top
// level. Selector combinational, SPP changes at the rising edge.
// Bits 63:16 of the output are constant zero by design (zero fill).
module mat_status_port
  import mat_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  rop_e        op,       // R_LD (val), R_INC, R_DEC, R_CLR
  input  logic [5:0]  val,
  input  logic [15:0] din [64],
  output word_t       sp,
  output logic [5:0]  spp
);
  assign sp = {48'd0, din[spp]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) spp <= '0;
    else case (op)
      R_LD:    spp <= val;
      R_INC:   spp <= spp + 6'd1;
      R_DEC:   spp <= spp - 6'd1;
      R_CLR:   spp <= '0;
      default: ;
    endcase
  end
endmodule
