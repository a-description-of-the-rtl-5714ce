// Bus Shifter (BS): 64-bit right cyclic shifter between the bus latch and the
// postshift masks, with a selectable source for the shift amount.
//
// When the microinstruction's BS-enable bit is set, the bus is rotated right
// by n (0..63); otherwise it passes unshifted. n comes from one of four
// sources chosen by the 2-bit BS selection register BSS: 0 immediate data of
// the microinstruction (field F3), 1 EX(5:0), 2 the Bit Encoder output,
// 3 the element of the 6-bit BS Standard Group BSSG at its pointer. BSS is a
// 2-bit counter: load, increment, decrement, clear (clear selects immediate
// data, the programming convention). BSSG := SB(5:0).
//
// The shifter is combinational; BSS and BSSG change at the rising edge.
module mat_bus_shifter
  import mat_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,        // BS enable bit of the microinstruction
  input  logic [5:0] cm_amt,    // immediate shift amount
  input  logic [5:0] ex_amt,
  input  logic [5:0] be_amt,
  input  rop_e       bss_op,    // R_LD (bss_val), R_INC, R_DEC, R_CLR
  input  logic [1:0] bss_val,
  input  sg_cmd_t    sg_cmd,
  input  logic       sg_we,     // BSSG := sb6
  input  logic [5:0] sb6,
  input  word_t      din,
  output word_t      dout,
  output logic [1:0] bss,
  output logic [5:0] amount
);
  logic [5:0] sg_rd;
  logic [3:0] x1_unused, x2_unused, x3_unused;
  logic ovf1_unused;

  mat_std_group #(.W(6)) u_sg (
    .clk, .rst_n, .cmd(sg_cmd), .we(sg_we), .wd(sb6), .rd(sg_rd),
    .ptr(x1_unused), .s1(x2_unused), .s2(x3_unused), .ptr_ovf(ovf1_unused));

  always_comb begin
    case (bss)
      2'd0:    amount = cm_amt;
      2'd1:    amount = ex_amt;
      2'd2:    amount = be_amt;
      default: amount = sg_rd;
    endcase
  end

  // rotate right (a shift by 64 gives zero, so amount 0 passes din)
  assign dout = en ? ((din >> amount) | (din << (7'd64 - {1'b0, amount}))) : din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bss <= 2'd0;
    else case (bss_op)
      R_LD:    bss <= bss_val;
      R_INC:   bss <= bss + 2'd1;
      R_DEC:   bss <= bss - 2'd1;
      R_CLR:   bss <= 2'd0;
      default: ;
    endcase
  end
endmodule
