// Bus Masks (BM): two groups MA and MB of 16 64-bit masks applied to the bus
// source before the bus latch: bus = source AND (MA[MAP] OR MB[MBP]).
//
// MAP and MBP are 4-bit pointers, loaded from a value chosen outside
// (immediate data, EX, SB) or from the element of the common 4-bit Standard
// Group BMSG, incremented, decremented and cleared. MA or MB is written with
// the shifted bus when it is the destination of a bus transport.
// After reset MA[1] holds all zeros ("bus clear") and every other MA element
// all ones ("no mask"), MB all zeros, so MAP=0 means unmasked and MAP=1 means
// "masked by MB": this follows the programming convention of the design,
// made a reset state by this implementation.
module mat_bus_masks
  import mat_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  rop_e       map_op,    // R_LD(map_val), R_LSG (BMSG), R_INC, R_DEC, R_CLR
  input  logic [3:0] map_val,
  input  rop_e       mbp_op,
  input  logic [3:0] mbp_val,
  input  sg_cmd_t    sg_cmd,    // BMSG control
  input  logic       sg_we,     // BMSG := sb(3:0)
  input  logic       ma_we,     // MA[MAP] := sb
  input  logic       mb_we,     // MB[MBP] := sb
  input  word_t      sb,
  input  word_t      src,
  output word_t      bus,
  output word_t      mask,
  output logic [3:0] map,
  output logic [3:0] mbp
);
  word_t      ma [16];
  word_t      mb [16];
  logic [3:0] sg_rd;
  logic [3:0] x1_unused, x2_unused, x3_unused;
  logic ovf1_unused;

  mat_std_group #(.W(4)) u_sg (
    .clk, .rst_n, .cmd(sg_cmd), .we(sg_we), .wd(sb[3:0]), .rd(sg_rd),
    .ptr(x1_unused), .s1(x2_unused), .s2(x3_unused), .ptr_ovf(ovf1_unused));

  assign mask = ma[map] | mb[mbp];
  assign bus  = src & mask;

  function automatic logic [3:0] step(input rop_e op, input logic [3:0] p,
                                      input logic [3:0] v, input logic [3:0] sg);
    case (op)
      R_LD:    return v;
      R_LSG:   return sg;
      R_INC:   return p + 4'd1;
      R_DEC:   return p - 4'd1;
      R_CLR:   return 4'd0;
      default: return p;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map <= '0;
      mbp <= '0;
      for (int i = 0; i < 16; i++) begin
        ma[i] <= (i == 1) ? '0 : '1;
        mb[i] <= '0;
      end
    end else begin
      if (ma_we) ma[map] <= sb;
      if (mb_we) mb[mbp] <= sb;
      map <= step(map_op, map, map_val, sg_rd);
      mbp <= step(mbp_op, mbp, mbp_val, sg_rd);
    end
  end
endmodule
