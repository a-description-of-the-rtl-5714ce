// Postshift Masks (PM and PG): the mask applied to the bus shifter output
// before the shifted-bus latch: sb = shifted AND (PA[PAP] OR PB[PBP] OR PG).
//
// PA and PB are groups of 16 64-bit masks, written from the BUS (PA := BUS,
// PB := BUS); their 4-bit pointers load from a value chosen outside, or from
// the common 4-bit Standard Group PMSG, and can be incremented, decremented
// and cleared. PG is the mask generator (mat_mask_gen); its 7-bit code comes
// from one of four sources picked by the 2-bit selection register PGS:
// 0 immediate data (field F2), 1 EX(6:0), 2 the Bit Encoder output with its
// direction bit, 3 the element of the 7-bit Standard Group PGSG.
// After reset PA[1] is all zeros and every other PA element all ones, PB is
// all zeros, so PAP=0 means "no postshift masking" and PAP=1 means "mask
// given by PG" (the design's programming convention, made the reset state).
module mat_postshift_masks
  import mat_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  rop_e       pap_op,
  input  logic [3:0] pap_val,
  input  rop_e       pbp_op,
  input  logic [3:0] pbp_val,
  input  sg_cmd_t    pmsg_cmd,
  input  logic       pmsg_we,    // PMSG := sb(3:0)
  input  logic       pa_we,      // PA[PAP] := bus
  input  logic       pb_we,      // PB[PBP] := bus
  input  rop_e       pgs_op,     // R_LD(pgs_val), R_INC, R_DEC, R_CLR
  input  logic [1:0] pgs_val,
  input  sg_cmd_t    pgsg_cmd,
  input  logic       pgsg_we,    // PGSG := sb(6:0)
  input  logic [6:0] cm_code,
  input  logic [6:0] ex_code,
  input  logic [6:0] be_code,
  input  word_t      bus,
  input  logic [6:0] sb_in,      // shifted bus bits for the PGSG write
  input  word_t      shifted,    // bus shifter output
  output word_t      sb,
  output word_t      mask,
  output logic [1:0] pgs
);
  word_t      pa [16];
  word_t      pb [16];
  logic [3:0] pap, pbp, pmsg_rd;
  logic [6:0] pgsg_rd, code;
  word_t      pg;
  logic [3:0] x1_unused, x2_unused, x3_unused, x4_unused, x5_unused, x6_unused;
  logic ovf1_unused, ovf2_unused;

  mat_std_group #(.W(4)) u_pmsg (
    .clk, .rst_n, .cmd(pmsg_cmd), .we(pmsg_we), .wd(sb_in[3:0]), .rd(pmsg_rd),
    .ptr(x1_unused), .s1(x2_unused), .s2(x3_unused), .ptr_ovf(ovf1_unused));
  mat_std_group #(.W(7)) u_pgsg (
    .clk, .rst_n, .cmd(pgsg_cmd), .we(pgsg_we), .wd(sb_in[6:0]), .rd(pgsg_rd),
    .ptr(x4_unused), .s1(x5_unused), .s2(x6_unused), .ptr_ovf(ovf2_unused));

  always_comb begin
    case (pgs)
      2'd0:    code = cm_code;
      2'd1:    code = ex_code;
      2'd2:    code = be_code;
      default: code = pgsg_rd;
    endcase
  end

  mat_mask_gen u_pg (.code, .mask(pg));

  assign mask = pa[pap] | pb[pbp] | pg;
  assign sb   = shifted & mask;

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
      pap <= '0;
      pbp <= '0;
      pgs <= '0;
      for (int i = 0; i < 16; i++) begin
        pa[i] <= (i == 1) ? '0 : '1;
        pb[i] <= '0;
      end
    end else begin
      if (pa_we) pa[pap] <= bus;
      if (pb_we) pb[pbp] <= bus;
      pap <= step(pap_op, pap, pap_val, pmsg_rd);
      pbp <= step(pbp_op, pbp, pbp_val, pmsg_rd);
      case (pgs_op)
        R_LD:    pgs <= pgs_val;
        R_INC:   pgs <= pgs + 2'd1;
        R_DEC:   pgs <= pgs - 2'd1;
        R_CLR:   pgs <= 2'd0;
        default: ;
      endcase
    end
  end
endmodule
