// Double Shifter (DS): a 64-bit shifter that moves two bit positions per
// microinstruction, used to split one bit stream into two or merge two.
//
// Per microinstruction it shifts two places right, two places left, loads
// from the shifted bus, or idles. The pair entering at DS(63:62) on a right
// shift and at DS(1:0) on a left shift is chosen by the 3-bit source
// registers SHI and SLO: 0 "00", 1 "11", 2 the pair leaving at the other end
// (cyclic), 6 this shifter's variable pair DS(V+1:V), and 3, 4, 5, 7 pairs
// supplied from outside (r_ext / l_ext, wired at the top level). The variable
// pair is DS(V+1:V) with V in the 6-bit selection register (V+1 taken modulo
// 64); it also loads the Local Register pointers.
// The candidate list of the pair sources is this design's own choice, made by
// analogy with the one-bit shifters.
module mat_double_shifter
  import mat_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  shctl_e     ctl,
  input  word_t      sb,
  input  logic [1:0] r_ext [8],  // candidates for DS(63:62) on a right shift
  input  logic [1:0] l_ext [8],  // candidates for DS(1:0) on a left shift
  input  logic       slo_ld,
  input  logic       shi_ld,
  input  logic [2:0] src_val,
  input  logic       set_ll,     // SLO := 0
  input  logic       set_lr,     // SHI := 0
  input  rop_e       v_op,
  input  logic [5:0] v_val,
  output word_t      q,
  output logic [1:0] vpair,      // {DS(V+1), DS(V)}
  output logic [5:0] vsel
);
  logic [2:0] slo, shi;
  logic [1:0] rc [8];
  logic [1:0] lc [8];
  logic [5:0] v1;
  assign v1    = vsel + 6'd1;
  assign vpair = {q[v1], q[vsel]};

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      rc[i] = r_ext[i];
      lc[i] = l_ext[i];
    end
    rc[0] = 2'b00;    lc[0] = 2'b00;
    rc[1] = 2'b11;    lc[1] = 2'b11;
    rc[2] = q[1:0];   lc[2] = q[63:62];
    rc[6] = vpair;    lc[6] = vpair;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      vsel <= '0;
      slo  <= '0;
      shi  <= '0;
    end else begin
      case (ctl)
        SH_RIGHT: q <= {rc[shi], q[63:2]};
        SH_LEFT:  q <= {q[61:0], lc[slo]};
        SH_LOAD:  q <= sb;
        default:  ;
      endcase
      if (slo_ld)      slo <= src_val;
      else if (set_ll) slo <= 3'd0;
      if (shi_ld)      shi <= src_val;
      else if (set_lr) shi <= 3'd0;
      case (v_op)
        R_LD:    vsel <= v_val;
        R_INC:   vsel <= vsel + 6'd1;
        R_DEC:   vsel <= vsel - 6'd1;
        R_CLR:   vsel <= '0;
        default: ;
      endcase
    end
  end
endmodule
