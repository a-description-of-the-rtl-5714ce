// One-bit shifter of variable width: the Accumulator Shifter (AS) and the
// Variable Width Shifter (VS) are two instances.
//
// A 64-bit register that, per microinstruction, is shifted one place right,
// one place left, loaded from the shifted bus, or left alone. The bit entering
// at the left end (bit 63, right shift) and at the right end (bit 0, left
// shift) is chosen by the 3-bit source registers S63 and S0 from eight
// candidates: 0 a zero, 1 a one, 2 the bit leaving at the other end (cyclic),
// 6 the variable bit V of this shifter, and 3, 4, 5, 7 bits supplied from
// outside (r_ext / l_ext: the neighbouring shifters' variable bits, bus and
// shifted-bus bits, the condition save register), wired per instance at the
// top level. V is the bit at the position held in the 6-bit selection
// register VSEL, so the shifter can act as one of any width 1..64.
// "Logical left" clears S0, "logical right" clears S63.
//
// Timing: all registers change at the rising edge; the shift uses the
// pre-edge contents and selections.
module mat_bit_shifter
  import mat_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  shctl_e     ctl,
  input  word_t      sb,
  input  logic [7:0] r_ext,     // candidates for bit 63 on a right shift
  input  logic [7:0] l_ext,     // candidates for bit 0 on a left shift
  input  logic       s0_ld,
  input  logic       s63_ld,
  input  logic [2:0] src_val,
  input  logic       set_ll,    // S0 := 0
  input  logic       set_lr,    // S63 := 0
  input  rop_e       v_op,      // R_LD (v_val), R_INC, R_DEC, R_CLR
  input  logic [5:0] v_val,
  output word_t      q,
  output logic       vbit,
  output logic [5:0] vsel,
  output logic [2:0] s0,
  output logic [2:0] s63
);
  logic [7:0] rc, lc;
  assign vbit = q[vsel];

  always_comb begin
    rc = r_ext;
    lc = l_ext;
    rc[0] = 1'b0;  lc[0] = 1'b0;
    rc[1] = 1'b1;  lc[1] = 1'b1;
    rc[2] = q[0];  lc[2] = q[63];
    rc[6] = vbit;  lc[6] = vbit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      vsel <= '0;
      s0   <= '0;
      s63  <= '0;
    end else begin
      case (ctl)
        SH_RIGHT: q <= {rc[s63], q[63:1]};
        SH_LEFT:  q <= {q[62:0], lc[s0]};
        SH_LOAD:  q <= sb;
        default:  ;
      endcase
      if (s0_ld)       s0 <= src_val;
      else if (set_ll) s0 <= 3'd0;
      if (s63_ld)      s63 <= src_val;
      else if (set_lr) s63 <= 3'd0;
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
