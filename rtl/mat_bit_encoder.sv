// Bit Encoder (BE): finds the lowest and highest one bit on the bus and
// computes shift counts from them.
//
// The LSB encoder gives the index of the lowest one bit of the bus, the MSB
// encoder the index of the highest (for an all-zero bus 63 and 0). "L load"
// moves LSB1 into LSB2 and loads the LSB encoding into LSB1; "M load" does the
// same for MSB1/MSB2; "L/M interchange" swaps LSB1/LSB2 or MSB1/MSB2. With
// Li = MSBi - LSBi the eight basic functions F are
//   0 LSB1, 1 LSB1-1, 2 MSB1, 3 MSB1+1, 4 L1, 5 L2-L1, 6 LSB2-LSB1, 7 MSB2-MSB1
// and the function register BEF = {g, f[2:0]} selects F (g=0) or
// G = [F/2]+1 (g=1, integer part of the signed half). The 6-bit output (modulo
// 64) drives the bus shifter, the postshift mask generator and Counter B; for
// the mask generator a direction bit BEPG is added (1: mask from b0 end,
// set by "BEPG L"; 0: from b63 end, "BEPG M").
// BEF is loaded from a value chosen outside, from the 4-bit Standard Group
// BESG, or cleared ("set BEF to LSB1"). The conditions are valid whatever
// function is selected.
module mat_bit_encoder
  import mat_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  word_t      bus,
  input  logic       l_load,
  input  logic       m_load,
  input  logic       l_swap,
  input  logic       m_swap,
  input  rop_e       bef_op,    // R_LD (bef_val), R_LSG, R_CLR
  input  logic [3:0] bef_val,
  input  sg_cmd_t    sg_cmd,
  input  logic       sg_we,     // BESG := sb4
  input  logic [3:0] sb4,
  input  logic       pg_l,      // BEPG L
  input  logic       pg_m,      // BEPG M
  output logic [5:0] be,
  output logic       bepg,
  output logic [5:0] lsb1, lsb2, msb1, msb2,
  // conditions
  output logic       c_lsb1, c_msb1, c_l1, c_l2, c_ld, c_sgnld,
  output logic       c_lsbd, c_sgnlsbd, c_msbd, c_sgnmsbd, c_be0
);
  logic [5:0] lenc, menc;
  logic [3:0] bef, sg_rd;
  logic [3:0] x1_unused, x2_unused, x3_unused;
  logic ovf1_unused;

  mat_std_group #(.W(4)) u_sg (
    .clk, .rst_n, .cmd(sg_cmd), .we(sg_we), .wd(sb4), .rd(sg_rd),
    .ptr(x1_unused), .s1(x2_unused), .s2(x3_unused), .ptr_ovf(ovf1_unused));

  // priority encoders
  always_comb begin
    lenc = 6'd63;
    for (int i = 63; i >= 0; i--) if (bus[i]) lenc = 6'(i);
    menc = 6'd0;
    for (int i = 0; i < 64; i++) if (bus[i]) menc = 6'(i);
  end

  // signed 8-bit arithmetic on the registers
  logic signed [7:0] sl1, sl2, sm1, sm2, l1, l2, fval, gval;
  assign sl1 = 8'(lsb1);
  assign sl2 = 8'(lsb2);
  assign sm1 = 8'(msb1);
  assign sm2 = 8'(msb2);
  assign l1  = sm1 - sl1;
  assign l2  = sm2 - sl2;

  always_comb begin
    case (bef[2:0])
      3'd0: fval = sl1;
      3'd1: fval = sl1 - 8'sd1;
      3'd2: fval = sm1;
      3'd3: fval = sm1 + 8'sd1;
      3'd4: fval = l1;
      3'd5: fval = l2 - l1;
      3'd6: fval = sl2 - sl1;
      default: fval = sm2 - sm1;
    endcase
    gval = fval / 8'sd2 + 8'sd1;
  end
  assign be = 6'(bef[3] ? gval : fval);

  assign c_lsb1    = (lsb1 == 6'd0);
  assign c_msb1    = (msb1 == 6'd63);
  assign c_l1      = (l1 == 8'sd0);
  assign c_l2      = (l2 == 8'sd0);
  assign c_ld      = (l1 == l2);
  assign c_sgnld   = (l2 < l1);
  assign c_lsbd    = (lsb1 == lsb2);
  assign c_sgnlsbd = (sl2 < sl1);
  assign c_msbd    = (msb1 == msb2);
  assign c_sgnmsbd = (sm2 < sm1);
  assign c_be0     = be[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lsb1 <= 6'd63; lsb2 <= 6'd63; msb1 <= '0; msb2 <= '0;
      bef  <= '0;
      bepg <= 1'b0;
    end else begin
      if (l_load)      begin lsb2 <= lsb1; lsb1 <= lenc; end
      else if (l_swap) begin lsb2 <= lsb1; lsb1 <= lsb2; end
      if (m_load)      begin msb2 <= msb1; msb1 <= menc; end
      else if (m_swap) begin msb2 <= msb1; msb1 <= msb2; end
      case (bef_op)
        R_LD:    bef <= bef_val;
        R_LSG:   bef <= sg_rd;
        R_CLR:   bef <= '0;
        default: ;
      endcase
      if (pg_l)      bepg <= 1'b1;
      else if (pg_m) bepg <= 1'b0;
    end
  end
endmodule
