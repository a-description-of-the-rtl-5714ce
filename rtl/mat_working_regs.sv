// Working Registers (WA or WB): NREG x 64-bit register file with a split
// pointer, pointer-save groups and loading masks.
//
// The pointer consists of a 4-bit unit pointer U (low address bits) and a
// 4-bit group pointer G (high bits). Coupled (the state after reset and after
// "couple"), U and G act as one 8-bit pointer: incrementing or decrementing U
// carries into G. Uncoupled, they count independently, so the file is 16
// groups of 16 registers. Each of U and G has a Standard Group of saved
// values (unit save group US, group save group GS), so the pointer can be
// saved and later reloaded from the saved element.
//
// When the register file is the destination of a bus transport (we), only
// the bit positions set in the current loading mask (element of the loading
// mask group LM at its pointer) take the shifted-bus value; the others keep
// their contents. The loading mask group is reset to all ones, i.e. full
// load. Reading is not masked: the design leaves unmasked read bits
// undefined, and this implementation simply delivers the stored bits.
//
// Timing: register write, save-group writes and pointer changes all happen at
// the same rising edge from pre-edge values (write uses the old pointer).
module mat_working_regs
  import mat_pkg::*;
#(
  parameter int unsigned NREG = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // pointer control
  input  rop_e        u_op,      // R_LD(u_val), R_LSG (from US), R_INC, R_DEC, R_CLR
  input  logic [3:0]  u_val,
  input  rop_e        g_op,      // R_LD(g_val), R_LSG (from GS), R_INC, R_DEC, R_CLR
  input  logic [3:0]  g_val,
  input  logic        couple,
  input  logic        uncouple,
  // pointer save groups
  input  sg_cmd_t     us_cmd,
  input  logic        us_we,     // US[USP] := U
  input  sg_cmd_t     gs_cmd,
  input  logic        gs_we,     // GS[GSP] := G
  // loading masks
  input  sg_cmd_t     lm_cmd,
  input  logic        lm_we,     // LM[LMP] := sb
  // data
  input  logic        we,        // shifted-bus destination load
  input  word_t       sb,
  output word_t       rdata,     // register at the pointer (bus source)
  output logic [7:0]  ptr,
  output logic        coupled,
  output logic        p_ovf,     // pointer = 11111111
  output logic        u_ovf,
  output logic        g_ovf,
  output logic        us_ovf,
  output logic        gs_ovf
);
  word_t      regs [NREG];
  logic [3:0] u, g;
  logic [3:0] us_rd, gs_rd;
  word_t      lmask;
  logic [3:0] s1a_unused, s2a_unused, s1b_unused, s2b_unused;
  logic [3:0] x1_unused, x2_unused, x3_unused, x4_unused, x5_unused;
  logic ovf1_unused;

  mat_std_group #(.W(4)) u_us (
    .clk, .rst_n, .cmd(us_cmd), .we(us_we), .wd(u), .rd(us_rd),
    .ptr(x1_unused), .s1(s1a_unused), .s2(s2a_unused), .ptr_ovf(us_ovf));
  mat_std_group #(.W(4)) u_gs (
    .clk, .rst_n, .cmd(gs_cmd), .we(gs_we), .wd(g), .rd(gs_rd),
    .ptr(x2_unused), .s1(s1b_unused), .s2(s2b_unused), .ptr_ovf(gs_ovf));
  mat_std_group #(.W(64), .RST({64{1'b1}})) u_lm (
    .clk, .rst_n, .cmd(lm_cmd), .we(lm_we), .wd(sb), .rd(lmask),
    .ptr(x3_unused), .s1(x4_unused), .s2(x5_unused), .ptr_ovf(ovf1_unused));

  assign ptr   = {g, u};
  assign rdata = regs[ptr];
  assign p_ovf = (ptr == 8'hFF);
  assign u_ovf = (u == 4'hF);
  assign g_ovf = (g == 4'hF);

  always_ff @(posedge clk) begin
    if (we) regs[ptr] <= (regs[ptr] & ~lmask) | (sb & lmask);
  end

  // carry / borrow from U into G while coupled
  logic carry, borrow;
  assign carry  = coupled && (u_op == R_INC) && (u == 4'hF);
  assign borrow = coupled && (u_op == R_DEC) && (u == 4'h0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u <= '0;
      g <= '0;
      coupled <= 1'b1;
    end else begin
      if (couple)        coupled <= 1'b1;
      else if (uncouple) coupled <= 1'b0;
      case (u_op)
        R_LD:    u <= u_val;
        R_LSG:   u <= us_rd;
        R_INC:   u <= u + 4'd1;
        R_DEC:   u <= u - 4'd1;
        R_CLR:   u <= '0;
        default: ;
      endcase
      if (g_op != R_NOP) begin
        case (g_op)
          R_LD:    g <= g_val;
          R_LSG:   g <= gs_rd;
          R_INC:   g <= g + 4'd1;
          R_DEC:   g <= g - 4'd1;
          R_CLR:   g <= '0;
          default: ;
        endcase
      end else if (carry) g <= g + 4'd1;
      else if (borrow)    g <= g - 4'd1;
    end
  end
endmodule
