// Counter A / Counter B: a W-bit up/down counter with its own Standard Group.
//
// The counter is loaded from a value chosen outside (immediate data, EX or the
// Bit Encoder output, or the shifted bus) or from the element of its Standard
// Group selected by the group pointer; it can be incremented, decremented
// (both modulo 2^W) and cleared. "SG := counter" writes the current count
// into the group element at the pointer, so a count can be saved and
// restored. The zero test of the counter and its low bits are conditions.
//
// Interface: op/val drive the counter, sg_cmd/sg_we the group. Timing: all
// updates at the rising edge from pre-edge values, so "SG := CA" in the same
// microinstruction as a counter change saves the old count (clock pulse 1
// before clock pulse 2).
module mat_counter
  import mat_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  rop_e         op,      // R_LD (val), R_LSG (group element), R_INC, R_DEC, R_CLR
  input  logic [W-1:0] val,
  input  sg_cmd_t      sg_cmd,
  input  logic         sg_we,   // SG[pointer] := counter
  output logic [W-1:0] cnt,
  output logic         zero,
  output logic [3:0]   sg_ptr,
  output logic         sg_ovf   // group pointer = 1111
);
  logic [W-1:0] sg_rd;
  logic [3:0]   s1_unused, s2_unused;

  mat_std_group #(.W(W)) u_sg (
    .clk, .rst_n, .cmd(sg_cmd), .we(sg_we), .wd(cnt), .rd(sg_rd),
    .ptr(sg_ptr), .s1(s1_unused), .s2(s2_unused), .ptr_ovf(sg_ovf)
  );

  assign zero = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else begin
      case (op)
        R_LD:    cnt <= val;
        R_LSG:   cnt <= sg_rd;
        R_INC:   cnt <= cnt + 1'b1;
        R_DEC:   cnt <= cnt - 1'b1;
        R_CLR:   cnt <= '0;
        default: ;
      endcase
    end
  end
endmodule
