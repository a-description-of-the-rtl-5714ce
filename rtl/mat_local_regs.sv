// Local Registers (LR): four 64-bit registers that feed the A input of the AL.
//
// The input pointer LRIP selects the register written from the shifted bus
// when LR is a bus destination; the output pointer LROP selects the register
// presented to the AL. Each 2-bit pointer can be loaded from the double
// shifter's variable bit pair DS(V+1:V), incremented, decremented (modulo 4)
// and cleared; the top level issues the "both pointers" operations by driving
// both. Write and pointer changes happen at the rising edge (write with the
// old input pointer). Registers are cleared at reset.
module mat_local_regs
  import mat_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  rop_e       ip_op,    // R_LD (ds2), R_INC, R_DEC, R_CLR
  input  rop_e       op_op,
  input  logic [1:0] ds2,      // DS(V+1:V)
  input  logic       we,
  input  word_t      sb,
  output word_t      a,        // LR[LROP]
  output logic [1:0] ip,
  output logic [1:0] opp
);
  word_t lr [4];
  assign a = lr[opp];

  function automatic logic [1:0] step(input rop_e op, input logic [1:0] p, input logic [1:0] v);
    case (op)
      R_LD:    return v;
      R_INC:   return p + 2'd1;
      R_DEC:   return p - 2'd1;
      R_CLR:   return 2'd0;
      default: return p;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ip  <= '0;
      opp <= '0;
      for (int i = 0; i < 4; i++) lr[i] <= '0;
    end else begin
      if (we) lr[ip] <= sb;
      ip  <= step(ip_op, ip, ds2);
      opp <= step(op_op, opp, ds2);
    end
  end
endmodule
