// Microinstruction sequencer of the control unit.
//
// Realises "if c then At else Af": the selected condition c picks one of the
// two 3-bit address-source codes of the microinstruction, and the chosen
// source gives the next address: 0 EX(11:0), 1 the control-unit ALU (CUAL),
// 2 RB adder, 3 RA adder, 4 SA, 5 A-1, 6 A+1, 7 A, where A is the current
// address (addresses wrap modulo the store size). The CUAL is a 12-bit
// mat_alu with A as its A input and the B data as its B input; its 5-bit
// function register CUALF is loaded from immediate data or set to A+B or B.
// B data is chosen by the two BISB bits: 0, t sign-extended, T.t
// (concatenated 6-bit fields) or 0.SA(5:0). The carry-in of the CUAL and of
// both stack adders is c when the CISB bit is 1 and not-c when it is 0.
// The CUAL carry out of each sequencing step is kept in a flip-flop and is the
// condition CUALOV for the next microinstruction (a combinational condition
// would loop through the condition selector and the carry-in).
// Choosing RA or RB pops that stack.
//
// Also here: the 12-bit Save Address register SA, the 16-bit External
// register EX (loaded from outside, rotated right by 4), the return stacks,
// and the forced jump to address 0: while interrupts are on, an external
// signal, a stack overflow or the snooper clears the address, stores the
// address that would have been used in IRA, and turns interrupts off.
// CS LOAD writes the control store at the selected address and continues at
// A+1. A STOP request halts the sequencer after this microinstruction until
// cont.
//
// Timing: exec applies this microinstruction's control-unit microoperations
// (SA, EX, stack pushes, CUALF, INTON/INTOFF); seq loads the next address. In
// short cycle both come in the same clock; in long cycle the top level gives
// exec in the first clock and seq in the second. Interrupt causes that arise
// in an exec-only clock are held until seq.
module mat_sequencer
  import mat_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        exec,
  input  logic        seq,
  // sequencing fields
  input  adsel_e      af,
  input  adsel_e      at,
  input  bsel_e       bisb,
  input  logic        cisb,
  input  logic [5:0]  tt_hi,     // T (low 6 bits of F3)
  input  logic [5:0]  tt_lo,     // t (low 6 bits of F4)
  input  logic        c,         // selected condition
  // control-unit microoperations
  input  rop_e        sa_op,     // R_LD (sb12), R_INC, R_DEC, R_CLR
  input  logic [11:0] sb12,
  input  logic        cualf_ld,
  input  logic [4:0]  cualf_val,
  input  logic        cualf_add,
  input  logic        cualf_b,
  input  logic        ra_push, ra_pop, ra_clr,
  input  logic        rb_push, rb_pop, rb_clr,
  input  logic        ex_ld,
  input  logic        ex_shift,
  input  logic [15:0] ex_in,
  input  logic        inton,
  input  logic        intoff,
  input  logic        cs_load,
  input  logic        stop_req,
  input  logic        cont,
  input  logic        ext_sig,
  input  logic        snoop,
  // outputs
  output logic [11:0] addr,      // current address = control store address buffer
  output logic [11:0] sa,
  output logic [15:0] ex,
  output logic [11:0] ira,
  output logic        int_en,
  output logic        halted,
  output logic        cs_we,
  output logic [11:0] cs_waddr,
  output logic        c_rapov, c_rapun, c_rbpov, c_rbpun, c_cualov
);
  logic [4:0]  cualf;
  logic [11:0] bdata, cual, ra_sum, rb_sum, sel_addr, next_addr;
  logic        cin, ra_ovf, rb_ovf, pend, force0;
  adsel_e      src;
  logic [11:0] ra_top_unused, rb_top_unused;
  logic [3:0]  ra_ptr_unused, rb_ptr_unused;
  logic        ovf2_unused, ovf1_unused, cual_co;

  assign cin = cisb ? c : !c;
  assign src = c ? at : af;

  always_comb begin
    case (bisb)
      BD_ZERO: bdata = '0;
      BD_T:    bdata = {{6{tt_lo[5]}}, tt_lo};
      BD_TT:   bdata = {tt_hi, tt_lo};
      default: bdata = {6'd0, sa[5:0]};
    endcase
  end

  mat_alu #(.W(12)) u_cual (
    .a(addr), .b(bdata), .fn(cualf), .cin, .f(cual), .cout(cual_co), .ovf2(ovf2_unused), .ovf1(ovf1_unused));

  logic ra_popx, rb_popx;
  assign ra_popx = (exec && ra_pop) || (seq && src == AD_RA);
  assign rb_popx = (exec && rb_pop) || (seq && src == AD_RB);

  mat_return_stack u_ra (
    .clk, .rst_n, .push(exec && ra_push), .pop(ra_popx), .clr(exec && ra_clr),
    .cur_addr(addr), .b(bdata), .cin, .sum(ra_sum), .top(ra_top_unused), .ptr(ra_ptr_unused),
    .pov(c_rapov), .pun(c_rapun), .ovf_evt(ra_ovf));
  mat_return_stack u_rb (
    .clk, .rst_n, .push(exec && rb_push), .pop(rb_popx), .clr(exec && rb_clr),
    .cur_addr(addr), .b(bdata), .cin, .sum(rb_sum), .top(rb_top_unused), .ptr(rb_ptr_unused),
    .pov(c_rbpov), .pun(c_rbpun), .ovf_evt(rb_ovf));

  always_comb begin
    case (src)
      AD_EX:   sel_addr = ex[11:0];
      AD_AL:   sel_addr = cual;
      AD_RB:   sel_addr = rb_sum;
      AD_RA:   sel_addr = ra_sum;
      AD_SA:   sel_addr = sa;
      AD_AM1:  sel_addr = addr - 12'd1;
      AD_AP1:  sel_addr = addr + 12'd1;
      default: sel_addr = addr;
    endcase
  end

  assign next_addr = (exec && cs_load) ? addr + 12'd1 : sel_addr;
  assign force0    = int_en && (ext_sig || snoop || pend || (exec && (ra_ovf || rb_ovf)));
  assign cs_we     = exec && cs_load;
  assign cs_waddr  = sel_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr   <= '0;
      sa     <= '0;
      ex     <= '0;
      ira    <= '0;
      int_en <= 1'b0;
      halted <= 1'b0;
      pend   <= 1'b0;
      cualf  <= 5'b1_1010;   // B
      c_cualov <= 1'b0;
    end else begin
      if (cont) halted <= 1'b0;
      if (exec) begin
        case (sa_op)
          R_LD:    sa <= sb12;
          R_INC:   sa <= sa + 12'd1;
          R_DEC:   sa <= sa - 12'd1;
          R_CLR:   sa <= '0;
          default: ;
        endcase
        if (ex_ld)         ex <= ex_in;
        else if (ex_shift) ex <= {ex[3:0], ex[15:4]};
        if (cualf_ld)       cualf <= cualf_val;
        else if (cualf_add) cualf <= 5'b0_1001;
        else if (cualf_b)   cualf <= 5'b1_1010;
        if (stop_req) halted <= 1'b1;
      end
      if (seq) begin
        pend <= 1'b0;
        c_cualov <= cual_co;
        if (force0) begin
          addr   <= '0;
          ira    <= next_addr;
          int_en <= 1'b0;
        end else begin
          addr <= next_addr;
        end
      end else if (exec && (ra_ovf || rb_ovf)) begin
        pend <= 1'b1;
      end
      if (exec && inton)  int_en <= 1'b1;
      if (exec && intoff) int_en <= 1'b0;
    end
  end
endmodule
