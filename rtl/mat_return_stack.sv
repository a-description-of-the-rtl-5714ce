// Return jump stack (RA or RB): 16 x 12-bit address registers, a 4-bit
// stack pointer and a 12-bit adder.
//
// Push increments the pointer and then stores the current microinstruction
// address at the new top. Pop decrements the pointer; the sequencer pops
// automatically when the stack adder is chosen as next address. The adder
// output is top + B + carry_in, used for returns with a displacement.
// A push with the pointer at 1111 overwrites element 0: this is reported as
// an overflow event (ovf_evt), one of the causes of a forced jump to address
// 0. Conditions: pointer = 1111 (POV) and pointer = 0000 (PUN). A push and a
// pop in the same microinstruction leave the pointer as it was and store the
// address one above it.
module mat_return_stack (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  logic        pop,
  input  logic        clr,
  input  logic [11:0] cur_addr,
  input  logic [11:0] b,
  input  logic        cin,
  output logic [11:0] sum,
  output logic [11:0] top,
  output logic [3:0]  ptr,
  output logic        pov,
  output logic        pun,
  output logic        ovf_evt
);
  logic [11:0] stk [16];

  assign top     = stk[ptr];
  assign sum     = top + b + {11'd0, cin};
  assign pov     = (ptr == 4'hF);
  assign pun     = (ptr == 4'h0);
  assign ovf_evt = push && !pop && pov;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
      for (int i = 0; i < 16; i++) stk[i] <= '0;
    end else if (clr) begin
      ptr <= '0;
    end else begin
      if (push) stk[ptr + 4'd1] <= cur_addr;
      if (push && !pop)      ptr <= ptr + 4'd1;
      else if (pop && !push) ptr <= ptr - 4'd1;
    end
  end
endmodule
