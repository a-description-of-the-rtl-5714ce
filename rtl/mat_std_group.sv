// Standard Group (SG): a register group of N elements of W bits with a 4-bit
// pointer and two pointer-save registers, the common control element of the
// processor (register group with pointer, Save1 and Save2).
//
// The pointer can be loaded (from the value carried by the command, from
// Save1 or from Save2), incremented, decremented (modulo N) and cleared.
// Save1 can be loaded from the command value or from Save2; Save2 := pointer.
// The element addressed by the pointer is written with wd when we is high and
// is always presented on rd.
//
// Timing: every update happens at the rising clock edge and uses the values
// from before the edge. This gives the two-clock-pulse order of the design in
// one edge: an element write and "Save2 := pointer" (clock pulse 1) see the old
// pointer, the pointer change (clock pulse 2) takes effect afterwards. One
// consequence, this design's choice: "Save2 := P" together with "P := Save2"
// swaps the two.
// Reset clears pointer and save registers and sets every element to RST.
module mat_std_group
  import mat_pkg::*;
#(
  parameter int unsigned W   = 16,
  parameter int unsigned N   = 16,
  parameter logic [W-1:0] RST = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  sg_cmd_t       cmd,
  input  logic          we,     // element[pointer] := wd
  input  logic [W-1:0]  wd,
  output logic [W-1:0]  rd,     // element[pointer]
  output logic [3:0]    ptr,
  output logic [3:0]    s1,
  output logic [3:0]    s2,
  output logic          ptr_ovf // pointer = 1111
);
  logic [W-1:0] elem [N];

  assign rd      = elem[ptr];
  assign ptr_ovf = (ptr == 4'hF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
      s1  <= '0;
      s2  <= '0;
      for (int i = 0; i < int'(N); i++) elem[i] <= RST;
    end else begin
      if (we) elem[ptr] <= wd;
      if (cmd.s2_ld) s2 <= ptr;
      case (cmd.s1_op)
        R_LD:    s1 <= cmd.val;
        R_LS2:   s1 <= s2;
        default: ;
      endcase
      case (cmd.p_op)
        R_LD:    ptr <= cmd.val;
        R_LS1:   ptr <= s1;
        R_LS2:   ptr <= s2;
        R_INC:   ptr <= ptr + 4'd1;
        R_DEC:   ptr <= ptr - 4'd1;
        R_CLR:   ptr <= '0;
        default: ;
      endcase
    end
  end
endmodule
