// Arithmetic/logic function of W bits with the 32 functions of the design's
// function table: 16 arithmetic functions (two's complement, plus carry-in)
// and 16 logical functions, chosen by a 5-bit code {logic_mode, select[3:0]}.
//
// Each arithmetic function has the form P + Q + carry_in with
//   sel: 0 A        1 A|B        2 A|~B       3 -1
//        4 A+(A&~B) 5 (A|B)+(A&~B) 6 A-B-1    7 (A&~B)-1
//        8 A+(A&B)  9 A+B        10 (A|~B)+(A&B) 11 (A&B)-1
//        12 A+A     13 (A|B)+A   14 (A|~B)+A  15 A-1
// and the logical functions, unaffected by the carry-in, are
//   sel: 0 ~A  1 ~A&~B  2 ~A&B  3 0  4 ~A|~B  5 ~B  6 A==B(xnor)  7 A&~B
//        8 ~A|B  9 A!=B(xor)  10 B  11 A&B  12 1s  13 A|~B  14 A|B  15 A
// (the rows and columns of the design's table). Outputs: the result, the
// carry out of P+Q+cin (the overflow condition ALOV), two's complement
// overflow, and one's complement overflow (overflow of P+Q with end-around
// carry). Purely combinational; used 64 bits wide for the AL and 12 bits wide
// for the control unit's address ALU.
module mat_alu #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [4:0]   fn,     // {logic_mode, select}
  input  logic         cin,
  output logic [W-1:0] f,
  output logic         cout,
  output logic         ovf2,
  output logic         ovf1
);
  logic [W-1:0] p, q;
  logic [W:0]   sum, sum1;
  logic [3:0]   s;
  assign s = fn[3:0];

  always_comb begin
    p = a;
    q = '0;
    case (s)
      4'd0:  begin p = a;          q = '0;       end
      4'd1:  begin p = a | b;      q = '0;       end
      4'd2:  begin p = a | ~b;     q = '0;       end
      4'd3:  begin p = '0;         q = '1;       end
      4'd4:  begin p = a;          q = a & ~b;   end
      4'd5:  begin p = a | b;      q = a & ~b;   end
      4'd6:  begin p = a;          q = ~b;       end
      4'd7:  begin p = a & ~b;     q = '1;       end
      4'd8:  begin p = a;          q = a & b;    end
      4'd9:  begin p = a;          q = b;        end
      4'd10: begin p = a | ~b;     q = a & b;    end
      4'd11: begin p = a & b;      q = '1;       end
      4'd12: begin p = a;          q = a;        end
      4'd13: begin p = a | b;      q = a;        end
      4'd14: begin p = a | ~b;     q = a;        end
      default: begin p = a;        q = '1;       end
    endcase
    sum  = {1'b0, p} + {1'b0, q} + {{W{1'b0}}, cin};
    sum1 = {1'b0, p} + {1'b0, q};
    sum1 = {1'b0, sum1[W-1:0]} + {{W{1'b0}}, sum1[W]};
  end

  always_comb begin
    if (fn[4]) begin
      case (s)
        4'd0:  f = ~a;
        4'd1:  f = ~a & ~b;
        4'd2:  f = ~a & b;
        4'd3:  f = '0;
        4'd4:  f = ~a | ~b;
        4'd5:  f = ~b;
        4'd6:  f = ~(a ^ b);
        4'd7:  f = a & ~b;
        4'd8:  f = ~a | b;
        4'd9:  f = a ^ b;
        4'd10: f = b;
        4'd11: f = a & b;
        4'd12: f = '1;
        4'd13: f = a | ~b;
        4'd14: f = a | b;
        default: f = a;
      endcase
    end else begin
      f = sum[W-1:0];
    end
  end

  assign cout = fn[4] ? 1'b0 : sum[W];
  assign ovf2 = !fn[4] && (p[W-1] == q[W-1]) && (sum[W-1] != p[W-1]);
  assign ovf1 = !fn[4] && (p[W-1] == q[W-1]) && (sum1[W-1] != p[W-1]);
endmodule
