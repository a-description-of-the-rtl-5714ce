// Testbench of mat_al_unit: ALF set to A+B, A-B, A, A+1, B, zeros and ones
// and loaded from the 6-bit Standard Group; the result for random operands is
// checked from the clock after the function change (one-clock latency of the
// function register), together with the all-ones condition and the overflow
// of A+B.
`timescale 1ns/1ps
module tb_mat_al_unit;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic alf_ld, alf_ldsg, sg_we;
  logic [5:0] alf_val, sb6, alf;
  sg_cmd_t sg_cmd;
  logic [63:0] a, b, f;
  logic c_all1, c_ovf, c_oneov, c_twoov;
  mat_al_unit dut (.*);
  int checks = 0, failures = 0;
  task automatic setf(input logic [5:0] v);
    alf_ld = 1; alf_val = v; @(negedge clk); alf_ld = 0;
  endtask
  function automatic logic [63:0] model(input logic [5:0] fn, input logic [63:0] x, input logic [63:0] y);
    case (fn)
      ALF_ADD: return x + y;
      ALF_SUB: return x - y;
      ALF_A: return x;
      ALF_INC: return x + 1;
      ALF_B: return y;
      ALF_ALL0S: return '0;
      ALF_ALL1S: return '1;
      default: return x | y;
    endcase
  endfunction
  initial begin
    logic [5:0] fns [8];
    fns = '{ALF_ADD, ALF_SUB, ALF_A, ALF_INC, ALF_B, ALF_ALL0S, ALF_ALL1S, ALF_OR};
    alf_ld = 0; alf_ldsg = 0; alf_val = 0; sg_we = 0; sb6 = 0; sg_cmd = SG_IDLE; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      if (k == 7) begin
        // via the Standard Group: ALSG[0] := ALF_OR, then ALF := ALSG
        sb6 = fns[k]; sg_we = 1; @(negedge clk); sg_we = 0;
        alf_ldsg = 1; @(negedge clk); alf_ldsg = 0;
      end else setf(fns[k]);
      checks++;
      if (alf !== fns[k]) failures++;
      for (int n = 0; n < 300; n++) begin
        a = {$urandom, $urandom}; b = {$urandom, $urandom};
        if (n == 0) begin a = 64'h7FFF_FFFF_FFFF_FFFF; b = 1; end
        #1;
        checks++;
        if (f !== model(fns[k], a, b) || c_all1 !== (f == '1)) begin
          failures++;
          if (failures < 5) $display("FAIL k=%0d a=%h b=%h f=%h", k, a, b, f);
        end
        if (k == 0) begin
          checks++;
          if (c_twoov !== (a[63] == b[63] && f[63] != a[63])) failures++;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
