// Testbench of mat_local_regs: random writes through the input pointer and
// random pointer operations (load from the DS pair, increment, decrement,
// clear); the A output must be the register at the output pointer, with
// writes and pointer changes visible from the next clock.
`timescale 1ns/1ps
module tb_mat_local_regs;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rop_e ip_op, op_op;
  logic [1:0] ds2, ip, opp;
  logic we;
  logic [63:0] sb, a;
  mat_local_regs dut (.*);
  int checks = 0, failures = 0;
  logic [63:0] r [4];
  logic [1:0] mi, mo;
  function automatic logic [1:0] upd(input logic [1:0] p, input rop_e o, input logic [1:0] d);
    case (o)
      R_LD: return d; R_INC: return p + 1; R_DEC: return p - 1; R_CLR: return 0;
      default: return p;
    endcase
  endfunction
  initial begin
    ip_op = R_NOP; op_op = R_NOP; ds2 = 0; we = 0; sb = 0;
    for (int i = 0; i < 4; i++) r[i] = 0;
    mi = 0; mo = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      ip_op = rop_e'($urandom_range(0, 6)); op_op = rop_e'($urandom_range(0, 6));
      if (ip_op == R_LS1 || ip_op == R_LS2) ip_op = R_NOP;
      if (op_op == R_LS1 || op_op == R_LS2) op_op = R_NOP;
      ds2 = 2'($urandom); we = $urandom_range(0, 1); sb = {$urandom, $urandom};
      @(posedge clk);
      if (we) r[mi] = sb;
      mi = upd(mi, ip_op, ds2);
      mo = upd(mo, op_op, ds2);
      #1;
      checks++;
      if (a !== r[mo] || ip !== mi || opp !== mo) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d", n);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
