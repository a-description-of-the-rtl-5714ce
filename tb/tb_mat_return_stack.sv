// Testbench of mat_return_stack (16 x 12-bit): random pushes of the current
// address and pops against a model stack; checks the top, the adder output
// top + B + carry-in, the pointer, the overflow/underflow conditions and the
// overflow event (push at the last position).
`timescale 1ns/1ps
module tb_mat_return_stack;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, clr, cin, pov, pun, ovf_evt;
  logic [11:0] cur_addr, b, sum, top;
  logic [3:0] ptr;
  mat_return_stack dut (.*);
  int checks = 0, failures = 0;
  logic [11:0] st [16];
  logic [3:0] mp;
  initial begin
    push = 0; pop = 0; clr = 0; cin = 0; cur_addr = 0; b = 0;
    for (int i = 0; i < 16; i++) st[i] = 0;
    mp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      push = $urandom_range(0, 2) == 0; pop = $urandom_range(0, 2) == 0;
      clr = $urandom_range(0, 60) == 0;
      cur_addr = 12'($urandom); b = 12'($urandom); cin = 1'($urandom);
      #1;
      checks++;
      if (top !== st[mp] || sum !== st[mp] + b + 12'(cin) || ptr !== mp ||
          pov !== (mp == 15) || pun !== (mp == 0) || ovf_evt !== (push && !pop && mp == 15)) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d", n);
      end
      @(posedge clk);
      if (clr) mp = 0;
      else begin
        if (push) st[mp + 4'd1] = cur_addr;
        if (push && !pop) mp = mp + 1;
        else if (pop && !push) mp = mp - 1;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
