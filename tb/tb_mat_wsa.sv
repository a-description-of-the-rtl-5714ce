// Testbench of mat_wsa (Wide Store Address register, 32768-word store):
// load/increment/decrement, the out-of-range condition (address >= store
// size) and the busy flag, which is set by a transfer request and cleared
// one clock after the memory reports that it took the address.
`timescale 1ns/1ps
module tb_mat_wsa;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rop_e op;
  logic [15:0] val, wsa;
  sg_cmd_t sg_cmd;
  logic sg_we, req, ws_taken, wsab, wsaor, sg_ovf;
  mat_wsa dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    op = R_NOP; val = 0; sg_cmd = SG_IDLE; sg_we = 0; req = 0; ws_taken = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(wsa == 0 && !wsab && !wsaor, "reset state");
    for (int n = 0; n < 500; n++) begin
      logic [15:0] v;
      v = 16'($urandom);
      op = R_LD; val = v;
      @(negedge clk);
      check(wsa == v && wsaor == (v >= 16'd32768), $sformatf("load %h", v));
      op = R_INC;
      @(negedge clk);
      check(wsa == v + 16'd1, "increment");
      op = R_DEC;
      @(negedge clk);
      op = R_NOP;
      check(wsa == v, "decrement");
    end
    op = R_LD; val = 16'h7FFF; @(negedge clk);
    check(!wsaor, "last word in range");
    op = R_INC; @(negedge clk); op = R_NOP;
    check(wsaor, "first word out of range");
    req = 1; @(negedge clk); req = 0;
    check(wsab, "busy after request");
    repeat (3) @(negedge clk);
    check(wsab, "busy until taken");
    ws_taken = 1; @(negedge clk); ws_taken = 0;
    check(!wsab, "free after taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
