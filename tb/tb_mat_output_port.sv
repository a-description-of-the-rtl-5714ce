// Testbench of mat_output_port with 16 device interfaces: the port register
// is loaded and activated (also both in the same clock), the selected
// device's buffer, mark and busy flag are checked, activation while busy must
// have no effect, and the device's done strobe frees the interface.
`timescale 1ns/1ps
module tb_mat_output_port;
  import mat_pkg::*;
  localparam int NDEV = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rop_e dev_op;
  logic [3:0] dev_val, dev;
  logic ld, act, act_mark, rst_op, sa;
  logic [63:0] ld_data, port_q;
  logic [63:0] dev_data [NDEV];
  logic [NDEV-1:0] dev_mark, dev_busy, dev_done;
  mat_output_port #(.NDEV(NDEV)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", what); end
  endtask
  initial begin
    dev_op = R_NOP; dev_val = 0; ld = 0; act = 0; act_mark = 0; rst_op = 0; ld_data = 0; dev_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int d;
      logic [63:0] w, w2;
      logic same;
      d = $urandom_range(0, NDEV - 1);
      dev_op = R_LD; dev_val = 4'(d);
      @(negedge clk);
      dev_op = R_NOP;
      check(sa, "space available before");
      w = {$urandom, $urandom};
      same = 1'($urandom);
      ld = 1; ld_data = w;
      if (same) begin act = 1; act_mark = 1'($urandom); end
      @(negedge clk);
      ld = 0;
      if (!same) begin act = 1; act_mark = 1'($urandom); @(negedge clk); end
      act = 0;
      check(port_q == w && dev_data[d] == w && dev_busy[d] && !sa, $sformatf("send dev %0d", d));
      // activation while busy is ignored
      w2 = ~w;
      ld = 1; ld_data = w2; act = 1;
      @(negedge clk);
      ld = 0; act = 0;
      check(dev_data[d] == w, "busy device keeps its word");
      dev_done[d] = 1;
      @(negedge clk);
      dev_done = 0;
      check(!dev_busy[d] && sa, "done frees the device");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
