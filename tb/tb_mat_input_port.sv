// Testbench of mat_input_port with 16 device interfaces: for random devices
// the port is activated, the testbench device answers the one-clock request
// after a random delay with data and mark, and the port must show data
// available (cleared by the activation, set by the device load), the mark
// and the buffered word of the selected device.
`timescale 1ns/1ps
module tb_mat_input_port;
  import mat_pkg::*;
  localparam int NDEV = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rop_e dev_op;
  logic [3:0] dev_val, dev;
  logic act, da, dm;
  logic [63:0] data;
  logic [NDEV-1:0] dev_req, dev_ld, dev_mark;
  logic [63:0] dev_data [NDEV];
  mat_input_port #(.NDEV(NDEV)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    dev_op = R_NOP; dev_val = 0; act = 0; dev_ld = 0; dev_mark = 0;
    for (int i = 0; i < NDEV; i++) dev_data[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int d;
      logic [63:0] w;
      logic mk;
      d = $urandom_range(0, NDEV - 1);
      dev_op = R_LD; dev_val = 4'(d);
      @(negedge clk);
      dev_op = R_NOP;
      act = 1;
      @(negedge clk);
      act = 0;
      checks++;
      if (!dev_req[d] || da) failures++;
      w = {$urandom, $urandom}; mk = 1'($urandom);
      repeat ($urandom_range(0, 4)) @(negedge clk);
      dev_data[d] = w; dev_mark[d] = mk; dev_ld[d] = 1;
      @(negedge clk);
      dev_ld = 0;
      checks++;
      if (!da || dm !== mk || data !== w || dev !== 4'(d)) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d dev %0d", n, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
