// Testbench of mat_control_store (4096 x 64): writes every word, reads back
// through the asynchronous read port, then checks that a write to the word
// being read shows on the output right after the clock edge.
`timescale 1ns/1ps
module tb_mat_control_store;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [11:0] raddr, waddr;
  logic [63:0] rdata, wdata;
  logic we;
  mat_control_store #(.AW(12)) dut (.*);
  int checks = 0, failures = 0;
  logic [63:0] m [4096];
  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      m[i] = {$urandom, $urandom};
      we = 1; waddr = 12'(i); wdata = m[i];
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 4096; i++) begin
      raddr = 12'(i);
      #1;
      checks++;
      if (rdata !== m[i]) failures++;
    end
    raddr = 12'd77;
    @(negedge clk);
    we = 1; waddr = 12'd77; wdata = 64'h0123_4567_89AB_CDEF;
    @(posedge clk);
    #1;
    we = 0;
    checks++;
    if (rdata !== 64'h0123_4567_89AB_CDEF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
