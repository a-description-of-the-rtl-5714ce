// Testbench of mat_bus_parity: random and single-bit buses; the output must
// be 1 for an odd number of one bits. Combinational.
`timescale 1ns/1ps
module tb_mat_bus_parity;
  logic [63:0] bus;
  logic bp;
  mat_bus_parity dut (.bus, .bp);
  int checks = 0, failures = 0;
  initial begin
    for (int n = 0; n < 5000; n++) begin
      int ones;
      bus = (n < 64) ? (64'd1 << n) : {$urandom, $urandom};
      #1;
      ones = $countones(bus);
      checks++;
      if (bp !== 1'(ones % 2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
