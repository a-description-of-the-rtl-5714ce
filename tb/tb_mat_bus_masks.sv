// Testbench of mat_bus_masks: after reset MAP=0 passes the bus, MAP=1 masks
// it with MB[MBP] (zero after reset); then random masks are written into MA
// and MB elements from the shifted bus, pointers moved, and the bus output
// must equal source AND (MA[MAP] OR MB[MBP]) of the model.
`timescale 1ns/1ps
module tb_mat_bus_masks;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rop_e map_op, mbp_op;
  logic [3:0] map_val, mbp_val, map, mbp;
  sg_cmd_t sg_cmd;
  logic sg_we, ma_we, mb_we;
  logic [63:0] sb, src, bus, mask;
  mat_bus_masks dut (.*);
  int checks = 0, failures = 0;
  logic [63:0] ma [16], mb [16];
  logic [3:0] pa, pb;
  initial begin
    map_op = R_NOP; mbp_op = R_NOP; map_val = 0; mbp_val = 0; sg_cmd = SG_IDLE;
    sg_we = 0; ma_we = 0; mb_we = 0; sb = 0; src = 0;
    for (int i = 0; i < 16; i++) begin ma[i] = (i == 1) ? '0 : '1; mb[i] = '0; end
    pa = 0; pb = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      map_op = ($urandom_range(0, 3) == 0) ? R_LD : ($urandom_range(0, 4) == 0 ? R_INC : R_NOP);
      mbp_op = ($urandom_range(0, 3) == 0) ? R_LD : ($urandom_range(0, 4) == 0 ? R_DEC : R_NOP);
      map_val = 4'($urandom); mbp_val = 4'($urandom);
      ma_we = $urandom_range(0, 5) == 0; mb_we = $urandom_range(0, 5) == 0;
      sb = {$urandom, $urandom};
      src = {$urandom, $urandom};
      #1;
      checks++;
      if (bus !== (src & (ma[pa] | mb[pb])) || map !== pa || mbp !== pb) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d", n);
      end
      @(posedge clk);
      if (ma_we) ma[pa] = sb;
      if (mb_we) mb[pb] = sb;
      if (map_op == R_LD) pa = map_val; else if (map_op == R_INC) pa = pa + 1;
      if (mbp_op == R_LD) pb = mbp_val; else if (mbp_op == R_DEC) pb = pb - 1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
