// Testbench of mat_postshift_masks: PA/PB written from the bus at random
// pointers, PG code taken from each of its four sources (immediate, EX, bit
// encoder code, PGSG element), and the shifted-bus output compared with
// shifted AND (PA[PAP] OR PB[PBP] OR PG) of a model using its own mask rule.
`timescale 1ns/1ps
module tb_mat_postshift_masks;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rop_e pap_op, pbp_op, pgs_op;
  logic [3:0] pap_val, pbp_val;
  sg_cmd_t pmsg_cmd, pgsg_cmd;
  logic pmsg_we, pa_we, pb_we, pgsg_we;
  logic [1:0] pgs_val, pgs;
  logic [6:0] cm_code, ex_code, be_code;
  logic [63:0] bus, shifted, sb, mask;
  logic [6:0] sb_in;
  mat_postshift_masks dut (.*);
  int checks = 0, failures = 0;
  logic [63:0] pa [16], pb [16];
  logic [3:0] ppa, ppb;
  logic [1:0] mpgs;
  logic [6:0] sgv;
  function automatic logic [63:0] gen(input logic [6:0] c);
    logic [63:0] m;
    m = '1;
    if (!c[6]) for (int i = 0; i < int'(c[5:0]); i++) m[63 - i] = 1'b0;
    else for (int i = 0; i < 64 - int'(c[5:0]); i++) m[i] = 1'b0;
    return m;
  endfunction
  initial begin
    pap_op = R_NOP; pbp_op = R_NOP; pgs_op = R_NOP; pap_val = 0; pbp_val = 0;
    pmsg_cmd = SG_IDLE; pgsg_cmd = SG_IDLE; pmsg_we = 0; pa_we = 0; pb_we = 0; pgsg_we = 0;
    pgs_val = 0; cm_code = 0; ex_code = 0; be_code = 0; bus = 0; sb_in = 0; shifted = 0;
    for (int i = 0; i < 16; i++) begin pa[i] = (i == 1) ? '0 : '1; pb[i] = '0; end
    ppa = 0; ppb = 0; mpgs = 0; sgv = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // PGSG element 0 := 0x47
    sb_in = 7'h47; pgsg_we = 1; @(negedge clk); pgsg_we = 0; sgv = 7'h47;
    for (int n = 0; n < 3000; n++) begin
      logic [6:0] code;
      pap_op = ($urandom_range(0, 3) == 0) ? R_LD : R_NOP;
      pbp_op = ($urandom_range(0, 3) == 0) ? R_LD : R_NOP;
      pap_val = 4'($urandom_range(0, 3)); pbp_val = 4'($urandom_range(0, 3));
      pgs_op = ($urandom_range(0, 5) == 0) ? R_LD : R_NOP;
      pgs_val = 2'($urandom);
      pa_we = $urandom_range(0, 6) == 0; pb_we = $urandom_range(0, 6) == 0;
      cm_code = 7'($urandom); ex_code = 7'($urandom); be_code = 7'($urandom);
      bus = {$urandom, $urandom}; shifted = {$urandom, $urandom};
      #1;
      code = (mpgs == 0) ? cm_code : (mpgs == 1) ? ex_code : (mpgs == 2) ? be_code : sgv;
      checks++;
      if (sb !== (shifted & (pa[ppa] | pb[ppb] | gen(code))) || pgs !== mpgs) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d pgs=%0d", n, mpgs);
      end
      @(posedge clk);
      if (pa_we) pa[ppa] = bus;
      if (pb_we) pb[ppb] = bus;
      if (pap_op == R_LD) ppa = pap_val;
      if (pbp_op == R_LD) ppb = pbp_val;
      if (pgs_op == R_LD) mpgs = pgs_val;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
