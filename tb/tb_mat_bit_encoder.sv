// Testbench of mat_bit_encoder: random buses (with one to a few bits set)
// loaded into the L and M encoders; the stored LSB1/LSB2/MSB1/MSB2, the
// eight F functions and the G = F/2 + 1 variants selected by BEF are compared
// with a model, as are the conditions LSB1, MSB1, L1, LD and the direction bit.
`timescale 1ns/1ps
module tb_mat_bit_encoder;
  import mat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] bus;
  logic l_load, m_load, l_swap, m_swap, sg_we, pg_l, pg_m;
  rop_e bef_op;
  logic [3:0] bef_val, sb4;
  sg_cmd_t sg_cmd;
  logic [5:0] be, lsb1, lsb2, msb1, msb2;
  logic bepg, c_lsb1, c_msb1, c_l1, c_l2, c_ld, c_sgnld, c_lsbd, c_sgnlsbd, c_msbd, c_sgnmsbd;
  logic c_be0;
  mat_bit_encoder dut (.*);
  int checks = 0, failures = 0;
  int ml1, ml2, mm1, mm2;
  function automatic int fval(input int k);
    case (k)
      0: return ml1; 1: return ml1 - 1; 2: return mm1; 3: return mm1 + 1;
      4: return mm1 - ml1; 5: return (mm2 - ml2) - (mm1 - ml1);
      6: return ml2 - ml1; default: return mm2 - mm1;
    endcase
  endfunction
  initial begin
    l_load = 0; m_load = 0; l_swap = 0; m_swap = 0; sg_we = 0; pg_l = 0; pg_m = 0;
    bef_op = R_NOP; bef_val = 0; sb4 = 0; sg_cmd = SG_IDLE; bus = 0;
    ml1 = 63; ml2 = 63; mm1 = 0; mm2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int lo, hi;
      lo = $urandom_range(0, 63); hi = $urandom_range(lo, 63);
      bus = (64'd1 << lo) | (64'd1 << hi);
      if ($urandom_range(0, 1)) bus = bus | ((64'd1 << hi) - (64'd1 << lo));
      l_load = 1; m_load = 1;
      @(negedge clk);
      l_load = 0; m_load = 0;
      ml2 = ml1; ml1 = lo; mm2 = mm1; mm1 = hi;
      checks++;
      if (lsb1 !== 6'(ml1) || lsb2 !== 6'(ml2) || msb1 !== 6'(mm1) || msb2 !== 6'(mm2) ||
          c_lsb1 !== (ml1 == 0) || c_msb1 !== (mm1 == 63) || c_l1 !== (mm1 == ml1) ||
          c_ld !== ((mm1 - ml1) == (mm2 - ml2)) || c_lsbd !== (ml1 == ml2)) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d registers", n);
      end
      for (int k = 0; k < 16; k++) begin
        int e;
        bef_op = R_LD; bef_val = 4'(k);
        @(negedge clk);
        bef_op = R_NOP;
        e = fval(k % 8);
        if (k >= 8) e = e / 2 + 1;
        checks++;
        if (be !== 6'(e)) begin
          failures++;
          if (failures < 5) $display("FAIL n=%0d bef=%0d be=%0d exp=%0d", n, k, be, 6'(e));
        end
      end
    end
    pg_l = 1; @(negedge clk); pg_l = 0;
    checks++; if (bepg !== 1'b1) failures++;
    pg_m = 1; @(negedge clk); pg_m = 0;
    checks++; if (bepg !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
