// Testbench of mat_mop_decode: every microoperation is encoded in its own
// field (with the M/D bit set for F2..F4) and must be the only active
// decoded bit; the same code with M/D = 0 must decode to nothing; and four
// microoperations in the four fields decode together. Combinational.
`timescale 1ns/1ps
module tb_mat_mop_decode;
  import mat_pkg::*;
  import mat_mop_pkg::*;
  logic [63:0] ui;
  uinst_t u;
  logic [511:0] act;
  mat_mop_decode dut (.ui, .u, .act);
  int checks = 0, failures = 0;
  function automatic uinst_t enc(input uinst_t x, input mop_e m, input bit md);
    uinst_t y = x;
    case (mop_field(m))
      1: y.f1 = f1_code(m);
      2: begin y.f2 = f2_code(m); y.md2 = md; end
      3: begin y.f3 = f3_code(m); y.md3 = md; end
      default: begin y.f4 = f4_code(m); y.md4 = md; end
    endcase
    return y;
  endfunction
  initial begin
    uinst_t x;
    mop_e m;
    mop_e pick [4:1][$];
    m = m.first();
    m = m.next();
    while (m != MOP_NONE) begin
      logic [511:0] e;
      pick[mop_field(m)].push_back(m);
      x = '0;
      x.csb = 7'h55;
      ui = enc(x, m, 1'b1);
      #1;
      e = '0; e[m] = 1'b1;
      checks++;
      if (act !== e || u.csb !== 7'h55) begin
        failures++;
        $display("FAIL %s", m.name());
      end
      if (mop_field(m) != 1) begin
        ui = enc(x, m, 1'b0);
        #1;
        checks++;
        if (act !== '0) failures++;
      end
      m = m.next();
      if (m == m.first()) break;
    end
    for (int n = 0; n < 500; n++) begin
      mop_e q [4:1];
      logic [511:0] e;
      x = {$urandom, $urandom};
      e = '0;
      for (int f = 1; f <= 4; f++) begin
        q[f] = pick[f][$urandom_range(0, pick[f].size() - 1)];
        x = enc(x, q[f], 1'b1);
        e[q[f]] = 1'b1;
      end
      ui = x;
      #1;
      checks++;
      if (act !== e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
