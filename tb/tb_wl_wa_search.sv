// Workload testbench: search the working registers WA for the first register
// whose bit 63 is set, on the complete processor at its default sizes.
//
// The workload is the search routine used to introduce the working
// registers: N registers (2 <= N <= 256) are scanned from WA[0]; the first
// one with bit 63 set is copied to WB[0], the pointer is saved in WAPS, and
// if no register qualifies a separate exit is taken. The microprogram here is
// this testbench's own, written with the same small assembler functions as
// tb_mathilda:
//   fill:   N times: activate IA with CA-1, wait for data available,
//           WA := IA with WAP+1, loop until CA = 0
//   search: WAP := 0, CA := N; test WA(63) of WA[WAP] with CA-1 (the
//           condition is taken from the register addressed by the pointer),
//           then stop if CA = 0, otherwise WAP+1 and repeat
//   found:  WB := WA with WAPS := WAP, then send WB[0] and the pointer
//           (status port input 3) on OC device 0, then load WAP with an
//           immediate and send it too (checks the unit/group split of the
//           8-bit pointer load)
//   none:   send a marker word on OC device 0
// An input device model on IA device 0 answers each request a few clocks
// later with the next word of the data set; an output device model on OC
// device 0 compares each word with the expected queue.
// Cases: the full 256-register file with the hit at a random place, at the
// last register, with no hit, and the smallest file (N = 2).
// Checks: the output words, the number of passes through the test
// instruction (hit index + 1, or N), the saved pointer WAPS[0] and that the
// program halts. The original gives no cycle counts for this routine, so no
// latency is checked. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_wl_wa_search;
  import mat_pkg::*;
  import mat_mop_pkg::*;

  localparam int NDEV = 16;
  localparam logic [11:0] FOUND = 12'd50;
  localparam logic [11:0] NONE  = 12'd70;
  localparam logic [11:0] TEST  = 12'd7;
  localparam logic [13:0] MARK  = 14'h3EAD;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cs_ld_we = 0;
  logic [11:0] cs_ld_addr = 0;
  logic [63:0] cs_ld_data = 0;
  logic ka = 0, kb = 0, cont = 0, ext_sig = 0, snoop = 0, exda = 0, ws_taken = 0;
  logic [15:0] ex_in = 0;
  logic [NDEV-1:0] ia_req, ib_req, ia_ld = 0, ib_ld = 0, ia_mark = 0, ib_mark = 0;
  word_t ia_data [NDEV];
  word_t ib_data [NDEV];
  word_t oa_data [NDEV];
  word_t ob_data [NDEV];
  word_t oc_data [NDEV];
  word_t od_data [NDEV];
  logic [NDEV-1:0] oa_mark, ob_mark, oc_mark, od_mark, oa_busy, ob_busy, oc_busy, od_busy;
  logic [NDEV-1:0] oa_done = 0, ob_done = 0, oc_done = 0, od_done = 0;
  logic [15:0] wsa;
  logic [11:0] cur_addr;
  logic halted, long_mode, int_en;
  word_t bus_q, sb_q;

  mathilda dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ assembler
  logic [4:1] used;
  int asm_err = 0;

  function automatic uinst_t nop();
    uinst_t u;
    u = '0;
    u.af = AD_AP1; u.at = AD_AP1; u.csb = 7'(C_FALSE);
    u.src = SRC_SP; u.sbd = SBD_NONE;
    used = '0;
    return u;
  endfunction

  function automatic void take(input int f);
    if (used[f]) begin
      asm_err++;
      $display("assembler: field F%0d used twice", f);
    end
    used[f] = 1'b1;
  endfunction

  function automatic uinst_t put(input uinst_t ui, input mop_e m);
    uinst_t u = ui;
    int f = int'(mop_field(m));
    take(f);
    case (f)
      1: u.f1 = f1_code(m);
      2: begin u.f2 = f2_code(m); u.md2 = 1'b1; end
      3: begin u.f3 = f3_code(m); u.md3 = 1'b1; end
      default: begin u.f4 = f4_code(m); u.md4 = 1'b1; end
    endcase
    return u;
  endfunction

  function automatic uinst_t ld(input uinst_t ui, input mop_e m, input logic [1:0] sel,
                                input logic [6:0] d);
    uinst_t u = put(ui, m);
    if (mop_field(m) == 1) begin u.s1 = sel; u.f2 = d; take(2); end
    else begin u.s3 = sel; u.f4 = d; take(4); end
    return u;
  endfunction

  function automatic uinst_t wide(input uinst_t ui, input mop_e m, input logic [13:0] v);
    uinst_t u = put(ui, m);
    u.s1 = 2'd0; u.f2 = v[6:0]; u.f4 = v[13:7];
    take(2); take(4);
    return u;
  endfunction

  function automatic uinst_t kon(input uinst_t ui, input logic [13:0] k);
    uinst_t u = ui;
    u.src = SRC_SP; u.f3 = k[13:7]; u.f2 = k[6:0];
    take(2); take(3);
    return u;
  endfunction

  function automatic uinst_t tgt(input uinst_t ui, input logic [11:0] a);
    uinst_t u = ui;
    u.bisb = BD_TT; u.f3 = {1'b0, a[11:6]}; u.f4 = {1'b0, a[5:0]};
    take(3); take(4);
    return u;
  endfunction

  function automatic uinst_t br(input uinst_t ui, input cond_e c, input adsel_e t,
                                input adsel_e f);
    uinst_t u = ui;
    u.csb = 7'(c); u.at = t; u.af = f;
    return u;
  endfunction

  function automatic uinst_t waitc(input cond_e c);
    return br(nop(), c, AD_AP1, AD_A);
  endfunction

  // ------------------------------------------------------------- program
  logic [63:0] prog [128];

  function automatic void build(input int n);
    uinst_t u;
    u = br(put(nop(), MOP_STOPB), C_FALSE, AD_A, AD_A);
    for (int i = 0; i < 128; i++) prog[i] = u;
    prog[0]  = wide(nop(), MOP_CA_LD, 14'(n));
    prog[1]  = put(put(nop(), MOP_IAA), MOP_CA_DEC);
    prog[2]  = waitc(C_IADA);
    u = tgt(br(put(nop(), MOP_WAU_INC), C_CA, AD_AP1, AD_AL), 12'd1);
    u.src = SRC_IA; u.sbd = SBD_WA;
    prog[3]  = u;
    prog[4]  = put(nop(), MOP_WAPC);
    prog[5]  = wide(nop(), MOP_CA_LD, 14'(n));
    prog[6]  = nop();
    prog[7]  = tgt(br(put(nop(), MOP_CA_DEC), C_WA63, AD_AL, AD_AP1), FOUND);
    prog[8]  = tgt(br(put(nop(), MOP_WAU_INC), C_CA, AD_AL, AD_AP1), NONE);
    prog[9]  = tgt(br(nop(), C_FALSE, AD_AL, AD_AL), TEST);
    u = put(nop(), MOP_WAPS_WR); u.src = SRC_WA; u.sbd = SBD_WB;
    prog[FOUND]     = u;
    u = put(nop(), MOP_OC_LD); u.src = SRC_WB;
    prog[FOUND + 1] = u;
    prog[FOUND + 2] = waitc(C_OCSA);
    prog[FOUND + 3] = put(nop(), MOP_OCA);
    prog[FOUND + 4] = ld(nop(), MOP_SPP_LD, 2'd0, 7'd3);
    prog[FOUND + 5] = put(nop(), MOP_OC_LD);
    prog[FOUND + 6] = waitc(C_OCSA);
    prog[FOUND + 7] = put(nop(), MOP_OCA);
    prog[FOUND + 8] = ld(nop(), MOP_WAP_LD, 2'd0, 7'h25);
    prog[FOUND + 9] = put(nop(), MOP_OC_LD);
    prog[FOUND + 10] = waitc(C_OCSA);
    prog[FOUND + 11] = put(nop(), MOP_OCA);
    prog[FOUND + 12] = waitc(C_OCSA);
    prog[FOUND + 13] = br(put(nop(), MOP_STOPB), C_FALSE, AD_A, AD_A);
    prog[NONE]      = kon(put(nop(), MOP_OC_LD), MARK);
    prog[NONE + 1]  = waitc(C_OCSA);
    prog[NONE + 2]  = put(nop(), MOP_OCA);
    prog[NONE + 3]  = waitc(C_OCSA);
    prog[NONE + 4]  = br(put(nop(), MOP_STOPB), C_FALSE, AD_A, AD_A);
  endfunction

  // ------------------------------------------------------------- devices
  word_t data_set [256];
  int    next_word = 0;
  word_t exp_oc [$];
  int    ia_wait = -1, oc_delay = 0;

  always @(posedge clk) begin
    oc_done <= '0;
    ia_ld   <= '0;
    if (ia_req[0]) ia_wait <= 2 + int'($urandom_range(0, 3));
    else if (ia_wait > 0) ia_wait <= ia_wait - 1;
    else if (ia_wait == 0) begin
      ia_ld[0] <= 1'b1;
      ia_wait  <= -1;
    end
    if (ia_ld[0]) next_word <= next_word + 1;
    if (oc_busy[0] && !oc_done[0]) begin
      if (oc_delay == 2) begin
        check(exp_oc.size() > 0 && oc_data[0] == exp_oc[0],
              $sformatf("OC word %h, expected %h", oc_data[0],
                        exp_oc.size() > 0 ? exp_oc[0] : 64'hx));
        if (exp_oc.size() > 0) void'(exp_oc.pop_front());
        oc_done[0] <= 1'b1;
        oc_delay   <= 0;
      end else oc_delay <= oc_delay + 1;
    end
  end

  always_comb begin
    for (int i = 0; i < NDEV; i++) begin
      ia_data[i] = (i == 0) ? data_set[next_word[7:0]] : '0;
      ib_data[i] = '0;
    end
  end

  int n_test = 0;
  always @(posedge clk) if (rst_n && dut.seq && cur_addr == TEST) n_test++;

  // ---------------------------------------------------------------- runs
  task automatic run_case(input int n, input int hit);
    string tag = $sformatf("N=%0d hit=%0d", n, hit);
    rst_n = 0;
    build(n);
    for (int i = 0; i < 256; i++) begin
      data_set[i] = {1'b0, 31'($urandom), 32'($urandom)};
      if (i > hit && hit >= 0 && ($urandom_range(0, 1) == 1)) data_set[i][63] = 1'b1;
    end
    if (hit >= 0) data_set[hit][63] = 1'b1;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      cs_ld_we = 1; cs_ld_addr = 12'(i); cs_ld_data = prog[i];
    end
    @(negedge clk);
    cs_ld_we = 0;
    next_word = 0;
    n_test = 0;
    exp_oc.delete();
    if (hit >= 0) begin
      exp_oc.push_back(data_set[hit]);
      exp_oc.push_back(64'(hit));
      exp_oc.push_back(64'h25);
    end else begin
      exp_oc.push_back(64'(MARK));
    end
    rst_n = 1;
    wait (halted);
    repeat (6) @(negedge clk);
    check(exp_oc.size() == 0, $sformatf("%s: %0d output words missing", tag, exp_oc.size()));
    check(n_test == (hit >= 0 ? hit + 1 : n),
          $sformatf("%s: test instruction ran %0d times", tag, n_test));
    check(cur_addr == (hit >= 0 ? FOUND + 13 : NONE + 4), $sformatf("%s: stopped at %0d", tag, cur_addr));
    check(next_word == n, $sformatf("%s: %0d words read", tag, next_word));
    if (hit >= 0) begin
      check(dut.u_wb.regs[0] == data_set[hit], $sformatf("%s: WB[0] holds the found word", tag));
      check(dut.u_wa.u_us.elem[0] == 4'(hit) && dut.u_wa.u_gs.elem[0] == 4'(hit >> 4),
            $sformatf("%s: WAPS[0] holds the pointer", tag));
    end
  endtask

  initial begin
    build(2);
    check(asm_err == 0, "assembler field conflicts");
    run_case(256, int'($urandom_range(1, 254)));
    run_case(256, 255);
    run_case(256, 0);
    run_case(256, -1);
    run_case(2, 1);
    run_case(2, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: no finish after 100000 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
