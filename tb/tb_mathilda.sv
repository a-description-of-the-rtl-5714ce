// End-to-end testbench of the MATHILDA top level (default parameters: 4096-word
// control store, 256 working registers per file, 16 devices per port).
//
// A small assembler (functions below) builds microinstructions from
// microoperation names; the field of each microoperation comes from the
// decoder package, and a field conflict counts as a failure. The program is
// loaded through the control-store loader port during reset; all other words
// hold a stop-in-place instruction, and address FAIL is where wrong branches
// go. The program exercises: transport with AL, bus rotation, postshift mask
// generator, bus mask MB, working-register loading mask, bit encoder into
// Counter B via the status port, a counted loop, subroutine call/return via
// RA, long cycle (condition sees the same microinstruction's result), input
// port handshake with a wait loop, CS LOAD of a word read from the input
// port and its execution, forced jump to 0 on an external signal with IRA
// read back, STOP and continue, and output-port handshakes with stalls.
// Output words on OC and OA device 0 are compared with expected queues.
// Each mechanism is counted from the design's internal signals; a mechanism
// that never occurs is a failure. Cycle counts checked: the 4-pass counted
// loop, and the 2-clock long cycle.
`timescale 1ns/1ps
module tb_mathilda;
  import mat_pkg::*;
  import mat_mop_pkg::*;

  localparam int NDEV = 16;
  localparam logic [11:0] FAIL = 12'd4000;
  localparam logic [11:0] SUB  = 12'd100;
  localparam logic [11:0] LDD  = 12'd200;
  localparam logic [11:0] HND  = 12'd300;

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

  // At/Af = CUAL with B = T.t (CUALF resets to B): absolute jump target
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

  logic [63:0] prog [4096];
  uinst_t u;
  logic [63:0] qword;   // word supplied on IA and loaded into CS[LDD]

  localparam logic [13:0] K1 = 14'h1234, K2 = 14'h0456;

  function automatic word_t rotr(input word_t x, input int n);
    return (x >> n) | (x << (64 - n));
  endfunction

  word_t exp_oc [$];
  word_t exp_oa [$];

  initial begin
    word_t s, w;
    u = br(put(nop(), MOP_STOPB), C_FALSE, AD_A, AD_A);
    for (int i = 0; i < 4096; i++) prog[i] = u;
    // 0: after a forced jump KC is set -> handler
    prog[0]  = tgt(br(nop(), C_KC, AD_AL, AD_AP1), HND);
    prog[1]  = put(nop(), MOP_SETALF_A);
    u = kon(nop(), K1); u.sbd = SBD_LR;                prog[2] = u;
    u = kon(nop(), K2); u.as_ctl = SH_LOAD;            prog[3] = u;
    prog[4]  = put(nop(), MOP_SETALF_ADD);
    u = put(nop(), MOP_OC_LD); u.src = SRC_AL; u.sbd = SBD_WA; prog[5] = u;
    prog[6]  = put(nop(), MOP_OCA);
    s = 64'(K1) + 64'(K2);
    exp_oc.push_back(s);
    prog[7]  = waitc(C_OCSA);
    u = nop(); u.src = SRC_WA; u.bse = 1'b1; u.f3 = 7'd8; u.sbd = SBD_WB; prog[8] = u;
    prog[9]  = ld(nop(), MOP_PAP_LD, 2'd0, 7'd1);
    u = put(nop(), MOP_OAA); u.src = SRC_WB; u.f2 = 7'd8; take(2); u.sbd = SBD_OA; prog[10] = u;
    exp_oa.push_back(rotr(s, 8) & ({64{1'b1}} >> 8));
    prog[11] = put(nop(), MOP_PAP_CLR);
    u = kon(nop(), 14'h0F0F); u.sbd = SBD_MB;          prog[12] = u;
    prog[13] = ld(nop(), MOP_MAP_LD, 2'd0, 7'd1);
    u = kon(put(nop(), MOP_OC_LD), 14'h3333);          prog[14] = u;
    prog[15] = waitc(C_OCSA);
    prog[16] = put(nop(), MOP_OCA);
    exp_oc.push_back(64'h0303);
    prog[17] = put(nop(), MOP_MAP_CLR);
    u = put(nop(), MOP_LA_LD); u.src = SRC_WB;         prog[18] = u;
    w = rotr(s, 8);
    u = put(nop(), MOP_BUS_ALL1S); u.sbd = SBD_WA;     prog[19] = u;
    prog[20] = put(nop(), MOP_LAP_INC);
    u = put(nop(), MOP_OC_LD); u.src = SRC_WA;         prog[21] = u;
    prog[22] = waitc(C_OCSA);
    prog[23] = put(nop(), MOP_OCA);
    exp_oc.push_back((s & ~w) | w);
    prog[24] = kon(put(nop(), MOP_BELMLOAD), 14'h0140);
    prog[25] = ld(nop(), MOP_CB_LD, 2'd1, 7'd0);
    prog[26] = ld(nop(), MOP_SPP_LD, 2'd0, 7'd7);
    prog[27] = put(nop(), MOP_OC_LD);
    prog[28] = waitc(C_OCSA);
    prog[29] = put(nop(), MOP_OCA);
    exp_oc.push_back(64'd6);
    prog[30] = ld(nop(), MOP_SPP_LD, 2'd0, 7'd0);
    prog[31] = wide(nop(), MOP_CA_LD, 14'd3);
    prog[32] = br(put(nop(), MOP_CA_DEC), C_CA, AD_AP1, AD_A);
    prog[33] = tgt(br(put(nop(), MOP_RA_PUSH), C_FALSE, AD_AL, AD_AL), SUB);
    // subroutine: output a constant, return to caller + 1
    prog[SUB]     = kon(put(nop(), MOP_OC_LD), 14'h0777);
    prog[SUB + 1] = waitc(C_OCSA);
    u = br(put(nop(), MOP_OCA), C_FALSE, AD_RA, AD_RA); prog[SUB + 2] = u;
    exp_oc.push_back(64'h777);
    // long cycle: the condition sees CA after this microinstruction's increment
    prog[34] = put(put(nop(), MOP_CYL), MOP_CA_CLR);
    prog[35] = tgt(br(put(nop(), MOP_CA_INC), C_CA0, AD_AP1, AD_AL), FAIL);
    prog[36] = put(nop(), MOP_CYS);
    prog[37] = put(nop(), MOP_IAA);
    prog[38] = waitc(C_IADA);
    u = put(nop(), MOP_OC_LD); u.src = SRC_IA;         prog[39] = u;
    prog[40] = tgt(br(put(nop(), MOP_CSLOAD), C_FALSE, AD_AL, AD_AL), LDD);
    prog[41] = tgt(br(put(nop(), MOP_RA_PUSH), C_FALSE, AD_AL, AD_AL), LDD);
    u = kon(put(nop(), MOP_OAA), 14'h0ABC); u.sbd = SBD_OA;
    u = br(u, C_FALSE, AD_RA, AD_RA);
    qword = u;
    exp_oa.push_back(64'h0ABC);
    prog[42] = put(nop(), MOP_SETKC);
    prog[43] = put(nop(), MOP_INTON);
    prog[44] = waitc(C_KA);
    prog[HND]     = put(nop(), MOP_KCC);
    prog[HND + 1] = ld(nop(), MOP_SPP_LD, 2'd0, 7'd5);
    prog[HND + 2] = put(nop(), MOP_OC_LD);
    prog[HND + 3] = waitc(C_OCSA);
    prog[HND + 4] = put(nop(), MOP_OCA);
    exp_oc.push_back(64'd44);
    prog[HND + 5] = ld(nop(), MOP_SPP_LD, 2'd0, 7'd0);
    prog[HND + 6] = put(nop(), MOP_STOPA);
    prog[HND + 7] = kon(put(nop(), MOP_OC_LD), 14'h0055);
    prog[HND + 8] = waitc(C_OCSA);
    prog[HND + 9] = put(nop(), MOP_OCA);
    exp_oc.push_back(64'h55);
    prog[HND + 10] = br(put(nop(), MOP_STOPB), C_FALSE, AD_A, AD_A);
    check(asm_err == 0, "assembler field conflicts");
  end

  // --------------------------------------------------------------- devices
  int oc_delay = 0, oa_delay = 0, ia_wait = -1;
  always @(posedge clk) begin
    oc_done <= '0;
    oa_done <= '0;
    ia_ld   <= '0;
    if (oc_busy[0] && !oc_done[0]) begin
      if (oc_delay == 3) begin
        check(exp_oc.size() > 0 && oc_data[0] == exp_oc[0], $sformatf("OC word %h", oc_data[0]));
        if (exp_oc.size() > 0) void'(exp_oc.pop_front());
        oc_done[0] <= 1'b1;
        oc_delay <= 0;
      end else oc_delay <= oc_delay + 1;
    end
    if (oa_busy[0] && !oa_done[0]) begin
      if (oa_delay == 2) begin
        check(exp_oa.size() > 0 && oa_data[0] == exp_oa[0], $sformatf("OA word %h", oa_data[0]));
        if (exp_oa.size() > 0) void'(exp_oa.pop_front());
        oa_done[0] <= 1'b1;
        oa_delay <= 0;
      end else oa_delay <= oa_delay + 1;
    end
    if (ia_req[0]) ia_wait <= 4;
    else if (ia_wait > 0) ia_wait <= ia_wait - 1;
    else if (ia_wait == 0) begin
      ia_ld[0] <= 1'b1;
      ia_wait <= -1;
    end
  end
  always_comb begin
    for (int i = 0; i < NDEV; i++) begin
      ia_data[i] = (i == 0) ? qword : '0;
      ib_data[i] = '0;
    end
  end

  // ------------------------------------------------------ mechanism counts
  int n_wait = 0, n_long = 0, n_halt = 0, n_force0 = 0, n_push = 0, n_pop = 0;
  int n_csload = 0, n_bshift = 0, n_bmask = 0, n_pmask = 0, n_lmask = 0;
  int n_be = 0, n_in = 0, n_loop32 = 0, n_fail = 0;
  logic [11:0] prev_addr;
  always @(posedge clk) if (rst_n) begin
    if (dut.seq && dut.u_seq.next_addr == cur_addr && !dut.u_seq.force0) n_wait++;
    if (dut.phase) n_long++;
    if (halted) n_halt++;
    if (dut.seq && dut.u_seq.force0) n_force0++;
    if (dut.exec && dut.u_seq.ra_push) n_push++;
    if (dut.seq && dut.u_seq.src == AD_RA) n_pop++;
    if (dut.cs_we) n_csload++;
    if (dut.exec && dut.u.bse && dut.bs_amt != 0) n_bshift++;
    if (dut.exec && dut.bus_m != dut.src_val) n_bmask++;
    if (dut.exec && dut.sb_m != dut.shifted) n_pmask++;
    if (dut.exec && dut.u.sbd == SBD_WA && dut.u_wa.lmask != '1) n_lmask++;
    if (dut.exec && dut.act[MOP_BELMLOAD]) n_be++;
    if (ia_ld[0]) n_in++;
    if (dut.exec && cur_addr == 12'd32) n_loop32++;
    if (cur_addr == FAIL) n_fail++;
  end

  // long cycle: a microinstruction takes two clocks
  int long_start = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.exec && cur_addr == 12'd35) long_start = cyc;
    if (rst_n && dut.seq && cur_addr == 12'd35 && long_start >= 0)
      check(cyc - long_start == 1, "long cycle takes two clocks");
  end

  initial begin
    #1;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      cs_ld_we = 1; cs_ld_addr = 12'(i); cs_ld_data = prog[i];
    end
    @(negedge clk);
    cs_ld_we = 0;
    rst_n = 1;
    // wait in the KA loop, then interrupt
    wait (cur_addr == 12'd44 && int_en);
    repeat (5) @(negedge clk);
    ext_sig = 1;
    @(negedge clk);
    ext_sig = 0;
    // first stop: continue after a while
    wait (halted && cur_addr == HND + 7);
    repeat (6) @(negedge clk);
    cont = 1;
    @(negedge clk);
    cont = 0;
    wait (halted && cur_addr == HND + 10);
    repeat (8) @(negedge clk);
    check(exp_oc.size() == 0, $sformatf("%0d OC words missing", exp_oc.size()));
    check(exp_oa.size() == 0, $sformatf("%0d OA words missing", exp_oa.size()));
    check(dut.u_seq.ira == 12'd44, "IRA holds the interrupted address");
    check(n_loop32 == 4, $sformatf("counted loop ran %0d times, expected 4", n_loop32));
    check(n_fail == 0, "a wrong branch reached FAIL");
    check(dut.u_cs.mem[LDD] == qword, "CS LOAD wrote the input word");
    check(n_wait > 0,   "no wait-loop stall");
    check(n_long > 0,   "no long cycle");
    check(n_halt > 0,   "no halt");
    check(n_force0 == 1, "forced jump count");
    check(n_push == 2 && n_pop == 2, $sformatf("push %0d pop %0d", n_push, n_pop));
    check(n_csload == 1, "CS LOAD count");
    check(n_bshift > 0, "no bus rotation");
    check(n_bmask > 0,  "no bus masking");
    check(n_pmask > 0,  "no postshift masking");
    check(n_lmask > 0,  "no loading-mask write");
    check(n_be > 0,     "no bit encoder load");
    check(n_in == 1,    "input handshake count");
    $display("mechanisms: wait=%0d long=%0d halt=%0d force0=%0d push=%0d pop=%0d csload=%0d",
             n_wait, n_long, n_halt, n_force0, n_push, n_pop, n_csload);
    $display("mechanisms: bshift=%0d bmask=%0d pmask=%0d lmask=%0d be=%0d in=%0d",
             n_bshift, n_bmask, n_pmask, n_lmask, n_be, n_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("FAIL: watchdog at address %0d", cur_addr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
