// MATHILDA: top level of the 64-bit microprogrammed processor.
//
// What it does: executes 64-bit microinstructions from a 4096-word writable
// control store. Each microinstruction performs one data transport in the
// main data path (MDP) plus up to four microoperations (fields F1..F4), moves
// the three shift registers AS, VS and DS, and picks the next address by
// "if c then At else Af" on one of the testable conditions.
//
// How: the transport is SOURCE -> bus masks (AND with MA[MAP] or MB[MBP],
// optionally all ones) -> BUS -> bus shifter (right rotate when BS enable is
// set) -> postshift masks (AND with PA[PAP], PB[PBP] or the generated mask,
// optionally all zeros) -> SB -> the SBD destination and/or AS, VS, DS loads.
// The BUS and SB values of the last transport are kept in registers and feed
// the conditions and the bit encoder's stored state. All other units
// (counters, pointers, Standard Groups, ports) take their microoperations
// from the decoder. Loads with a source selection use S1/F2 (microoperation
// in F1) or S3/F4 (in F3); data sources are CM (immediate), EX, SB, BE or the
// unit's Standard Group as given per unit. Wide immediates of the 16-bit
// counters are {F4,F2}; the status port literal (input 0) is {F3,F2}.
//
// Timing: short cycle = one clock per microinstruction; every register
// changes at the one rising edge, so the conditions seen by sequencing are
// those left by the previous microinstruction. Long cycle (after CYL) = two
// clocks: the first executes the transport and microoperations, the second
// sequences with the conditions this microinstruction produced. CR, KC and KD
// loads from the selected condition happen in the sequencing clock.
// STOPA/STOPB halt after the current microinstruction until cont. A forced
// jump to address 0 is taken while interrupts are enabled on ext_sig, snoop
// or a return-stack overflow.
//
// Interface: control store load port (cs_ld_*, usable while halted or held
// in reset, own addition for program loading), console switches KA/KB, EX
// input with EXDA, external and snooper interrupt lines, device sides of the
// input ports IA/IB and output ports OA..OD (NDEV devices each), the wide
// store handshake (ws_taken, wsa). Observation outputs: current address,
// halted, latched BUS/SB.
//
// Status port inputs (own numbering, 16 bits, zero-extended to 64): 0 literal,
// 1 {BEPG,BE}, 2 EX(11:0), 3 WAP, 4 WBP, 5 IRA, 6 CA, 7 CB, 8 SA, 9 WSA,
// 10 {LSB2,LSB1}, 11 {MSB2,MSB1}, 12 current address, 13 {PG select, BSS,
// ALF}, 14 {MAP,MBP,LR pointers}, 15 EX, 16 AS/VS end-fill selections,
// 17 AS/VS width bits, 18 {DS width, bus shift amount}, 19 AVD group, 20
// {CA/CB group pointers, SPP}, 21 {IAD,IBD,OAD,OBD}, 22 {OCD,ODD}; 23..63 read 0.
//
// Follows the design for the data path, units and sequencing. Own choices:
// microinstruction field order and microoperation codes (mat_pkg,
// mat_mop_pkg), condition numbering (mat_pkg::cond_e), status-port input
// numbering, double-shifter fill table, the loader port.
`include "mat_defs.svh"
module mathilda
  import mat_pkg::*;
  import mat_mop_pkg::*;
#(
  parameter int unsigned NDEV     = 16,
  parameter int unsigned NREG     = 256,
  parameter int unsigned WS_WORDS = 32768
) (
  input  logic            clk,
  input  logic            rst_n,
  // control store loader
  input  logic            cs_ld_we,
  input  logic [11:0]     cs_ld_addr,
  input  logic [63:0]     cs_ld_data,
  // console and control unit inputs
  input  logic            ka,
  input  logic            kb,
  input  logic            cont,
  input  logic            ext_sig,
  input  logic            snoop,
  input  logic [15:0]     ex_in,
  input  logic            exda,
  // input ports
  output logic [NDEV-1:0] ia_req,
  input  logic [NDEV-1:0] ia_ld,
  input  word_t           ia_data [NDEV],
  input  logic [NDEV-1:0] ia_mark,
  output logic [NDEV-1:0] ib_req,
  input  logic [NDEV-1:0] ib_ld,
  input  word_t           ib_data [NDEV],
  input  logic [NDEV-1:0] ib_mark,
  // output ports
  output word_t           oa_data [NDEV],
  output logic [NDEV-1:0] oa_mark,
  output logic [NDEV-1:0] oa_busy,
  input  logic [NDEV-1:0] oa_done,
  output word_t           ob_data [NDEV],
  output logic [NDEV-1:0] ob_mark,
  output logic [NDEV-1:0] ob_busy,
  input  logic [NDEV-1:0] ob_done,
  output word_t           oc_data [NDEV],
  output logic [NDEV-1:0] oc_mark,
  output logic [NDEV-1:0] oc_busy,
  input  logic [NDEV-1:0] oc_done,
  output word_t           od_data [NDEV],
  output logic [NDEV-1:0] od_mark,
  output logic [NDEV-1:0] od_busy,
  input  logic [NDEV-1:0] od_done,
  // wide store address handshake
  input  logic            ws_taken,
  output logic [15:0]     wsa,
  // observation
  output logic [11:0]     cur_addr,
  output logic            halted,
  output logic            long_mode,
  output logic            int_en,
  output word_t           bus_q,
  output word_t           sb_q
);
  // ---------------------------------------------------------------- helpers
  function automatic rop_e ldop(input logic ld, input logic [1:0] sel,
                                input logic inc, input logic dec, input logic clr);
    if (ld)       return (sel == 2'd3) ? R_LSG : R_LD;
    else if (inc) return R_INC;
    else if (dec) return R_DEC;
    else if (clr) return R_CLR;
    return R_NOP;
  endfunction

  // sel 0: immediate, 1: first alternative, 2: second alternative
  function automatic logic [15:0] pick(input logic [1:0] sel, input logic [15:0] cm,
                                       input logic [15:0] a1, input logic [15:0] a2);
    case (sel)
      2'd0:    return cm;
      2'd1:    return a1;
      default: return a2;
    endcase
  endfunction

  // Standard Group command; pointer source 0 CM, 1 alt (EX or SB), 2 S1, 3 S2;
  // Save1 source 0 CM, 1 alt, 2 alt, 3 S2.
  function automatic sg_cmd_t sgc(input logic pld, input logic [1:0] psel,
                                  input logic [3:0] pdat, input logic pinc,
                                  input logic pdec, input logic pclr,
                                  input logic s1ld, input logic [1:0] s1sel,
                                  input logic [3:0] s1dat, input logic s2wr,
                                  input logic [3:0] alt);
    sg_cmd_t c;
    c = SG_IDLE;
    if (pld) begin
      case (psel)
        2'd0: begin c.p_op = R_LD; c.val = pdat; end
        2'd1: begin c.p_op = R_LD; c.val = alt; end
        2'd2: c.p_op = R_LS1;
        default: c.p_op = R_LS2;
      endcase
    end else if (pinc) c.p_op = R_INC;
    else if (pdec) c.p_op = R_DEC;
    else if (pclr) c.p_op = R_CLR;
    if (s1ld) begin
      if (s1sel == 2'd3) c.s1_op = R_LS2;
      else begin
        c.s1_op = R_LD;
        if (!pld || psel[1]) c.val = (s1sel == 2'd0) ? s1dat : alt;
      end
    end
    c.s2_ld = s2wr;
    return c;
  endfunction

  function automatic sg_cmd_t sgm(input sg_cmd_t a, input sg_cmd_t b);
    return (a.p_op != R_NOP || a.s1_op != R_NOP || a.s2_ld) ? a : b;
  endfunction

`define SGCMD(X, ALT) sgc(`MOP(X``P_LD), `SEL(X``P_LD), 4'(`DAT(X``P_LD)), \
    `MOP(X``P_INC), `MOP(X``P_DEC), `MOP(X``P_CLR), \
    `MOP(X``PS1_LD), `SEL(X``PS1_LD), 4'(`DAT(X``PS1_LD)), `MOP(X``PS2_WR), ALT)

  // ---------------------------------------------------------- control unit
  logic [63:0]  ui;
  uinst_t       u;
  logic [511:0] act_raw, act;
  logic         phase, run, exec, seq;
  logic         sc;
  logic [127:0] cond;
  logic         cs_we;
  logic [11:0]  cs_waddr, sa, ira;
  logic [15:0]  ex;
  logic         c_rapov, c_rapun, c_rbpov, c_rbpun, c_cualov;
  logic         cr, crp_ovf, kc, kd;
  word_t        oc_q, od_q_unused;
  word_t src_val, bus_c, bus_m, shifted, sb_m, sb_c;
  word_t sp_q, al_f, vs_q, ds_q, as_q, wa_q, wb_q, ia_q, ib_q;

  mat_control_store #(.AW(12)) u_cs (
    .clk, .raddr(cur_addr), .rdata(ui),
    .we(cs_ld_we || cs_we),
    .waddr(cs_ld_we ? cs_ld_addr : cs_waddr),
    .wdata(cs_ld_we ? cs_ld_data : (`MOP(OC_LD) ? bus_c : oc_q)));

  mat_mop_decode u_dec (.ui, .u, .act(act_raw));

  assign run  = !halted && !cs_ld_we;
  assign exec = run && !phase;
  assign seq  = run && (!long_mode || phase);
  assign act  = exec ? act_raw : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= 1'b0;
    else        phase <= run && long_mode && !phase;
  end

  mat_sequencer u_seq (
    .clk, .rst_n, .exec, .seq,
    .af(u.af), .at(u.at), .bisb(u.bisb), .cisb(u.cisb),
    .tt_hi(u.f3[5:0]), .tt_lo(u.f4[5:0]), .c(sc),
    .sa_op(`MOP(SA_LD) ? R_LD : `MOP(SA_INC) ? R_INC : `MOP(SA_DEC) ? R_DEC :
           `MOP(SA_CLR) ? R_CLR : R_NOP),
    .sb12(sb_c[11:0]),
    .cualf_ld(`MOP(CUALF_LD)), .cualf_val(u.f2[4:0]),
    .cualf_add(`MOP(SETCUALFADD)), .cualf_b(`MOP(SETCUALFB)),
    .ra_push(`MOP(RA_PUSH)), .ra_pop(`MOP(RA_POP)), .ra_clr(`MOP(RAPC)),
    .rb_push(`MOP(RB_PUSH)), .rb_pop(`MOP(RB_POP)), .rb_clr(`MOP(RBPC)),
    .ex_ld(`MOP(EXLOAD)), .ex_shift(`MOP(EXSHIFT)), .ex_in,
    .inton(`MOP(INTON)), .intoff(`MOP(INTOFF)), .cs_load(`MOP(CSLOAD)),
    .stop_req(`MOP(STOPA) || `MOP(STOPB)), .cont, .ext_sig, .snoop,
    .addr(cur_addr), .sa, .ex, .ira, .int_en, .halted,
    .cs_we, .cs_waddr, .c_rapov, .c_rapun, .c_rbpov, .c_rbpun, .c_cualov);

  mat_conditions u_cond (
    .clk, .rst_n, .cond, .csb(u.csb), .sc,
    .cr_cmd(`SGCMD(CR, sb_c[3:0])),
    .cr_ld(seq && act_raw[MOP_CR_LD]),
    .kc_ld(seq && act_raw[MOP_KC_LD]), .kc_set(`MOP(SETKC)), .kc_clr(`MOP(KCC)),
    .kd_ld(seq && act_raw[MOP_KD_LD]), .kd_set(`MOP(SETKD)), .kd_clr(`MOP(KDC)),
    .cyl(`MOP(CYL)), .cys(`MOP(CYS)),
    .cr, .crp_ovf, .kc, .kd, .long_mode);

  // ------------------------------------------------------------- transport

  always_comb begin
    case (u.src)
      SRC_SP:  src_val = sp_q;
      SRC_AL:  src_val = al_f;
      SRC_VS:  src_val = vs_q;
      SRC_DS:  src_val = ds_q;
      SRC_WA:  src_val = wa_q;
      SRC_WB:  src_val = wb_q;
      SRC_IA:  src_val = ia_q;
      default: src_val = ib_q;
    endcase
  end

  assign bus_c = `MOP(BUS_ALL1S) ? '1 : bus_m;
  assign sb_c  = `MOP(SB_ALL0S) ? '0 : sb_m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_q <= '0;
      sb_q  <= '0;
    end else if (exec) begin
      bus_q <= bus_c;
      sb_q  <= sb_c;
    end
  end

  // bus masks
  logic [3:0] map, mbp;
  word_t      bm_mask_unused;
  mat_bus_masks u_bm (
    .clk, .rst_n,
    .map_op(ldop(`MOP(MAP_LD), `SEL(MAP_LD), `MOP(MAP_INC), `MOP(MAP_DEC), `MOP(MAP_CLR))),
    .map_val(4'(pick(`SEL(MAP_LD), 16'(`DAT(MAP_LD)), ex, sb_c[15:0]))),
    .mbp_op(ldop(`MOP(MBP_LD), `SEL(MBP_LD), `MOP(MBP_INC), `MOP(MBP_DEC), `MOP(MBP_CLR))),
    .mbp_val(4'(pick(`SEL(MBP_LD), 16'(`DAT(MBP_LD)), ex, sb_c[15:0]))),
    .sg_cmd(`SGCMD(BM, ex[3:0])), .sg_we(`MOP(BMSG_WR)),
    .ma_we(exec && u.sbd == SBD_MA), .mb_we(exec && u.sbd == SBD_MB),
    .sb(sb_c), .src(src_val), .bus(bus_m), .mask(bm_mask_unused), .map, .mbp);

  // bus shifter
  logic [5:0] be;
  logic       bepg;
  logic [1:0] bss;
  logic [5:0] bs_amt;
  mat_bus_shifter u_bs (
    .clk, .rst_n, .en(u.bse), .cm_amt(u.f3[5:0]), .ex_amt(ex[5:0]), .be_amt(be),
    .bss_op(ldop(`MOP(BSS_LD), 2'd0, `MOP(BSS_INC), `MOP(BSS_DEC), `MOP(BSS_CLR))),
    .bss_val(2'(`DAT(BSS_LD))),
    .sg_cmd(`SGCMD(BS, ex[3:0])), .sg_we(`MOP(BSSG_WR)), .sb6(sb_c[5:0]),
    .din(bus_c), .dout(shifted), .bss, .amount(bs_amt));

  // postshift masks
  logic [1:0] pgs;
  word_t      pm_mask_unused;
  mat_postshift_masks u_pm (
    .clk, .rst_n,
    .pap_op(ldop(`MOP(PAP_LD), `SEL(PAP_LD), `MOP(PAP_INC), `MOP(PAP_DEC), `MOP(PAP_CLR) || `MOP(PABC))),
    .pap_val(4'(pick(`SEL(PAP_LD), 16'(`DAT(PAP_LD)), ex, sb_c[15:0]))),
    .pbp_op(ldop(`MOP(PBP_LD), `SEL(PBP_LD), `MOP(PBP_INC), `MOP(PBP_DEC), `MOP(PBP_CLR) || `MOP(PABC))),
    .pbp_val(4'(pick(`SEL(PBP_LD), 16'(`DAT(PBP_LD)), ex, sb_c[15:0]))),
    .pmsg_cmd(`SGCMD(PM, ex[3:0])), .pmsg_we(`MOP(PMSG_WR)),
    .pa_we(`MOP(PA_LD)), .pb_we(`MOP(PB_LD)),
    .pgs_op(`MOP(PGS_LD) ? R_LD : `MOP(PGS_INC) ? R_INC : `MOP(PGS_DEC) ? R_DEC :
            `MOP(PGS_CLR) ? R_CLR : R_NOP),
    .pgs_val(2'(`DAT(PGS_LD))),
    .pgsg_cmd(`SGCMD(PG, ex[3:0])), .pgsg_we(`MOP(PGSG_WR)),
    .cm_code(u.f2), .ex_code(ex[6:0]), .be_code({bepg, be}),
    .bus(bus_c), .sb_in(sb_c[6:0]), .shifted, .sb(sb_m), .mask(pm_mask_unused), .pgs);

  // ------------------------------------------------------------ AL and LR
  logic [5:0] alf;
  logic       c_al1, c_alov, c_oneov, c_twoov;
  logic [1:0] ds_pair, lr_ip, lr_op;
  word_t      lr_a;
  mat_al_unit u_al (
    .clk, .rst_n,
    .alf_ld(`MOP(ALF_LD) && `SEL(ALF_LD) != 2'd3 || `MOP(SETALF_ADD) || `MOP(SETALF_SUB) ||
            `MOP(SETALF_A) || `MOP(SETALF_INC) || `MOP(SETALF_B) ||
            `MOP(SETALF_ALL0S) || `MOP(SETALF_ALL1S)),
    .alf_ldsg(`MOP(ALF_LD) && `SEL(ALF_LD) == 2'd3),
    .alf_val(`MOP(SETALF_ADD) ? ALF_ADD : `MOP(SETALF_SUB) ? ALF_SUB :
             `MOP(SETALF_A) ? ALF_A : `MOP(SETALF_INC) ? ALF_INC :
             `MOP(SETALF_B) ? ALF_B : `MOP(SETALF_ALL0S) ? ALF_ALL0S :
             `MOP(SETALF_ALL1S) ? ALF_ALL1S :
             6'(pick(`SEL(ALF_LD), 16'(`DAT(ALF_LD)), ex, sb_c[15:0]))),
    .sg_cmd(`SGCMD(AL, ex[3:0])), .sg_we(`MOP(ALSG_WR)), .sb6(sb_c[5:0]),
    .a(lr_a), .b(as_q), .f(al_f), .alf,
    .c_all1(c_al1), .c_ovf(c_alov), .c_oneov, .c_twoov);

  mat_local_regs u_lr (
    .clk, .rst_n,
    .ip_op(`MOP(LRIP_LD) ? R_LD : (`MOP(LRIP_INC) || `MOP(LRP_INC)) ? R_INC :
           (`MOP(LRIP_DEC) || `MOP(LRP_DEC)) ? R_DEC : (`MOP(LRIP_CLR) || `MOP(LRP_CLR)) ? R_CLR :
           `MOP(LRP_LD) ? R_LD : R_NOP),
    .op_op(`MOP(LROP_LD) ? R_LD : (`MOP(LROP_INC) || `MOP(LRP_INC)) ? R_INC :
           (`MOP(LROP_DEC) || `MOP(LRP_DEC)) ? R_DEC : (`MOP(LROP_CLR) || `MOP(LRP_CLR)) ? R_CLR :
           `MOP(LRP_LD) ? R_LD : R_NOP),
    .ds2(ds_pair), .we(exec && u.sbd == SBD_LR), .sb(sb_c),
    .a(lr_a), .ip(lr_ip), .opp(lr_op));

  // ------------------------------------------------------- AS, VS, DS
  logic       as_v, vs_v;
  logic [5:0] as_vsel, vs_vsel, ds_vsel, avdsg_q;
  logic [2:0] as_s0, as_s63, vs_s0, vs_s63;
  logic [3:0] avd_ptr, avd_s1, avd_s2;
  logic       avd_ovf;

  mat_std_group #(.W(6)) u_avdsg (
    .clk, .rst_n, .cmd(`SGCMD(AVD, ex[3:0])), .we(`MOP(AVDSG_WR)), .wd(sb_c[5:0]),
    .rd(avdsg_q), .ptr(avd_ptr), .s1(avd_s1), .s2(avd_s2), .ptr_ovf(avd_ovf));

  // selection-register values: 0 CM, 1 EX, 2 SB, 3 AVDSG
  function automatic logic [5:0] sv(input logic [1:0] sel, input logic [5:0] cm,
                                    input logic [5:0] exv, input logic [5:0] sbv,
                                    input logic [5:0] sg);
    case (sel)
      2'd0: return cm;
      2'd1: return exv;
      2'd2: return sbv;
      default: return sg;
    endcase
  endfunction

  shctl_e as_ctl, vs_ctl, ds_ctl;
  assign as_ctl = exec ? u.as_ctl : SH_IDLE;
  assign vs_ctl = exec ? u.vs_ctl : SH_IDLE;
  assign ds_ctl = exec ? u.ds_ctl : SH_IDLE;

  logic [2:0] as_sval, vs_sval, ds_sval;
  assign as_sval = `MOP(AVD0S_LD) ? 3'(sv(`SEL(AVD0S_LD), 6'(`DAT(AVD0S_LD)), ex[5:0], sb_c[5:0], avdsg_q)) :
                   `MOP(AVD63S_LD) ? 3'(sv(`SEL(AVD63S_LD), 6'(`DAT(AVD63S_LD)), ex[5:0], sb_c[5:0], avdsg_q)) :
                   `MOP(AS0S_LD) ? 3'(sv(`SEL(AS0S_LD), 6'(`DAT(AS0S_LD)), ex[5:0], sb_c[5:0], avdsg_q)) :
                   3'(sv(`SEL(AS63S_LD), 6'(`DAT(AS63S_LD)), ex[5:0], sb_c[5:0], avdsg_q));
  assign vs_sval = `MOP(AVD0S_LD) ? 3'(sv(`SEL(AVD0S_LD), 6'(`DAT(AVD0S_LD)), ex[5:0], sb_c[5:0], avdsg_q)) :
                   `MOP(AVD63S_LD) ? 3'(sv(`SEL(AVD63S_LD), 6'(`DAT(AVD63S_LD)), ex[5:0], sb_c[5:0], avdsg_q)) :
                   `MOP(VS0S_LD) ? 3'(sv(`SEL(VS0S_LD), 6'(`DAT(VS0S_LD)), ex[5:0], sb_c[5:0], avdsg_q)) :
                   3'(sv(`SEL(VS63S_LD), 6'(`DAT(VS63S_LD)), ex[5:0], sb_c[5:0], avdsg_q));
  assign ds_sval = `MOP(AVD0S_LD) ? 3'(sv(`SEL(AVD0S_LD), 6'(`DAT(AVD0S_LD)), ex[5:0], sb_c[5:0], avdsg_q)) :
                   `MOP(AVD63S_LD) ? 3'(sv(`SEL(AVD63S_LD), 6'(`DAT(AVD63S_LD)), ex[5:0], sb_c[5:0], avdsg_q)) :
                   `MOP(DS0S_LD) ? 3'(sv(`SEL(DS0S_LD), 6'(`DAT(DS0S_LD)), ex[5:0], sb_c[5:0], avdsg_q)) :
                   3'(sv(`SEL(DS63S_LD), 6'(`DAT(DS63S_LD)), ex[5:0], sb_c[5:0], avdsg_q));

  function automatic rop_e vop(input logic ld, input logic inc, input logic dec,
                               input logic clr);
    return ld ? R_LD : inc ? R_INC : dec ? R_DEC : clr ? R_CLR : R_NOP;
  endfunction

  logic [5:0] as_vval, vs_vval, ds_vval;
  assign as_vval = `MOP(AVDVS_LD) ? sv(`SEL(AVDVS_LD), 6'(`DAT(AVDVS_LD)), ex[5:0], sb_c[5:0], avdsg_q)
                                  : sv(`SEL(ASVS_LD), 6'(`DAT(ASVS_LD)), ex[5:0], sb_c[5:0], avdsg_q);
  assign vs_vval = `MOP(AVDVS_LD) ? sv(`SEL(AVDVS_LD), 6'(`DAT(AVDVS_LD)), ex[5:0], sb_c[5:0], avdsg_q)
                                  : sv(`SEL(VSVS_LD), 6'(`DAT(VSVS_LD)), ex[5:0], sb_c[5:0], avdsg_q);
  assign ds_vval = `MOP(AVDVS_LD) ? sv(`SEL(AVDVS_LD), 6'(`DAT(AVDVS_LD)), ex[5:0], sb_c[5:0], avdsg_q)
                                  : sv(`SEL(DSVS_LD), 6'(`DAT(DSVS_LD)), ex[5:0], sb_c[5:0], avdsg_q);

  logic [7:0] as_r, as_l, vs_r, vs_l;
  logic [1:0] ds_r [8];
  logic [1:0] ds_l [8];
  // entries 0, 1, 2 and 6 are produced inside the shifters
  assign as_r = {vs_v, 1'b0, ds_pair[1], cr, as_q[63], 3'b000};
  assign as_l = {vs_v, 1'b0, ds_pair[1], sb_c[63], bus_c[63], 3'b000};
  assign vs_r = {as_v, 1'b0, ds_pair[0], cr, vs_q[63], 3'b000};
  assign vs_l = {as_v, 1'b0, ds_pair[0], sb_c[62], bus_c[62], 3'b000};
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      ds_r[i] = 2'b00;
      ds_l[i] = 2'b00;
    end
    ds_r[3] = {as_v, vs_v};     ds_l[3] = {as_v, vs_v};
    ds_r[4] = {cr, cr};         ds_l[4] = {cr, cr};
    ds_r[5] = sb_c[63:62];      ds_l[5] = sb_c[63:62];
    ds_r[7] = {vs_v, as_v};     ds_l[7] = {vs_v, as_v};
  end

  mat_bit_shifter u_as (
    .clk, .rst_n, .ctl(as_ctl), .sb(sb_c), .r_ext(as_r), .l_ext(as_l),
    .s0_ld(`MOP(AS0S_LD) || `MOP(AVD0S_LD)), .s63_ld(`MOP(AS63S_LD) || `MOP(AVD63S_LD)),
    .src_val(as_sval), .set_ll(`MOP(ASLL) || `MOP(AVDLL)), .set_lr(`MOP(ASLR) || `MOP(AVDLR)),
    .v_op(vop(`MOP(ASVS_LD) || `MOP(AVDVS_LD), `MOP(ASVS_INC), `MOP(ASVS_DEC),
              `MOP(ASVS_CLR) || `MOP(AVDVS_CLR))),
    .v_val(as_vval), .q(as_q), .vbit(as_v), .vsel(as_vsel), .s0(as_s0), .s63(as_s63));

  mat_bit_shifter u_vs (
    .clk, .rst_n, .ctl(vs_ctl), .sb(sb_c), .r_ext(vs_r), .l_ext(vs_l),
    .s0_ld(`MOP(VS0S_LD) || `MOP(AVD0S_LD)), .s63_ld(`MOP(VS63S_LD) || `MOP(AVD63S_LD)),
    .src_val(vs_sval), .set_ll(`MOP(VSLL) || `MOP(AVDLL)), .set_lr(`MOP(VSLR) || `MOP(AVDLR)),
    .v_op(vop(`MOP(VSVS_LD) || `MOP(AVDVS_LD), `MOP(VSVS_INC), `MOP(VSVS_DEC),
              `MOP(VSVS_CLR) || `MOP(AVDVS_CLR))),
    .v_val(vs_vval), .q(vs_q), .vbit(vs_v), .vsel(vs_vsel), .s0(vs_s0), .s63(vs_s63));

  mat_double_shifter u_ds (
    .clk, .rst_n, .ctl(ds_ctl), .sb(sb_c), .r_ext(ds_r), .l_ext(ds_l),
    .slo_ld(`MOP(DS0S_LD) || `MOP(AVD0S_LD)), .shi_ld(`MOP(DS63S_LD) || `MOP(AVD63S_LD)),
    .src_val(ds_sval), .set_ll(`MOP(DSLL) || `MOP(AVDLL)), .set_lr(`MOP(DSLR) || `MOP(AVDLR)),
    .v_op(vop(`MOP(DSVS_LD) || `MOP(AVDVS_LD), `MOP(DSVS_INC), `MOP(DSVS_DEC),
              `MOP(DSVS_CLR) || `MOP(AVDVS_CLR))),
    .v_val(ds_vval), .q(ds_q), .vpair(ds_pair), .vsel(ds_vsel));

  // ------------------------------------------------------ working registers
  logic [7:0] wap, wbp;
  logic       wa_cpl, wa_povf, wa_uovf, wa_govf, wa_usovf, wa_gsovf;
  logic       wb_cpl, wb_povf, wb_uovf, wb_govf, wb_usovf, wb_gsovf;
  logic [7:0] wap_v, wbp_v;
  assign wap_v = 8'(pick(`SEL(WAP_LD), 16'(`DAT(WAP_LD)), ex, sb_c[15:0]));
  assign wbp_v = 8'(pick(`SEL(WBP_LD), 16'(`DAT(WBP_LD)), ex, sb_c[15:0]));

  mat_working_regs #(.NREG(NREG)) u_wa (
    .clk, .rst_n,
    .u_op(`MOP(WAP_LD) ? ldop(1'b1, `SEL(WAP_LD), 1'b0, 1'b0, 1'b0) :
          ldop(`MOP(WAU_LD), `SEL(WAU_LD), `MOP(WAU_INC), `MOP(WAU_DEC), `MOP(WAU_CLR) || `MOP(WAPC))),
    .u_val(`MOP(WAP_LD) ? wap_v[3:0] : 4'(pick(`SEL(WAU_LD), 16'(`DAT(WAU_LD)), ex, sb_c[15:0]))),
    .g_op(`MOP(WAP_LD) ? ldop(1'b1, `SEL(WAP_LD), 1'b0, 1'b0, 1'b0) :
          ldop(`MOP(WAG_LD), `SEL(WAG_LD), `MOP(WAG_INC), `MOP(WAG_DEC), `MOP(WAG_CLR) || `MOP(WAPC))),
    .g_val(`MOP(WAP_LD) ? wap_v[7:4] : 4'(pick(`SEL(WAG_LD), 16'(`DAT(WAG_LD)), ex, sb_c[15:0]))),
    .couple(`MOP(WAPCOUPLE)), .uncouple(`MOP(WAPUNCOUPLE)),
    .us_cmd(sgm(`SGCMD(WAPS, ex[3:0]), `SGCMD(WAUS, ex[3:0]))),
    .us_we(`MOP(WAUS_WR) || `MOP(WAPS_WR)),
    .gs_cmd(sgm(`SGCMD(WAPS, ex[3:0]), `SGCMD(WAGS, ex[3:0]))),
    .gs_we(`MOP(WAGS_WR) || `MOP(WAPS_WR)),
    .lm_cmd(sgc(`MOP(LAP_LD), `SEL(LAP_LD), 4'(`DAT(LAP_LD)), `MOP(LAP_INC), `MOP(LAP_DEC),
                `MOP(LAP_CLR) || `MOP(LPC), `MOP(LAPS1_LD), `SEL(LAPS1_LD), 4'(`DAT(LAPS1_LD)),
                `MOP(LAPS2_WR), ex[3:0])),
    .lm_we(`MOP(LA_LD)),
    .we(exec && u.sbd == SBD_WA), .sb(sb_c), .rdata(wa_q), .ptr(wap), .coupled(wa_cpl),
    .p_ovf(wa_povf), .u_ovf(wa_uovf), .g_ovf(wa_govf), .us_ovf(wa_usovf), .gs_ovf(wa_gsovf));

  mat_working_regs #(.NREG(NREG)) u_wb (
    .clk, .rst_n,
    .u_op(`MOP(WBP_LD) ? ldop(1'b1, `SEL(WBP_LD), 1'b0, 1'b0, 1'b0) :
          ldop(`MOP(WBU_LD), `SEL(WBU_LD), `MOP(WBU_INC), `MOP(WBU_DEC), `MOP(WBU_CLR) || `MOP(WBPC))),
    .u_val(`MOP(WBP_LD) ? wbp_v[3:0] : 4'(pick(`SEL(WBU_LD), 16'(`DAT(WBU_LD)), ex, sb_c[15:0]))),
    .g_op(`MOP(WBP_LD) ? ldop(1'b1, `SEL(WBP_LD), 1'b0, 1'b0, 1'b0) :
          ldop(`MOP(WBG_LD), `SEL(WBG_LD), `MOP(WBG_INC), `MOP(WBG_DEC), `MOP(WBG_CLR) || `MOP(WBPC))),
    .g_val(`MOP(WBP_LD) ? wbp_v[7:4] : 4'(pick(`SEL(WBG_LD), 16'(`DAT(WBG_LD)), ex, sb_c[15:0]))),
    .couple(`MOP(WBPCOUPLE)), .uncouple(`MOP(WBPUNCOUPLE)),
    .us_cmd(sgm(`SGCMD(WBPS, ex[3:0]), `SGCMD(WBUS, ex[3:0]))),
    .us_we(`MOP(WBUS_WR) || `MOP(WBPS_WR)),
    .gs_cmd(sgm(`SGCMD(WBPS, ex[3:0]), `SGCMD(WBGS, ex[3:0]))),
    .gs_we(`MOP(WBGS_WR) || `MOP(WBPS_WR)),
    .lm_cmd(sgc(`MOP(LBP_LD), `SEL(LBP_LD), 4'(`DAT(LBP_LD)), `MOP(LBP_INC), `MOP(LBP_DEC),
                `MOP(LBP_CLR) || `MOP(LPC), `MOP(LBPS1_LD), `SEL(LBPS1_LD), 4'(`DAT(LBPS1_LD)),
                `MOP(LBPS2_WR), ex[3:0])),
    .lm_we(`MOP(LB_LD)),
    .we(exec && u.sbd == SBD_WB), .sb(sb_c), .rdata(wb_q), .ptr(wbp), .coupled(wb_cpl),
    .p_ovf(wb_povf), .u_ovf(wb_uovf), .g_ovf(wb_govf), .us_ovf(wb_usovf), .gs_ovf(wb_gsovf));

  // -------------------------------------------------------- bit encoder
  logic [5:0] lsb1, lsb2, msb1, msb2;
  logic c_lsb1, c_msb1, c_l1, c_l2, c_ld, c_sgnld, c_lsbd, c_sgnlsbd, c_msbd, c_sgnmsbd;
  logic c_be0, bp;
  mat_bit_encoder u_be (
    .clk, .rst_n, .bus(bus_c),
    .l_load(`MOP(BELLOAD) || `MOP(BELMLOAD)), .m_load(`MOP(BEMLOAD) || `MOP(BELMLOAD)),
    .l_swap(`MOP(BELI) || `MOP(BELMI)), .m_swap(`MOP(BEMI) || `MOP(BELMI)),
    .bef_op(`MOP(BEF_LD) ? ((`SEL(BEF_LD) == 2'd3) ? R_LSG : R_LD) :
            `MOP(SETBEFLSB1) ? R_CLR : R_NOP),
    .bef_val(4'(pick(`SEL(BEF_LD), 16'(`DAT(BEF_LD)), ex, sb_c[15:0]))),
    .sg_cmd(`SGCMD(BE, ex[3:0])), .sg_we(`MOP(BESG_WR)), .sb4(sb_c[3:0]),
    .pg_l(`MOP(BEPGL)), .pg_m(`MOP(BEPGM)),
    .be, .bepg, .lsb1, .lsb2, .msb1, .msb2,
    .c_lsb1, .c_msb1, .c_l1, .c_l2, .c_ld, .c_sgnld, .c_lsbd, .c_sgnlsbd,
    .c_msbd, .c_sgnmsbd, .c_be0);

  mat_bus_parity u_bp (.bus(bus_q), .bp);

  // ------------------------------------------------------ counters, WSA
  logic [15:0] ca_q, cb_q, cb_v;
  logic        ca_z, cb_z, ca_sovf, cb_sovf, wsa_sovf, wsab, wsaor;
  logic [3:0]  ca_sp, cb_sp;
  logic [15:0] cm16;
  assign cm16 = 16'({u.f4, u.f2});

  mat_counter #(.W(16)) u_ca (
    .clk, .rst_n,
    .op(ldop(`MOP(CA_LD), `SEL(CA_LD), `MOP(CA_INC), `MOP(CA_DEC), `MOP(CA_CLR))),
    .val(pick(`SEL(CA_LD), cm16, ex, sb_c[15:0])),
    .sg_cmd(`SGCMD(CA, sb_c[3:0])), .sg_we(`MOP(CASG_WR)),
    .cnt(ca_q), .zero(ca_z), .sg_ptr(ca_sp), .sg_ovf(ca_sovf));

  // Counter B sources: 0 CM, 1 BE, 2 SB, 3 CBSG
  assign cb_v = pick(`SEL(CB_LD), cm16, 16'(be), sb_c[15:0]);
  mat_counter #(.W(16)) u_cb (
    .clk, .rst_n,
    .op(ldop(`MOP(CB_LD), `SEL(CB_LD), `MOP(CB_INC), `MOP(CB_DEC), `MOP(CB_CLR))),
    .val(cb_v),
    .sg_cmd(`SGCMD(CB, sb_c[3:0])), .sg_we(`MOP(CBSG_WR)),
    .cnt(cb_q), .zero(cb_z), .sg_ptr(cb_sp), .sg_ovf(cb_sovf));

  mat_wsa #(.WS_WORDS(WS_WORDS)) u_wsa (
    .clk, .rst_n,
    .op(ldop(`MOP(WSA_LD), `SEL(WSA_LD), `MOP(WSA_INC), `MOP(WSA_DEC), `MOP(WSA_CLR))),
    .val(pick(`SEL(WSA_LD), cm16, ex, sb_c[15:0])),
    .sg_cmd(`SGCMD(WSA, ex[3:0])), .sg_we(`MOP(WSASG_WR)),
    .req(`MOP(IAA) || `MOP(OAA) || `MOP(OAA0) || `MOP(OAA1)), .ws_taken,
    .wsa, .wsab, .wsaor, .sg_ovf(wsa_sovf));

  // --------------------------------------------------------- status port
  logic [3:0] ia_dev, ib_dev;
  logic [3:0] oa_dev, ob_dev, oc_dev, od_dev;
  logic [15:0] sp_in [64];
  logic [5:0]  spp;
  always_comb begin
    for (int i = 0; i < 64; i++) sp_in[i] = '0;
    sp_in[0]  = 16'({u.f3, u.f2});
    sp_in[1]  = 16'({bepg, be});
    sp_in[2]  = 16'(ex[11:0]);
    sp_in[3]  = 16'(wap);
    sp_in[4]  = 16'(wbp);
    sp_in[5]  = 16'(ira);
    sp_in[6]  = ca_q;
    sp_in[7]  = cb_q;
    sp_in[8]  = 16'(sa);
    sp_in[9]  = wsa;
    sp_in[10] = 16'({lsb2, lsb1});
    sp_in[11] = 16'({msb2, msb1});
    sp_in[12] = 16'(cur_addr);
    sp_in[13] = 16'({pgs, bss, alf});
    sp_in[14] = 16'({map, mbp, lr_ip, lr_op});
    sp_in[15] = ex;
    sp_in[16] = 16'({as_s63, as_s0, vs_s63, vs_s0});
    sp_in[17] = 16'({as_vsel, vs_vsel});
    sp_in[18] = 16'({ds_vsel, bs_amt});
    sp_in[19] = 16'({avd_ovf, avd_ptr, avd_s1, avd_s2});
    sp_in[20] = 16'({ca_sp, cb_sp, spp});
    sp_in[21] = {ia_dev, ib_dev, oa_dev, ob_dev};
    sp_in[22] = 16'({oc_dev, od_dev});
  end
  mat_status_port u_sp (
    .clk, .rst_n,
    .op(`MOP(SPP_LD) ? R_LD : `MOP(SPP_INC) ? R_INC : `MOP(SPP_DEC) ? R_DEC :
        `MOP(SPP_CLR) ? R_CLR : R_NOP),
    .val(6'(`DAT(SPP_LD))), .din(sp_in), .sp(sp_q), .spp);

  // ------------------------------------------------------------- I/O
  logic       ia_da, ia_dm, ib_da, ib_dm;
  mat_input_port #(.NDEV(NDEV)) u_ia (
    .clk, .rst_n,
    .dev_op(ldop(`MOP(IAD_LD), 2'd0, `MOP(IAD_INC), `MOP(IAD_DEC), `MOP(IADC))),
    .dev_val(4'(`DAT(IAD_LD))), .act(`MOP(IAA)),
    .data(ia_q), .da(ia_da), .dm(ia_dm), .dev(ia_dev),
    .dev_req(ia_req), .dev_ld(ia_ld), .dev_data(ia_data), .dev_mark(ia_mark));
  mat_input_port #(.NDEV(NDEV)) u_ib (
    .clk, .rst_n,
    .dev_op(ldop(`MOP(IBD_LD), 2'd0, `MOP(IBD_INC), `MOP(IBD_DEC), `MOP(IBDC))),
    .dev_val(4'(`DAT(IBD_LD))), .act(`MOP(IBA)),
    .data(ib_q), .da(ib_da), .dm(ib_dm), .dev(ib_dev),
    .dev_req(ib_req), .dev_ld(ib_ld), .dev_data(ib_data), .dev_mark(ib_mark));

  logic       oa_sa, ob_sa, oc_sa, od_sa;
  word_t      oa_q_unused, ob_q_unused;
  mat_output_port #(.NDEV(NDEV)) u_oa (
    .clk, .rst_n,
    .dev_op(ldop(`MOP(OAD_LD), 2'd0, `MOP(OAD_INC), `MOP(OAD_DEC), `MOP(OAD_CLR))),
    .dev_val(4'(`DAT(OAD_LD))), .ld(exec && u.sbd == SBD_OA), .ld_data(sb_c),
    .act(`MOP(OAA) || `MOP(OAA0) || `MOP(OAA1)), .act_mark(`MOP(OAA1)), .rst_op(`MOP(OAR)),
    .port_q(oa_q_unused), .sa(oa_sa), .dev(oa_dev),
    .dev_data(oa_data), .dev_mark(oa_mark), .dev_busy(oa_busy), .dev_done(oa_done));
  mat_output_port #(.NDEV(NDEV)) u_ob (
    .clk, .rst_n,
    .dev_op(ldop(`MOP(OBD_LD), 2'd0, `MOP(OBD_INC), `MOP(OBD_DEC), `MOP(OBD_CLR))),
    .dev_val(4'(`DAT(OBD_LD))), .ld(exec && u.sbd == SBD_OB), .ld_data(sb_c),
    .act(`MOP(OBA) || `MOP(OBA0) || `MOP(OBA1)), .act_mark(`MOP(OBA1)), .rst_op(`MOP(OBR)),
    .port_q(ob_q_unused), .sa(ob_sa), .dev(ob_dev),
    .dev_data(ob_data), .dev_mark(ob_mark), .dev_busy(ob_busy), .dev_done(ob_done));
  mat_output_port #(.NDEV(NDEV)) u_oc (
    .clk, .rst_n,
    .dev_op(ldop(`MOP(OCD_LD), 2'd0, `MOP(OCD_INC), `MOP(OCD_DEC), `MOP(OCD_CLR))),
    .dev_val(4'(`DAT(OCD_LD))), .ld(`MOP(OC_LD)), .ld_data(bus_c),
    .act(`MOP(OCA) || `MOP(OCA0) || `MOP(OCA1)), .act_mark(`MOP(OCA1)), .rst_op(`MOP(OCR)),
    .port_q(oc_q), .sa(oc_sa), .dev(oc_dev),
    .dev_data(oc_data), .dev_mark(oc_mark), .dev_busy(oc_busy), .dev_done(oc_done));
  mat_output_port #(.NDEV(NDEV)) u_od (
    .clk, .rst_n,
    .dev_op(ldop(`MOP(ODD_LD), 2'd0, `MOP(ODD_INC), `MOP(ODD_DEC), `MOP(ODD_CLR))),
    .dev_val(4'(`DAT(ODD_LD))), .ld(`MOP(OD_LD)), .ld_data(bus_c),
    .act(`MOP(ODA) || `MOP(ODA0) || `MOP(ODA1)), .act_mark(`MOP(ODA1)), .rst_op(`MOP(ODR)),
    .port_q(od_q_unused), .sa(od_sa), .dev(od_dev),
    .dev_data(od_data), .dev_mark(od_mark), .dev_busy(od_busy), .dev_done(od_done));

  // Fields and decoded bits that no unit uses here (F1 and the M/D bits are
  // consumed by the decoder; code 0 and the NOOP codes act on nothing; CR,
  // KC and KD loads use the undelayed decode).
  logic unused_ok;
  assign unused_ok = ^{u.f1, u.md2, u.md3, u.md4, act};

  // ------------------------------------------------------------ conditions
  always_comb begin
    cond = '0;
    cond[C_TRUE]    = 1'b1;
    cond[C_AL0]     = al_f[0];
    cond[C_AL63]    = al_f[63];
    cond[C_AL]      = c_al1;
    cond[C_ALOV]    = c_alov;
    cond[C_ONEOV]   = c_oneov;
    cond[C_TWOOV]   = c_twoov;
    cond[C_AS0]     = as_q[0];
    cond[C_AS63]    = as_q[63];
    cond[C_ASV]     = as_v;
    cond[C_BEPGD]   = bepg;
    cond[C_BE0]     = c_be0;
    cond[C_BP]      = bp;
    cond[C_BUS]     = (bus_q == '0);
    cond[C_CA0]     = ca_q[0];
    cond[C_CA3]     = ca_q[3];
    cond[C_CA4]     = ca_q[4];
    cond[C_CA5]     = ca_q[5];
    cond[C_CA6]     = ca_q[6];
    cond[C_CA]      = ca_z;
    cond[C_CASPOV]  = ca_sovf;
    cond[C_CB0]     = cb_q[0];
    cond[C_CB3]     = cb_q[3];
    cond[C_CB4]     = cb_q[4];
    cond[C_CB5]     = cb_q[5];
    cond[C_CB6]     = cb_q[6];
    cond[C_CB]      = cb_z;
    cond[C_CBSPOV]  = cb_sovf;
    cond[C_CR]      = cr;
    for (int i = 0; i < 16; i++) cond[int'(C_DS0) + i] = ds_q[i];
    cond[C_DSV]     = ds_pair[0];
    cond[C_DSV1]    = ds_pair[1];
    cond[C_EXDA]    = exda;
    cond[C_RAPOV]   = c_rapov;
    cond[C_RAPUN]   = c_rapun;
    cond[C_RBPOV]   = c_rbpov;
    cond[C_RBPUN]   = c_rbpun;
    cond[C_INT]     = int_en;
    cond[C_CUALOV]  = c_cualov;
    cond[C_CYL]     = long_mode;
    cond[C_IADA]    = ia_da;
    cond[C_IADM]    = ia_dm;
    cond[C_IBDA]    = ib_da;
    cond[C_IBDM]    = ib_dm;
    cond[C_OASA]    = oa_sa;
    cond[C_OBSA]    = ob_sa;
    cond[C_OCSA]    = oc_sa;
    cond[C_ODSA]    = od_sa;
    cond[C_KA]      = ka;
    cond[C_KB]      = kb;
    cond[C_KC]      = kc;
    cond[C_KD]      = kd;
    cond[C_L1]      = c_l1;
    cond[C_L2]      = c_l2;
    cond[C_LD]      = c_ld;
    cond[C_SGNLD]   = c_sgnld;
    cond[C_LSB1]    = c_lsb1;
    cond[C_LSBD]    = c_lsbd;
    cond[C_SGNLSBD] = c_sgnlsbd;
    cond[C_MSB1]    = c_msb1;
    cond[C_MSBD]    = c_msbd;
    cond[C_SGNMSBD] = c_sgnmsbd;
    cond[C_LR0]     = lr_a[0];
    cond[C_LR63]    = lr_a[63];
    cond[C_SB0]     = sb_q[0];
    cond[C_SB1]     = sb_q[1];
    cond[C_SB62]    = sb_q[62];
    cond[C_SB63]    = sb_q[63];
    cond[C_VS0]     = vs_q[0];
    cond[C_VS63]    = vs_q[63];
    cond[C_VSV]     = vs_v;
    cond[C_WA0]     = wa_q[0];
    cond[C_WA63]    = wa_q[63];
    cond[C_WAPOV]   = wa_povf;
    cond[C_WAUOV]   = wa_uovf;
    cond[C_WAGOV]   = wa_govf;
    cond[C_WACS]    = wa_cpl;
    cond[C_WAUSPOV] = wa_usovf;
    cond[C_WAGSPOV] = wa_gsovf;
    cond[C_WAPSPOV] = wa_usovf && wa_gsovf;
    cond[C_WB0]     = wb_q[0];
    cond[C_WB63]    = wb_q[63];
    cond[C_WBPOV]   = wb_povf;
    cond[C_WBUOV]   = wb_uovf;
    cond[C_WBGOV]   = wb_govf;
    cond[C_WBCS]    = wb_cpl;
    cond[C_WBUSPOV] = wb_usovf;
    cond[C_WBGSPOV] = wb_gsovf;
    cond[C_WBPSPOV] = wb_usovf && wb_gsovf;
    cond[C_WSAB]    = wsab;
    cond[C_WSAOR]   = wsaor;
    cond[C_WSASPOV] = wsa_sovf;
    cond[C_CRPOV]   = crp_ovf;
  end
endmodule
