// Microoperation set of the processor and the code tables of the four
// microoperation fields F1..F4 of the microinstruction.
//
// Each field holds a 7-bit code; each field has its own table of up to 127
// microoperations (code 0 is "no operation" in every field). Loads that take a
// two-bit source selection live in F1 (selected by S1, immediate data in F2)
// or F3 (selected by S3, immediate data in F4). The grouping of microoperations
// into fields follows the comprehensive microoperation tables of the design;
// the numeric codes are this implementation's own assignment, in the order
// listed below (code k of a field is the k-th name of its list).
package mat_mop_pkg;

  typedef enum logic [8:0] {
    MOP_NONE,
    MOP_CA_LD,
    MOP_CAP_LD,
    MOP_CAPS1_LD,
    MOP_CB_LD,
    MOP_WSA_LD,
    MOP_WSAP_LD,
    MOP_WSAPS1_LD,
    MOP_BSS_LD,
    MOP_BSP_LD,
    MOP_BSPS1_LD,
    MOP_MAP_LD,
    MOP_MBP_LD,
    MOP_PAP_LD,
    MOP_PBP_LD,
    MOP_ALF_LD,
    MOP_AS0S_LD,
    MOP_AS63S_LD,
    MOP_ASVS_LD,
    MOP_VS0S_LD,
    MOP_VS63S_LD,
    MOP_VSVS_LD,
    MOP_DS0S_LD,
    MOP_DS63S_LD,
    MOP_DSVS_LD,
    MOP_AVD0S_LD,
    MOP_AVD63S_LD,
    MOP_AVDVS_LD,
    MOP_BEF_LD,
    MOP_IAD_LD,
    MOP_IBD_LD,
    MOP_SPP_LD,
    MOP_WAU_LD,
    MOP_WAP_LD,
    MOP_WBP_LD,
    MOP_WAUSP_LD,
    MOP_WAGSP_LD,
    MOP_WAPSP_LD,
    MOP_WAPSPS1_LD,
    MOP_WBUSP_LD,
    MOP_WBPSP_LD,
    MOP_WBPSPS1_LD,
    MOP_WBUSPS1_LD,
    MOP_WAGSPS1_LD,
    MOP_LAP_LD,
    MOP_LAPS1_LD,
    MOP_LBP_LD,
    MOP_LBPS1_LD,
    MOP_CA_INC,
    MOP_CA_DEC,
    MOP_CA_CLR,
    MOP_CAP_INC,
    MOP_CAP_DEC,
    MOP_CAP_CLR,
    MOP_CB_INC,
    MOP_CB_DEC,
    MOP_CB_CLR,
    MOP_CBSG_WR,
    MOP_WSA_INC,
    MOP_WSA_DEC,
    MOP_WSA_CLR,
    MOP_WSAP_INC,
    MOP_WSAP_DEC,
    MOP_WSAP_CLR,
    MOP_WSASG_WR,
    MOP_BSP_INC,
    MOP_BSP_DEC,
    MOP_BSP_CLR,
    MOP_MAP_INC,
    MOP_MAP_DEC,
    MOP_MAP_CLR,
    MOP_MBP_INC,
    MOP_MBP_DEC,
    MOP_MBP_CLR,
    MOP_PAP_INC,
    MOP_PAP_DEC,
    MOP_PAP_CLR,
    MOP_PBP_INC,
    MOP_PBP_DEC,
    MOP_PBP_CLR,
    MOP_ALPS2_WR,
    MOP_AVDPS2_WR,
    MOP_BEPS2_WR,
    MOP_BMPS2_WR,
    MOP_CRPS2_WR,
    MOP_PMPS2_WR,
    MOP_PGPS2_WR,
    MOP_BEMLOAD,
    MOP_BELMLOAD,
    MOP_RB_PUSH,
    MOP_RB_POP,
    MOP_RBPC,
    MOP_SETCUALFB,
    MOP_OAA,
    MOP_OBA,
    MOP_OCA,
    MOP_ODA,
    MOP_OC_LD,
    MOP_LRIP_LD,
    MOP_LRIP_INC,
    MOP_LRIP_DEC,
    MOP_LRIP_CLR,
    MOP_VSVS_CLR,
    MOP_VSVS_INC,
    MOP_VSVS_DEC,
    MOP_WAU_INC,
    MOP_WAU_DEC,
    MOP_WAU_CLR,
    MOP_WAPC,
    MOP_WAUS_WR,
    MOP_WAGS_WR,
    MOP_WAGSP_INC,
    MOP_WAGSP_DEC,
    MOP_WAGSP_CLR,
    MOP_WBG_LD,
    MOP_WBPSPS2_WR,
    MOP_LBPS2_WR,
    MOP_NOOP1,
    MOP_BUS_ALL1S,
    MOP_CBP_LD,
    MOP_CBPS1_LD,
    MOP_ALP_LD,
    MOP_ALPS1_LD,
    MOP_AVDP_LD,
    MOP_AVDPS1_LD,
    MOP_BEP_LD,
    MOP_BEPS1_LD,
    MOP_BMP_LD,
    MOP_BMPS1_LD,
    MOP_CRP_LD,
    MOP_CRPS1_LD,
    MOP_PMP_LD,
    MOP_PMPS1_LD,
    MOP_PGS_LD,
    MOP_PGP_LD,
    MOP_PGPS1_LD,
    MOP_OAD_LD,
    MOP_OBD_LD,
    MOP_OCD_LD,
    MOP_ODD_LD,
    MOP_WAG_LD,
    MOP_WAUSPS1_LD,
    MOP_WBU_LD,
    MOP_WBGSP_LD,
    MOP_WBGSPS1_LD,
    MOP_CUALF_LD,
    MOP_ALP_INC,
    MOP_ALP_DEC,
    MOP_ALP_CLR,
    MOP_ALSG_WR,
    MOP_SETALF_ADD,
    MOP_SETALF_SUB,
    MOP_SETALF_A,
    MOP_SETALF_INC,
    MOP_SETALF_B,
    MOP_SETALF_ALL0S,
    MOP_SETALF_ALL1S,
    MOP_ASVS_CLR,
    MOP_ASVS_INC,
    MOP_ASVS_DEC,
    MOP_AVDP_INC,
    MOP_AVDP_DEC,
    MOP_AVDP_CLR,
    MOP_AVDSG_WR,
    MOP_BEP_INC,
    MOP_BEP_DEC,
    MOP_BEP_CLR,
    MOP_BESG_WR,
    MOP_BMP_INC,
    MOP_BMP_DEC,
    MOP_BMP_CLR,
    MOP_BMSG_WR,
    MOP_CRP_INC,
    MOP_CRP_DEC,
    MOP_CRP_CLR,
    MOP_PMP_INC,
    MOP_PMP_DEC,
    MOP_PMP_CLR,
    MOP_PMSG_WR,
    MOP_PA_LD,
    MOP_PB_LD,
    MOP_PABC,
    MOP_PGS_INC,
    MOP_PGS_DEC,
    MOP_PGS_CLR,
    MOP_PGP_INC,
    MOP_PGP_DEC,
    MOP_PGP_CLR,
    MOP_PGSG_WR,
    MOP_SETCUALFADD,
    MOP_INTON,
    MOP_INTOFF,
    MOP_STOPB,
    MOP_CYL,
    MOP_CYS,
    MOP_OAD_INC,
    MOP_OAD_DEC,
    MOP_OAD_CLR,
    MOP_OBD_INC,
    MOP_OBD_DEC,
    MOP_OBD_CLR,
    MOP_OCD_INC,
    MOP_OCD_DEC,
    MOP_OCD_CLR,
    MOP_ODD_INC,
    MOP_ODD_DEC,
    MOP_ODD_CLR,
    MOP_WAG_INC,
    MOP_WAG_DEC,
    MOP_WAG_CLR,
    MOP_WAPS_WR,
    MOP_WAGSPS2_WR,
    MOP_WAUSPS2_WR,
    MOP_WBU_INC,
    MOP_WBU_DEC,
    MOP_WBU_CLR,
    MOP_WBGSP_INC,
    MOP_WBGSP_DEC,
    MOP_WBGSP_CLR,
    MOP_WBGS_WR,
    MOP_DSVS_CLR,
    MOP_DSVS_INC,
    MOP_DSVS_DEC,
    MOP_LA_LD,
    MOP_SB_ALL0S,
    MOP_NOOP3,
    MOP_WSAPS2_WR,
    MOP_SA_LD,
    MOP_RA_POP,
    MOP_RAPC,
    MOP_EXLOAD,
    MOP_EXSHIFT,
    MOP_CSLOAD,
    MOP_STOPA,
    MOP_NOOP2,
    MOP_RA_PUSH,
    MOP_OAR,
    MOP_OBR,
    MOP_OCR,
    MOP_ODR,
    MOP_OD_LD,
    MOP_IADC,
    MOP_IAD_INC,
    MOP_IAD_DEC,
    MOP_IBDC,
    MOP_IBD_INC,
    MOP_IBD_DEC,
    MOP_IAA,
    MOP_IBA,
    MOP_LB_LD,
    MOP_LPC,
    MOP_LRP_LD,
    MOP_LRP_CLR,
    MOP_LRP_INC,
    MOP_LRP_DEC,
    MOP_AVDLL,
    MOP_AVDLR,
    MOP_AVDVS_CLR,
    MOP_BEMI,
    MOP_BELI,
    MOP_BELMI,
    MOP_SETBEFLSB1,
    MOP_BEPGL,
    MOP_BEPGM,
    MOP_BSSG_WR,
    MOP_BSPS2_WR,
    MOP_CASG_WR,
    MOP_CAPS2_WR,
    MOP_SETKC,
    MOP_KCC,
    MOP_KC_LD,
    MOP_SETKD,
    MOP_KDC,
    MOP_KD_LD,
    MOP_CR_LD,
    MOP_VSLL,
    MOP_VSLR,
    MOP_DSLL,
    MOP_DSLR,
    MOP_ASLL,
    MOP_ASLR,
    MOP_LAP_INC,
    MOP_LAP_DEC,
    MOP_LAP_CLR,
    MOP_LAPS2_WR,
    MOP_LBP_INC,
    MOP_LBP_DEC,
    MOP_LBP_CLR,
    MOP_WBUS_WR,
    MOP_WBPS_WR,
    MOP_WBPC,
    MOP_WBG_INC,
    MOP_WBG_DEC,
    MOP_WBG_CLR,
    MOP_WAPCOUPLE,
    MOP_WAPUNCOUPLE,
    MOP_WBPCOUPLE,
    MOP_WBPUNCOUPLE,
    MOP_WAUSP_INC,
    MOP_WAUSP_DEC,
    MOP_WAUSP_CLR,
    MOP_WAPSP_INC,
    MOP_WAPSP_DEC,
    MOP_WAPSP_CLR,
    MOP_WBUSP_INC,
    MOP_WBUSP_DEC,
    MOP_WBUSP_CLR,
    MOP_WBPSP_INC,
    MOP_WBPSP_DEC,
    MOP_WBPSP_CLR,
    MOP_WBUSPS2_WR,
    MOP_WBGSPS2_WR,
    MOP_SA_INC,
    MOP_SA_DEC,
    MOP_SA_CLR,
    MOP_SPP_INC,
    MOP_SPP_DEC,
    MOP_SPP_CLR,
    MOP_OAA1,
    MOP_OAA0,
    MOP_OBA1,
    MOP_OBA0,
    MOP_OCA1,
    MOP_OCA0,
    MOP_ODA1,
    MOP_ODA0,
    MOP_CBP_INC,
    MOP_CBP_DEC,
    MOP_CBP_CLR,
    MOP_CBPS2_WR,
    MOP_BSS_INC,
    MOP_BSS_DEC,
    MOP_BSS_CLR,
    MOP_WAPSPS2_WR,
    MOP_NOOP4,
    MOP_LROP_LD,
    MOP_LROP_INC,
    MOP_LROP_DEC,
    MOP_LROP_CLR,
    MOP_BELLOAD
  } mop_e;

  // Field F1: code k (1..118) selects the k-th entry.
  function automatic mop_e f1_decode(input logic [6:0] code);
    case (code)
      7'd1: return MOP_CA_LD;
      7'd2: return MOP_CAP_LD;
      7'd3: return MOP_CAPS1_LD;
      7'd4: return MOP_CB_LD;
      7'd5: return MOP_WSA_LD;
      7'd6: return MOP_WSAP_LD;
      7'd7: return MOP_WSAPS1_LD;
      7'd8: return MOP_BSS_LD;
      7'd9: return MOP_BSP_LD;
      7'd10: return MOP_BSPS1_LD;
      7'd11: return MOP_MAP_LD;
      7'd12: return MOP_MBP_LD;
      7'd13: return MOP_PAP_LD;
      7'd14: return MOP_PBP_LD;
      7'd15: return MOP_ALF_LD;
      7'd16: return MOP_AS0S_LD;
      7'd17: return MOP_AS63S_LD;
      7'd18: return MOP_ASVS_LD;
      7'd19: return MOP_VS0S_LD;
      7'd20: return MOP_VS63S_LD;
      7'd21: return MOP_VSVS_LD;
      7'd22: return MOP_DS0S_LD;
      7'd23: return MOP_DS63S_LD;
      7'd24: return MOP_DSVS_LD;
      7'd25: return MOP_AVD0S_LD;
      7'd26: return MOP_AVD63S_LD;
      7'd27: return MOP_AVDVS_LD;
      7'd28: return MOP_BEF_LD;
      7'd29: return MOP_IAD_LD;
      7'd30: return MOP_IBD_LD;
      7'd31: return MOP_SPP_LD;
      7'd32: return MOP_WAU_LD;
      7'd33: return MOP_WAP_LD;
      7'd34: return MOP_WBP_LD;
      7'd35: return MOP_WAUSP_LD;
      7'd36: return MOP_WAGSP_LD;
      7'd37: return MOP_WAPSP_LD;
      7'd38: return MOP_WAPSPS1_LD;
      7'd39: return MOP_WBUSP_LD;
      7'd40: return MOP_WBPSP_LD;
      7'd41: return MOP_WBPSPS1_LD;
      7'd42: return MOP_WBUSPS1_LD;
      7'd43: return MOP_WAGSPS1_LD;
      7'd44: return MOP_LAP_LD;
      7'd45: return MOP_LAPS1_LD;
      7'd46: return MOP_LBP_LD;
      7'd47: return MOP_LBPS1_LD;
      7'd48: return MOP_CA_INC;
      7'd49: return MOP_CA_DEC;
      7'd50: return MOP_CA_CLR;
      7'd51: return MOP_CAP_INC;
      7'd52: return MOP_CAP_DEC;
      7'd53: return MOP_CAP_CLR;
      7'd54: return MOP_CB_INC;
      7'd55: return MOP_CB_DEC;
      7'd56: return MOP_CB_CLR;
      7'd57: return MOP_CBSG_WR;
      7'd58: return MOP_WSA_INC;
      7'd59: return MOP_WSA_DEC;
      7'd60: return MOP_WSA_CLR;
      7'd61: return MOP_WSAP_INC;
      7'd62: return MOP_WSAP_DEC;
      7'd63: return MOP_WSAP_CLR;
      7'd64: return MOP_WSASG_WR;
      7'd65: return MOP_BSP_INC;
      7'd66: return MOP_BSP_DEC;
      7'd67: return MOP_BSP_CLR;
      7'd68: return MOP_MAP_INC;
      7'd69: return MOP_MAP_DEC;
      7'd70: return MOP_MAP_CLR;
      7'd71: return MOP_MBP_INC;
      7'd72: return MOP_MBP_DEC;
      7'd73: return MOP_MBP_CLR;
      7'd74: return MOP_PAP_INC;
      7'd75: return MOP_PAP_DEC;
      7'd76: return MOP_PAP_CLR;
      7'd77: return MOP_PBP_INC;
      7'd78: return MOP_PBP_DEC;
      7'd79: return MOP_PBP_CLR;
      7'd80: return MOP_ALPS2_WR;
      7'd81: return MOP_AVDPS2_WR;
      7'd82: return MOP_BEPS2_WR;
      7'd83: return MOP_BMPS2_WR;
      7'd84: return MOP_CRPS2_WR;
      7'd85: return MOP_PMPS2_WR;
      7'd86: return MOP_PGPS2_WR;
      7'd87: return MOP_BEMLOAD;
      7'd88: return MOP_BELMLOAD;
      7'd89: return MOP_RB_PUSH;
      7'd90: return MOP_RB_POP;
      7'd91: return MOP_RBPC;
      7'd92: return MOP_SETCUALFB;
      7'd93: return MOP_OAA;
      7'd94: return MOP_OBA;
      7'd95: return MOP_OCA;
      7'd96: return MOP_ODA;
      7'd97: return MOP_OC_LD;
      7'd98: return MOP_LRIP_LD;
      7'd99: return MOP_LRIP_INC;
      7'd100: return MOP_LRIP_DEC;
      7'd101: return MOP_LRIP_CLR;
      7'd102: return MOP_VSVS_CLR;
      7'd103: return MOP_VSVS_INC;
      7'd104: return MOP_VSVS_DEC;
      7'd105: return MOP_WAU_INC;
      7'd106: return MOP_WAU_DEC;
      7'd107: return MOP_WAU_CLR;
      7'd108: return MOP_WAPC;
      7'd109: return MOP_WAUS_WR;
      7'd110: return MOP_WAGS_WR;
      7'd111: return MOP_WAGSP_INC;
      7'd112: return MOP_WAGSP_DEC;
      7'd113: return MOP_WAGSP_CLR;
      7'd114: return MOP_WBG_LD;
      7'd115: return MOP_WBPSPS2_WR;
      7'd116: return MOP_LBPS2_WR;
      7'd117: return MOP_NOOP1;
      7'd118: return MOP_BUS_ALL1S;
      default: return MOP_NONE;
    endcase
  endfunction

  function automatic logic [6:0] f1_code(input mop_e m);
    case (m)
      MOP_CA_LD: return 7'd1;
      MOP_CAP_LD: return 7'd2;
      MOP_CAPS1_LD: return 7'd3;
      MOP_CB_LD: return 7'd4;
      MOP_WSA_LD: return 7'd5;
      MOP_WSAP_LD: return 7'd6;
      MOP_WSAPS1_LD: return 7'd7;
      MOP_BSS_LD: return 7'd8;
      MOP_BSP_LD: return 7'd9;
      MOP_BSPS1_LD: return 7'd10;
      MOP_MAP_LD: return 7'd11;
      MOP_MBP_LD: return 7'd12;
      MOP_PAP_LD: return 7'd13;
      MOP_PBP_LD: return 7'd14;
      MOP_ALF_LD: return 7'd15;
      MOP_AS0S_LD: return 7'd16;
      MOP_AS63S_LD: return 7'd17;
      MOP_ASVS_LD: return 7'd18;
      MOP_VS0S_LD: return 7'd19;
      MOP_VS63S_LD: return 7'd20;
      MOP_VSVS_LD: return 7'd21;
      MOP_DS0S_LD: return 7'd22;
      MOP_DS63S_LD: return 7'd23;
      MOP_DSVS_LD: return 7'd24;
      MOP_AVD0S_LD: return 7'd25;
      MOP_AVD63S_LD: return 7'd26;
      MOP_AVDVS_LD: return 7'd27;
      MOP_BEF_LD: return 7'd28;
      MOP_IAD_LD: return 7'd29;
      MOP_IBD_LD: return 7'd30;
      MOP_SPP_LD: return 7'd31;
      MOP_WAU_LD: return 7'd32;
      MOP_WAP_LD: return 7'd33;
      MOP_WBP_LD: return 7'd34;
      MOP_WAUSP_LD: return 7'd35;
      MOP_WAGSP_LD: return 7'd36;
      MOP_WAPSP_LD: return 7'd37;
      MOP_WAPSPS1_LD: return 7'd38;
      MOP_WBUSP_LD: return 7'd39;
      MOP_WBPSP_LD: return 7'd40;
      MOP_WBPSPS1_LD: return 7'd41;
      MOP_WBUSPS1_LD: return 7'd42;
      MOP_WAGSPS1_LD: return 7'd43;
      MOP_LAP_LD: return 7'd44;
      MOP_LAPS1_LD: return 7'd45;
      MOP_LBP_LD: return 7'd46;
      MOP_LBPS1_LD: return 7'd47;
      MOP_CA_INC: return 7'd48;
      MOP_CA_DEC: return 7'd49;
      MOP_CA_CLR: return 7'd50;
      MOP_CAP_INC: return 7'd51;
      MOP_CAP_DEC: return 7'd52;
      MOP_CAP_CLR: return 7'd53;
      MOP_CB_INC: return 7'd54;
      MOP_CB_DEC: return 7'd55;
      MOP_CB_CLR: return 7'd56;
      MOP_CBSG_WR: return 7'd57;
      MOP_WSA_INC: return 7'd58;
      MOP_WSA_DEC: return 7'd59;
      MOP_WSA_CLR: return 7'd60;
      MOP_WSAP_INC: return 7'd61;
      MOP_WSAP_DEC: return 7'd62;
      MOP_WSAP_CLR: return 7'd63;
      MOP_WSASG_WR: return 7'd64;
      MOP_BSP_INC: return 7'd65;
      MOP_BSP_DEC: return 7'd66;
      MOP_BSP_CLR: return 7'd67;
      MOP_MAP_INC: return 7'd68;
      MOP_MAP_DEC: return 7'd69;
      MOP_MAP_CLR: return 7'd70;
      MOP_MBP_INC: return 7'd71;
      MOP_MBP_DEC: return 7'd72;
      MOP_MBP_CLR: return 7'd73;
      MOP_PAP_INC: return 7'd74;
      MOP_PAP_DEC: return 7'd75;
      MOP_PAP_CLR: return 7'd76;
      MOP_PBP_INC: return 7'd77;
      MOP_PBP_DEC: return 7'd78;
      MOP_PBP_CLR: return 7'd79;
      MOP_ALPS2_WR: return 7'd80;
      MOP_AVDPS2_WR: return 7'd81;
      MOP_BEPS2_WR: return 7'd82;
      MOP_BMPS2_WR: return 7'd83;
      MOP_CRPS2_WR: return 7'd84;
      MOP_PMPS2_WR: return 7'd85;
      MOP_PGPS2_WR: return 7'd86;
      MOP_BEMLOAD: return 7'd87;
      MOP_BELMLOAD: return 7'd88;
      MOP_RB_PUSH: return 7'd89;
      MOP_RB_POP: return 7'd90;
      MOP_RBPC: return 7'd91;
      MOP_SETCUALFB: return 7'd92;
      MOP_OAA: return 7'd93;
      MOP_OBA: return 7'd94;
      MOP_OCA: return 7'd95;
      MOP_ODA: return 7'd96;
      MOP_OC_LD: return 7'd97;
      MOP_LRIP_LD: return 7'd98;
      MOP_LRIP_INC: return 7'd99;
      MOP_LRIP_DEC: return 7'd100;
      MOP_LRIP_CLR: return 7'd101;
      MOP_VSVS_CLR: return 7'd102;
      MOP_VSVS_INC: return 7'd103;
      MOP_VSVS_DEC: return 7'd104;
      MOP_WAU_INC: return 7'd105;
      MOP_WAU_DEC: return 7'd106;
      MOP_WAU_CLR: return 7'd107;
      MOP_WAPC: return 7'd108;
      MOP_WAUS_WR: return 7'd109;
      MOP_WAGS_WR: return 7'd110;
      MOP_WAGSP_INC: return 7'd111;
      MOP_WAGSP_DEC: return 7'd112;
      MOP_WAGSP_CLR: return 7'd113;
      MOP_WBG_LD: return 7'd114;
      MOP_WBPSPS2_WR: return 7'd115;
      MOP_LBPS2_WR: return 7'd116;
      MOP_NOOP1: return 7'd117;
      MOP_BUS_ALL1S: return 7'd118;
      default: return 7'd0;
    endcase
  endfunction

  // Field F2: code k (1..56) selects the k-th entry.
  function automatic mop_e f2_decode(input logic [6:0] code);
    case (code)
      7'd1: return MOP_SA_LD;
      7'd2: return MOP_RA_POP;
      7'd3: return MOP_RAPC;
      7'd4: return MOP_EXLOAD;
      7'd5: return MOP_EXSHIFT;
      7'd6: return MOP_CSLOAD;
      7'd7: return MOP_STOPA;
      7'd8: return MOP_NOOP2;
      7'd9: return MOP_RA_PUSH;
      7'd10: return MOP_OAR;
      7'd11: return MOP_OBR;
      7'd12: return MOP_OCR;
      7'd13: return MOP_ODR;
      7'd14: return MOP_OD_LD;
      7'd15: return MOP_IADC;
      7'd16: return MOP_IAD_INC;
      7'd17: return MOP_IAD_DEC;
      7'd18: return MOP_IBDC;
      7'd19: return MOP_IBD_INC;
      7'd20: return MOP_IBD_DEC;
      7'd21: return MOP_IAA;
      7'd22: return MOP_IBA;
      7'd23: return MOP_LB_LD;
      7'd24: return MOP_LPC;
      7'd25: return MOP_LRP_LD;
      7'd26: return MOP_LRP_CLR;
      7'd27: return MOP_LRP_INC;
      7'd28: return MOP_LRP_DEC;
      7'd29: return MOP_AVDLL;
      7'd30: return MOP_AVDLR;
      7'd31: return MOP_AVDVS_CLR;
      7'd32: return MOP_BEMI;
      7'd33: return MOP_BELI;
      7'd34: return MOP_BELMI;
      7'd35: return MOP_SETBEFLSB1;
      7'd36: return MOP_BEPGL;
      7'd37: return MOP_BEPGM;
      7'd38: return MOP_BSSG_WR;
      7'd39: return MOP_BSPS2_WR;
      7'd40: return MOP_CASG_WR;
      7'd41: return MOP_CAPS2_WR;
      7'd42: return MOP_SETKC;
      7'd43: return MOP_KCC;
      7'd44: return MOP_KC_LD;
      7'd45: return MOP_SETKD;
      7'd46: return MOP_KDC;
      7'd47: return MOP_KD_LD;
      7'd48: return MOP_CR_LD;
      7'd49: return MOP_VSLL;
      7'd50: return MOP_VSLR;
      7'd51: return MOP_DSLL;
      7'd52: return MOP_DSLR;
      7'd53: return MOP_ASLL;
      7'd54: return MOP_ASLR;
      7'd55: return MOP_LAP_INC;
      7'd56: return MOP_LAP_DEC;
      default: return MOP_NONE;
    endcase
  endfunction

  function automatic logic [6:0] f2_code(input mop_e m);
    case (m)
      MOP_SA_LD: return 7'd1;
      MOP_RA_POP: return 7'd2;
      MOP_RAPC: return 7'd3;
      MOP_EXLOAD: return 7'd4;
      MOP_EXSHIFT: return 7'd5;
      MOP_CSLOAD: return 7'd6;
      MOP_STOPA: return 7'd7;
      MOP_NOOP2: return 7'd8;
      MOP_RA_PUSH: return 7'd9;
      MOP_OAR: return 7'd10;
      MOP_OBR: return 7'd11;
      MOP_OCR: return 7'd12;
      MOP_ODR: return 7'd13;
      MOP_OD_LD: return 7'd14;
      MOP_IADC: return 7'd15;
      MOP_IAD_INC: return 7'd16;
      MOP_IAD_DEC: return 7'd17;
      MOP_IBDC: return 7'd18;
      MOP_IBD_INC: return 7'd19;
      MOP_IBD_DEC: return 7'd20;
      MOP_IAA: return 7'd21;
      MOP_IBA: return 7'd22;
      MOP_LB_LD: return 7'd23;
      MOP_LPC: return 7'd24;
      MOP_LRP_LD: return 7'd25;
      MOP_LRP_CLR: return 7'd26;
      MOP_LRP_INC: return 7'd27;
      MOP_LRP_DEC: return 7'd28;
      MOP_AVDLL: return 7'd29;
      MOP_AVDLR: return 7'd30;
      MOP_AVDVS_CLR: return 7'd31;
      MOP_BEMI: return 7'd32;
      MOP_BELI: return 7'd33;
      MOP_BELMI: return 7'd34;
      MOP_SETBEFLSB1: return 7'd35;
      MOP_BEPGL: return 7'd36;
      MOP_BEPGM: return 7'd37;
      MOP_BSSG_WR: return 7'd38;
      MOP_BSPS2_WR: return 7'd39;
      MOP_CASG_WR: return 7'd40;
      MOP_CAPS2_WR: return 7'd41;
      MOP_SETKC: return 7'd42;
      MOP_KCC: return 7'd43;
      MOP_KC_LD: return 7'd44;
      MOP_SETKD: return 7'd45;
      MOP_KDC: return 7'd46;
      MOP_KD_LD: return 7'd47;
      MOP_CR_LD: return 7'd48;
      MOP_VSLL: return 7'd49;
      MOP_VSLR: return 7'd50;
      MOP_DSLL: return 7'd51;
      MOP_DSLR: return 7'd52;
      MOP_ASLL: return 7'd53;
      MOP_ASLR: return 7'd54;
      MOP_LAP_INC: return 7'd55;
      MOP_LAP_DEC: return 7'd56;
      default: return 7'd0;
    endcase
  endfunction

  // Field F3: code k (1..108) selects the k-th entry.
  function automatic mop_e f3_decode(input logic [6:0] code);
    case (code)
      7'd1: return MOP_CBP_LD;
      7'd2: return MOP_CBPS1_LD;
      7'd3: return MOP_ALP_LD;
      7'd4: return MOP_ALPS1_LD;
      7'd5: return MOP_AVDP_LD;
      7'd6: return MOP_AVDPS1_LD;
      7'd7: return MOP_BEP_LD;
      7'd8: return MOP_BEPS1_LD;
      7'd9: return MOP_BMP_LD;
      7'd10: return MOP_BMPS1_LD;
      7'd11: return MOP_CRP_LD;
      7'd12: return MOP_CRPS1_LD;
      7'd13: return MOP_PMP_LD;
      7'd14: return MOP_PMPS1_LD;
      7'd15: return MOP_PGS_LD;
      7'd16: return MOP_PGP_LD;
      7'd17: return MOP_PGPS1_LD;
      7'd18: return MOP_OAD_LD;
      7'd19: return MOP_OBD_LD;
      7'd20: return MOP_OCD_LD;
      7'd21: return MOP_ODD_LD;
      7'd22: return MOP_WAG_LD;
      7'd23: return MOP_WAUSPS1_LD;
      7'd24: return MOP_WBU_LD;
      7'd25: return MOP_WBGSP_LD;
      7'd26: return MOP_WBGSPS1_LD;
      7'd27: return MOP_CUALF_LD;
      7'd28: return MOP_ALP_INC;
      7'd29: return MOP_ALP_DEC;
      7'd30: return MOP_ALP_CLR;
      7'd31: return MOP_ALSG_WR;
      7'd32: return MOP_SETALF_ADD;
      7'd33: return MOP_SETALF_SUB;
      7'd34: return MOP_SETALF_A;
      7'd35: return MOP_SETALF_INC;
      7'd36: return MOP_SETALF_B;
      7'd37: return MOP_SETALF_ALL0S;
      7'd38: return MOP_SETALF_ALL1S;
      7'd39: return MOP_ASVS_CLR;
      7'd40: return MOP_ASVS_INC;
      7'd41: return MOP_ASVS_DEC;
      7'd42: return MOP_AVDP_INC;
      7'd43: return MOP_AVDP_DEC;
      7'd44: return MOP_AVDP_CLR;
      7'd45: return MOP_AVDSG_WR;
      7'd46: return MOP_BEP_INC;
      7'd47: return MOP_BEP_DEC;
      7'd48: return MOP_BEP_CLR;
      7'd49: return MOP_BESG_WR;
      7'd50: return MOP_BMP_INC;
      7'd51: return MOP_BMP_DEC;
      7'd52: return MOP_BMP_CLR;
      7'd53: return MOP_BMSG_WR;
      7'd54: return MOP_CRP_INC;
      7'd55: return MOP_CRP_DEC;
      7'd56: return MOP_CRP_CLR;
      7'd57: return MOP_PMP_INC;
      7'd58: return MOP_PMP_DEC;
      7'd59: return MOP_PMP_CLR;
      7'd60: return MOP_PMSG_WR;
      7'd61: return MOP_PA_LD;
      7'd62: return MOP_PB_LD;
      7'd63: return MOP_PABC;
      7'd64: return MOP_PGS_INC;
      7'd65: return MOP_PGS_DEC;
      7'd66: return MOP_PGS_CLR;
      7'd67: return MOP_PGP_INC;
      7'd68: return MOP_PGP_DEC;
      7'd69: return MOP_PGP_CLR;
      7'd70: return MOP_PGSG_WR;
      7'd71: return MOP_SETCUALFADD;
      7'd72: return MOP_INTON;
      7'd73: return MOP_INTOFF;
      7'd74: return MOP_STOPB;
      7'd75: return MOP_CYL;
      7'd76: return MOP_CYS;
      7'd77: return MOP_OAD_INC;
      7'd78: return MOP_OAD_DEC;
      7'd79: return MOP_OAD_CLR;
      7'd80: return MOP_OBD_INC;
      7'd81: return MOP_OBD_DEC;
      7'd82: return MOP_OBD_CLR;
      7'd83: return MOP_OCD_INC;
      7'd84: return MOP_OCD_DEC;
      7'd85: return MOP_OCD_CLR;
      7'd86: return MOP_ODD_INC;
      7'd87: return MOP_ODD_DEC;
      7'd88: return MOP_ODD_CLR;
      7'd89: return MOP_WAG_INC;
      7'd90: return MOP_WAG_DEC;
      7'd91: return MOP_WAG_CLR;
      7'd92: return MOP_WAPS_WR;
      7'd93: return MOP_WAGSPS2_WR;
      7'd94: return MOP_WAUSPS2_WR;
      7'd95: return MOP_WBU_INC;
      7'd96: return MOP_WBU_DEC;
      7'd97: return MOP_WBU_CLR;
      7'd98: return MOP_WBGSP_INC;
      7'd99: return MOP_WBGSP_DEC;
      7'd100: return MOP_WBGSP_CLR;
      7'd101: return MOP_WBGS_WR;
      7'd102: return MOP_DSVS_CLR;
      7'd103: return MOP_DSVS_INC;
      7'd104: return MOP_DSVS_DEC;
      7'd105: return MOP_LA_LD;
      7'd106: return MOP_SB_ALL0S;
      7'd107: return MOP_NOOP3;
      7'd108: return MOP_WSAPS2_WR;
      default: return MOP_NONE;
    endcase
  endfunction

  function automatic logic [6:0] f3_code(input mop_e m);
    case (m)
      MOP_CBP_LD: return 7'd1;
      MOP_CBPS1_LD: return 7'd2;
      MOP_ALP_LD: return 7'd3;
      MOP_ALPS1_LD: return 7'd4;
      MOP_AVDP_LD: return 7'd5;
      MOP_AVDPS1_LD: return 7'd6;
      MOP_BEP_LD: return 7'd7;
      MOP_BEPS1_LD: return 7'd8;
      MOP_BMP_LD: return 7'd9;
      MOP_BMPS1_LD: return 7'd10;
      MOP_CRP_LD: return 7'd11;
      MOP_CRPS1_LD: return 7'd12;
      MOP_PMP_LD: return 7'd13;
      MOP_PMPS1_LD: return 7'd14;
      MOP_PGS_LD: return 7'd15;
      MOP_PGP_LD: return 7'd16;
      MOP_PGPS1_LD: return 7'd17;
      MOP_OAD_LD: return 7'd18;
      MOP_OBD_LD: return 7'd19;
      MOP_OCD_LD: return 7'd20;
      MOP_ODD_LD: return 7'd21;
      MOP_WAG_LD: return 7'd22;
      MOP_WAUSPS1_LD: return 7'd23;
      MOP_WBU_LD: return 7'd24;
      MOP_WBGSP_LD: return 7'd25;
      MOP_WBGSPS1_LD: return 7'd26;
      MOP_CUALF_LD: return 7'd27;
      MOP_ALP_INC: return 7'd28;
      MOP_ALP_DEC: return 7'd29;
      MOP_ALP_CLR: return 7'd30;
      MOP_ALSG_WR: return 7'd31;
      MOP_SETALF_ADD: return 7'd32;
      MOP_SETALF_SUB: return 7'd33;
      MOP_SETALF_A: return 7'd34;
      MOP_SETALF_INC: return 7'd35;
      MOP_SETALF_B: return 7'd36;
      MOP_SETALF_ALL0S: return 7'd37;
      MOP_SETALF_ALL1S: return 7'd38;
      MOP_ASVS_CLR: return 7'd39;
      MOP_ASVS_INC: return 7'd40;
      MOP_ASVS_DEC: return 7'd41;
      MOP_AVDP_INC: return 7'd42;
      MOP_AVDP_DEC: return 7'd43;
      MOP_AVDP_CLR: return 7'd44;
      MOP_AVDSG_WR: return 7'd45;
      MOP_BEP_INC: return 7'd46;
      MOP_BEP_DEC: return 7'd47;
      MOP_BEP_CLR: return 7'd48;
      MOP_BESG_WR: return 7'd49;
      MOP_BMP_INC: return 7'd50;
      MOP_BMP_DEC: return 7'd51;
      MOP_BMP_CLR: return 7'd52;
      MOP_BMSG_WR: return 7'd53;
      MOP_CRP_INC: return 7'd54;
      MOP_CRP_DEC: return 7'd55;
      MOP_CRP_CLR: return 7'd56;
      MOP_PMP_INC: return 7'd57;
      MOP_PMP_DEC: return 7'd58;
      MOP_PMP_CLR: return 7'd59;
      MOP_PMSG_WR: return 7'd60;
      MOP_PA_LD: return 7'd61;
      MOP_PB_LD: return 7'd62;
      MOP_PABC: return 7'd63;
      MOP_PGS_INC: return 7'd64;
      MOP_PGS_DEC: return 7'd65;
      MOP_PGS_CLR: return 7'd66;
      MOP_PGP_INC: return 7'd67;
      MOP_PGP_DEC: return 7'd68;
      MOP_PGP_CLR: return 7'd69;
      MOP_PGSG_WR: return 7'd70;
      MOP_SETCUALFADD: return 7'd71;
      MOP_INTON: return 7'd72;
      MOP_INTOFF: return 7'd73;
      MOP_STOPB: return 7'd74;
      MOP_CYL: return 7'd75;
      MOP_CYS: return 7'd76;
      MOP_OAD_INC: return 7'd77;
      MOP_OAD_DEC: return 7'd78;
      MOP_OAD_CLR: return 7'd79;
      MOP_OBD_INC: return 7'd80;
      MOP_OBD_DEC: return 7'd81;
      MOP_OBD_CLR: return 7'd82;
      MOP_OCD_INC: return 7'd83;
      MOP_OCD_DEC: return 7'd84;
      MOP_OCD_CLR: return 7'd85;
      MOP_ODD_INC: return 7'd86;
      MOP_ODD_DEC: return 7'd87;
      MOP_ODD_CLR: return 7'd88;
      MOP_WAG_INC: return 7'd89;
      MOP_WAG_DEC: return 7'd90;
      MOP_WAG_CLR: return 7'd91;
      MOP_WAPS_WR: return 7'd92;
      MOP_WAGSPS2_WR: return 7'd93;
      MOP_WAUSPS2_WR: return 7'd94;
      MOP_WBU_INC: return 7'd95;
      MOP_WBU_DEC: return 7'd96;
      MOP_WBU_CLR: return 7'd97;
      MOP_WBGSP_INC: return 7'd98;
      MOP_WBGSP_DEC: return 7'd99;
      MOP_WBGSP_CLR: return 7'd100;
      MOP_WBGS_WR: return 7'd101;
      MOP_DSVS_CLR: return 7'd102;
      MOP_DSVS_INC: return 7'd103;
      MOP_DSVS_DEC: return 7'd104;
      MOP_LA_LD: return 7'd105;
      MOP_SB_ALL0S: return 7'd106;
      MOP_NOOP3: return 7'd107;
      MOP_WSAPS2_WR: return 7'd108;
      default: return 7'd0;
    endcase
  endfunction

  // Field F4: code k (1..57) selects the k-th entry.
  function automatic mop_e f4_decode(input logic [6:0] code);
    case (code)
      7'd1: return MOP_LAP_CLR;
      7'd2: return MOP_LAPS2_WR;
      7'd3: return MOP_LBP_INC;
      7'd4: return MOP_LBP_DEC;
      7'd5: return MOP_LBP_CLR;
      7'd6: return MOP_WBUS_WR;
      7'd7: return MOP_WBPS_WR;
      7'd8: return MOP_WBPC;
      7'd9: return MOP_WBG_INC;
      7'd10: return MOP_WBG_DEC;
      7'd11: return MOP_WBG_CLR;
      7'd12: return MOP_WAPCOUPLE;
      7'd13: return MOP_WAPUNCOUPLE;
      7'd14: return MOP_WBPCOUPLE;
      7'd15: return MOP_WBPUNCOUPLE;
      7'd16: return MOP_WAUSP_INC;
      7'd17: return MOP_WAUSP_DEC;
      7'd18: return MOP_WAUSP_CLR;
      7'd19: return MOP_WAPSP_INC;
      7'd20: return MOP_WAPSP_DEC;
      7'd21: return MOP_WAPSP_CLR;
      7'd22: return MOP_WBUSP_INC;
      7'd23: return MOP_WBUSP_DEC;
      7'd24: return MOP_WBUSP_CLR;
      7'd25: return MOP_WBPSP_INC;
      7'd26: return MOP_WBPSP_DEC;
      7'd27: return MOP_WBPSP_CLR;
      7'd28: return MOP_WBUSPS2_WR;
      7'd29: return MOP_WBGSPS2_WR;
      7'd30: return MOP_SA_INC;
      7'd31: return MOP_SA_DEC;
      7'd32: return MOP_SA_CLR;
      7'd33: return MOP_SPP_INC;
      7'd34: return MOP_SPP_DEC;
      7'd35: return MOP_SPP_CLR;
      7'd36: return MOP_OAA1;
      7'd37: return MOP_OAA0;
      7'd38: return MOP_OBA1;
      7'd39: return MOP_OBA0;
      7'd40: return MOP_OCA1;
      7'd41: return MOP_OCA0;
      7'd42: return MOP_ODA1;
      7'd43: return MOP_ODA0;
      7'd44: return MOP_CBP_INC;
      7'd45: return MOP_CBP_DEC;
      7'd46: return MOP_CBP_CLR;
      7'd47: return MOP_CBPS2_WR;
      7'd48: return MOP_BSS_INC;
      7'd49: return MOP_BSS_DEC;
      7'd50: return MOP_BSS_CLR;
      7'd51: return MOP_WAPSPS2_WR;
      7'd52: return MOP_NOOP4;
      7'd53: return MOP_LROP_LD;
      7'd54: return MOP_LROP_INC;
      7'd55: return MOP_LROP_DEC;
      7'd56: return MOP_LROP_CLR;
      7'd57: return MOP_BELLOAD;
      default: return MOP_NONE;
    endcase
  endfunction

  function automatic logic [6:0] f4_code(input mop_e m);
    case (m)
      MOP_LAP_CLR: return 7'd1;
      MOP_LAPS2_WR: return 7'd2;
      MOP_LBP_INC: return 7'd3;
      MOP_LBP_DEC: return 7'd4;
      MOP_LBP_CLR: return 7'd5;
      MOP_WBUS_WR: return 7'd6;
      MOP_WBPS_WR: return 7'd7;
      MOP_WBPC: return 7'd8;
      MOP_WBG_INC: return 7'd9;
      MOP_WBG_DEC: return 7'd10;
      MOP_WBG_CLR: return 7'd11;
      MOP_WAPCOUPLE: return 7'd12;
      MOP_WAPUNCOUPLE: return 7'd13;
      MOP_WBPCOUPLE: return 7'd14;
      MOP_WBPUNCOUPLE: return 7'd15;
      MOP_WAUSP_INC: return 7'd16;
      MOP_WAUSP_DEC: return 7'd17;
      MOP_WAUSP_CLR: return 7'd18;
      MOP_WAPSP_INC: return 7'd19;
      MOP_WAPSP_DEC: return 7'd20;
      MOP_WAPSP_CLR: return 7'd21;
      MOP_WBUSP_INC: return 7'd22;
      MOP_WBUSP_DEC: return 7'd23;
      MOP_WBUSP_CLR: return 7'd24;
      MOP_WBPSP_INC: return 7'd25;
      MOP_WBPSP_DEC: return 7'd26;
      MOP_WBPSP_CLR: return 7'd27;
      MOP_WBUSPS2_WR: return 7'd28;
      MOP_WBGSPS2_WR: return 7'd29;
      MOP_SA_INC: return 7'd30;
      MOP_SA_DEC: return 7'd31;
      MOP_SA_CLR: return 7'd32;
      MOP_SPP_INC: return 7'd33;
      MOP_SPP_DEC: return 7'd34;
      MOP_SPP_CLR: return 7'd35;
      MOP_OAA1: return 7'd36;
      MOP_OAA0: return 7'd37;
      MOP_OBA1: return 7'd38;
      MOP_OBA0: return 7'd39;
      MOP_OCA1: return 7'd40;
      MOP_OCA0: return 7'd41;
      MOP_ODA1: return 7'd42;
      MOP_ODA0: return 7'd43;
      MOP_CBP_INC: return 7'd44;
      MOP_CBP_DEC: return 7'd45;
      MOP_CBP_CLR: return 7'd46;
      MOP_CBPS2_WR: return 7'd47;
      MOP_BSS_INC: return 7'd48;
      MOP_BSS_DEC: return 7'd49;
      MOP_BSS_CLR: return 7'd50;
      MOP_WAPSPS2_WR: return 7'd51;
      MOP_NOOP4: return 7'd52;
      MOP_LROP_LD: return 7'd53;
      MOP_LROP_INC: return 7'd54;
      MOP_LROP_DEC: return 7'd55;
      MOP_LROP_CLR: return 7'd56;
      MOP_BELLOAD: return 7'd57;
      default: return 7'd0;
    endcase
  endfunction

  // Field in which a microoperation is coded (1..4), 0 for none.
  function automatic int unsigned mop_field(input mop_e m);
    if (f1_code(m) != 0) return 1;
    if (f2_code(m) != 0) return 2;
    if (f3_code(m) != 0) return 3;
    if (f4_code(m) != 0) return 4;
    return 0;
  endfunction
endpackage
