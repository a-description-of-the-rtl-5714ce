// Shared types and constants of the MATHILDA processor.
//
// The data path is 64 bits wide; control registers are 4 to 16 bits wide.
// Pointer-like registers are all operated the same way: load, increment,
// decrement, clear (Table 2.1 of the design), so one operation type serves
// them all. A Standard Group (16-element register group with pointer and two
// pointer-save registers) is commanded by the sg_cmd_t bundle.
// Some named constants (the ALF_* function codes, SG_IDLE) are not used by
// every module; they are there for readability and for the testbenches, so a
// lint run on a single module reports them as unused parameters.
package mat_pkg;
  typedef logic [63:0] word_t;

  // Register operation for counters, pointers and selection registers.
  typedef enum logic [2:0] {
    R_NOP = 3'd0,
    R_LD  = 3'd1,   // load from the value that comes with the command
    R_LS1 = 3'd2,   // load from Save1 (pointers of a Standard Group)
    R_LS2 = 3'd3,   // load from Save2
    R_INC = 3'd4,
    R_DEC = 3'd5,
    R_CLR = 3'd6,
    R_LSG = 3'd7    // load from the element of the associated Standard Group
  } rop_e;

  // Command bundle of a Standard Group: pointer, Save1, Save2 and element write.
  typedef struct packed {
    rop_e       p_op;    // pointer operation (R_LD uses val)
    rop_e       s1_op;   // Save1 operation (R_LD uses val, R_LS2 copies Save2)
    logic       s2_ld;   // Save2 := pointer
    logic [3:0] val;     // immediate/EX/SB value for pointer or Save1 loads
  } sg_cmd_t;

  localparam sg_cmd_t SG_IDLE = '{p_op: R_NOP, s1_op: R_NOP, s2_ld: 1'b0, val: 4'd0};

  // Shift/load control of AS, VS, DS (two dedicated bits each, Table 3.3).
  typedef enum logic [1:0] {
    SH_IDLE  = 2'd0,
    SH_RIGHT = 2'd1,
    SH_LEFT  = 2'd2,
    SH_LOAD  = 2'd3
  } shctl_e;

  // Bus sources (Table 3.1, in printed order).
  typedef enum logic [2:0] {
    SRC_SP = 3'd0, SRC_AL = 3'd1, SRC_VS = 3'd2, SRC_DS = 3'd3,
    SRC_WA = 3'd4, SRC_WB = 3'd5, SRC_IA = 3'd6, SRC_IB = 3'd7
  } src_e;

  // Shifted-bus destinations (Table 3.1, in printed order).
  typedef enum logic [2:0] {
    SBD_NONE = 3'd0, SBD_MA = 3'd1, SBD_MB = 3'd2, SBD_LR = 3'd3,
    SBD_WA = 3'd4, SBD_WB = 3'd5, SBD_OA = 3'd6, SBD_OB = 3'd7
  } sbd_e;

  // Next-address sources (Table 3.2, in printed order).
  typedef enum logic [2:0] {
    AD_EX = 3'd0, AD_AL = 3'd1, AD_RB = 3'd2, AD_RA = 3'd3,
    AD_SA = 3'd4, AD_AM1 = 3'd5, AD_AP1 = 3'd6, AD_A = 3'd7
  } adsel_e;

  // B-data selection (Table 2.26, in printed order).
  typedef enum logic [1:0] {
    BD_ZERO = 2'd0, BD_T = 2'd1, BD_TT = 2'd2, BD_SA = 2'd3
  } bsel_e;

  // AL function register layout: {carry_in, logic_mode, select[3:0]} (Table 2.9
  // row index is select; logic_mode picks the right-hand column).
  localparam logic [5:0] ALF_ADD   = 6'b0_0_1001;  // A+B
  localparam logic [5:0] ALF_SUB   = 6'b1_0_0110;  // A-B-1 with carry-in 1 = A-B
  localparam logic [5:0] ALF_A     = 6'b0_1_1111;  // A
  localparam logic [5:0] ALF_INC   = 6'b1_0_0000;  // A+1
  localparam logic [5:0] ALF_B     = 6'b0_1_1010;  // B
  localparam logic [5:0] ALF_ALL0S = 6'b0_1_0011;  // 00...0
  localparam logic [5:0] ALF_ALL1S = 6'b0_1_1100;  // 11...1
  localparam logic [5:0] ALF_OR    = 6'b0_1_1110;  // A or B

  // Decoded fixed fields of a microinstruction.
  typedef struct packed {
    logic [6:0] f1;
    logic [1:0] s1;
    logic       md2;
    logic [6:0] f2;
    logic       md3;
    logic [6:0] f3;
    logic [1:0] s3;
    logic       md4;
    logic [6:0] f4;
    logic       bse;
    sbd_e       sbd;
    src_e       src;
    bsel_e      bisb;
    logic       cisb;
    logic [6:0] csb;
    adsel_e     af;
    adsel_e     at;
    shctl_e     as_ctl;
    shctl_e     vs_ctl;
    shctl_e     ds_ctl;
  } uinst_t;   // exactly 64 bits, most significant field first

  // Testable conditions: index into the 128-input condition selector (the
  // value of the CSB field). Unused indices read as false.
  typedef enum logic [6:0] {
    C_FALSE,
    C_TRUE,
    C_AL0,
    C_AL63,
    C_AL,
    C_ALOV,
    C_ONEOV,
    C_TWOOV,
    C_AS0,
    C_AS63,
    C_ASV,
    C_BEPGD,
    C_BE0,
    C_BP,
    C_BUS,
    C_CA0,
    C_CA3,
    C_CA4,
    C_CA5,
    C_CA6,
    C_CA,
    C_CASPOV,
    C_CB0,
    C_CB3,
    C_CB4,
    C_CB5,
    C_CB6,
    C_CB,
    C_CBSPOV,
    C_CR,
    C_DS0,
    C_DS1,
    C_DS2,
    C_DS3,
    C_DS4,
    C_DS5,
    C_DS6,
    C_DS7,
    C_DS8,
    C_DS9,
    C_DS10,
    C_DS11,
    C_DS12,
    C_DS13,
    C_DS14,
    C_DS15,
    C_DSV,
    C_DSV1,
    C_EXDA,
    C_RAPOV,
    C_RAPUN,
    C_RBPOV,
    C_RBPUN,
    C_INT,
    C_CUALOV,
    C_CYL,
    C_IADA,
    C_IADM,
    C_IBDA,
    C_IBDM,
    C_OASA,
    C_OBSA,
    C_OCSA,
    C_ODSA,
    C_KA,
    C_KB,
    C_KC,
    C_KD,
    C_L1,
    C_L2,
    C_LD,
    C_SGNLD,
    C_LSB1,
    C_LSBD,
    C_SGNLSBD,
    C_MSB1,
    C_MSBD,
    C_SGNMSBD,
    C_LR0,
    C_LR63,
    C_SB0,
    C_SB1,
    C_SB62,
    C_SB63,
    C_VS0,
    C_VS63,
    C_VSV,
    C_WA0,
    C_WA63,
    C_WAPOV,
    C_WAUOV,
    C_WAGOV,
    C_WACS,
    C_WAUSPOV,
    C_WAGSPOV,
    C_WAPSPOV,
    C_WB0,
    C_WB63,
    C_WBPOV,
    C_WBUOV,
    C_WBGOV,
    C_WBCS,
    C_WBUSPOV,
    C_WBGSPOV,
    C_WBPSPOV,
    C_WSAB,
    C_WSAOR,
    C_WSASPOV,
    C_CRPOV
  } cond_e;
endpackage
