// ecsm_pkg: field, curve-independent constants and control-word types shared
// by the scalar-multiplier datapath, its control ROM and its state machine.
//
// The field is GF(2^163) in polynomial basis. The 163-bit width and the
// Karatsuba split 163 -> 81/82 -> 40/41 -> 20/21 follow the design; the
// reduction polynomial f(x) = x^163 + x^7 + x^6 + x^3 + 1 (the NIST B-163 /
// sect163r2 pentanomial) is this design's choice, since the source only says
// the field polynomial is a trinomial or pentanomial.
//
// The control word is 18 bits: eight 2-bit select fields for the 4:1 input
// muxes of T1..T4, A, B, C and S (16 bits) plus 2 swap-enable bits. The order
// of the inputs inside each mux is this design's own encoding.
package ecsm_pkg;

  localparam int unsigned M  = 163;  // field degree
  localparam int unsigned K1 = 7;    // f(x) = x^M + x^K1 + x^K2 + x^K3 + 1
  localparam int unsigned K2 = 6;
  localparam int unsigned K3 = 3;
  localparam int unsigned KOM_LEVELS = 3;  // 163 -> 81/82 -> 40/41 -> 20/21

  typedef logic [M-1:0]   fe_t;   // field element
  typedef logic [2*M-2:0] dp_t;   // unreduced double-length product

  // Reduce a polynomial of degree <= 2M-2 modulo f(x). Two folds suffice
  // for a pentanomial with K1 < M/2: the first folds the upper M-1 bits,
  // the second the at most K1-1 bits that the first pushes past x^(M-1).
  function automatic fe_t gf_reduce(input dp_t p);
    logic [M-2:0]    h1;   // x^M .. x^(2M-2)
    logic [M+K1-2:0] t;    // after the first fold
    logic [K1-2:0]   h2;   // bits the first fold pushed past x^(M-1)
    h1 = p[2*M-2:M];
    t  = (M+K1-1)'(p[M-1:0]) ^ (M+K1-1)'(h1) ^ ((M+K1-1)'(h1) << K3)
       ^ ((M+K1-1)'(h1) << K2) ^ ((M+K1-1)'(h1) << K1);
    h2 = t[M+K1-2:M];
    return t[M-1:0] ^ fe_t'(h2) ^ (fe_t'(h2) << K3) ^ (fe_t'(h2) << K2) ^ (fe_t'(h2) << K1);
  endfunction

  // Input selections of the eight 4:1 muxes of the register bank.
  typedef enum logic [1:0] {A_MR = 2'd0, A_SR = 2'd1, A_T2 = 2'd2, A_T3 = 2'd3} a_sel_e;
  typedef enum logic [1:0] {B_T2 = 2'd0, B_T4 = 2'd1, B_T1 = 2'd2, B_XP = 2'd3} b_sel_e;
  typedef enum logic [1:0] {C_MR = 2'd0, C_T2 = 2'd1, C_ZERO = 2'd2, C_SR = 2'd3} c_sel_e;
  typedef enum logic [1:0] {S_T3 = 2'd0, S_T2 = 2'd1, S_MRXT1 = 2'd2, S_SR = 2'd3} s_sel_e;
  typedef enum logic [1:0] {T1_HOLD = 2'd0, T1_MR = 2'd1, T1_SR = 2'd2, T1_ONE = 2'd3} t1_sel_e;
  typedef enum logic [1:0] {T2_HOLD = 2'd0, T2_T3 = 2'd1, T2_T1 = 2'd2, T2_MR = 2'd3} t2_sel_e;
  typedef enum logic [1:0] {T3_HOLD = 2'd0, T3_MR = 2'd1, T3_YP = 2'd2, T3_SR = 2'd3} t3_sel_e;
  typedef enum logic [1:0] {T4_HOLD = 2'd0, T4_MR = 2'd1, T4_B = 2'd2, T4_ZERO = 2'd3} t4_sel_e;

  // One control-ROM word. sw_t2 / sw_s: when set and the ladder swap flag is
  // 1, the LSB of the T2 / S select is inverted, which exchanges the pairs
  // (T1,MR) and (HOLD,T3) at T2 and (T3,T2) and (MR^T1,SR) at S.
  typedef struct packed {
    logic    sw_t2;
    logic    sw_s;
    t4_sel_e t4;
    t3_sel_e t3;
    t2_sel_e t2;
    t1_sel_e t1;
    s_sel_e  s;
    c_sel_e  c;
    b_sel_e  b;
    a_sel_e  a;
  } ctrl_t;

  localparam int unsigned CTRL_W = 18;
  localparam int unsigned ADDR_W = 6;

  // Idle word: every T register holds, operand registers load harmless values.
  localparam ctrl_t CTRL_IDLE = '{sw_t2: 1'b0, sw_s: 1'b0, t4: T4_HOLD, t3: T3_HOLD,
                                  t2: T2_HOLD, t1: T1_HOLD, s: S_T3, c: C_ZERO,
                                  b: B_T2, a: A_MR};

  // ROM map (addresses of the steps the state machine branches on).
  localparam logic [ADDR_W-1:0] AD_IDLE    = 6'd0;
  localparam logic [ADDR_W-1:0] AD_INIT0   = 6'd1;   // 1..8   initialisation
  localparam logic [ADDR_W-1:0] AD_INIT_SW = 6'd7;   // swap flag set for the first bit
  localparam logic [ADDR_W-1:0] AD_LOOP1   = 6'd9;   // 9..15  ladder iteration c1..c7
  localparam logic [ADDR_W-1:0] AD_LOOP_SW = 6'd14;  // swap flag for the next bit
  localparam logic [ADDR_W-1:0] AD_LOOP7   = 6'd15;
  localparam logic [ADDR_W-1:0] AD_POST0   = 6'd16;  // 16..28 coordinate post-process
  localparam logic [ADDR_W-1:0] AD_POST12  = 6'd28;
  localparam logic [ADDR_W-1:0] AD_DS0     = 6'd29;  // inversion: beta_k -> beta_2k
  localparam logic [ADDR_W-1:0] AD_DSQ     = 6'd30;
  localparam logic [ADDR_W-1:0] AD_DM0     = 6'd31;
  localparam logic [ADDR_W-1:0] AD_DM3     = 6'd34;
  localparam logic [ADDR_W-1:0] AD_IS0     = 6'd35;  // inversion: beta_k -> beta_k+1
  localparam logic [ADDR_W-1:0] AD_IM3     = 6'd39;
  localparam logic [ADDR_W-1:0] AD_FS0     = 6'd40;  // final square gives the inverse
  // 41..48 affine x and y (no jump targets inside)
  localparam logic [ADDR_W-1:0] AD_Q7      = 6'd48;

endpackage
