// control_rom: the 64 x 18-bit control ROM of the scalar multiplier.
//
// Each word holds the eight 2-bit mux selects of the register bank (16 bits)
// and the two swap enables (2 bits); the state machine supplies the 6-bit
// address, one word per clock. The ROM size and word layout follow the
// design; the contents are this design's own schedule:
//   1..8    initialisation: T1 = X_D = 1, T2 = Z_D = 0, T3 = Z_A = 1, T4 = b,
//           and x_P arriving on MR as X_A, i.e. the ladder starts from
//           (O, P) and processes all M scalar bits ("merged initialisation");
//   9..15   one Montgomery-ladder iteration in 7 clocks (the design's 2n+1
//           for n = 3): point addition into the A slot (X_A on MR, Z_A in
//           T3) and point doubling into the D slot (X_D in T1, Z_D in T2);
//   16..28  post-process: products needed for y recovery and T = x Z1 Z2;
//   29..40  Itoh-Tsujii inversion of T (squaring runs and multiplications);
//   41..48  affine x = x Z2 X1 / T and y, results left in T4 and T3.
// Read is asynchronous (distributed ROM); a block-RAM version would take
// the state machine's next address instead of its current one.
module control_rom
  import ecsm_pkg::*;
(
  input  logic [ADDR_W-1:0] addr_i,
  output ctrl_t             ctrl_o
);
  function automatic ctrl_t word(a_sel_e a, b_sel_e b, c_sel_e c, s_sel_e s,
                                 t1_sel_e t1, t2_sel_e t2, t3_sel_e t3, t4_sel_e t4,
                                 logic sw_s, logic sw_t2);
    ctrl_t w;
    w.a = a; w.b = b; w.c = c; w.s = s;
    w.t1 = t1; w.t2 = t2; w.t3 = t3; w.t4 = t4;
    w.sw_s = sw_s; w.sw_t2 = sw_t2;
    return w;
  endfunction

  if ($bits(ctrl_t) != CTRL_W) begin : g_width_check
    $error("control word must be %0d bits", CTRL_W);
  end

  always_comb begin
    unique case (addr_i)
      // ---- initialisation ------------------------------------------------
      6'd1:  ctrl_o = word(A_MR, B_T2, C_ZERO, S_T3,    T1_ONE,  T2_HOLD, T3_HOLD, T4_ZERO, 0, 0);
      6'd2:  ctrl_o = word(A_MR, B_T4, C_ZERO, S_T3,    T1_HOLD, T2_HOLD, T3_HOLD, T4_B,    0, 0); // MR(4) = A*0 + 0
      6'd3:  ctrl_o = CTRL_IDLE;
      6'd4:  ctrl_o = CTRL_IDLE;
      6'd5:  ctrl_o = word(A_MR, B_T2, C_ZERO, S_MRXT1, T1_HOLD, T2_MR,   T3_HOLD, T4_HOLD, 0, 0); // Z_D = 0, S = 0^1
      6'd6:  ctrl_o = word(A_SR, B_XP, C_ZERO, S_T3,    T1_HOLD, T2_HOLD, T3_SR,   T4_HOLD, 0, 0); // Z_A = 1, start 1*x
      6'd7:  ctrl_o = CTRL_IDLE;                                                                      // swap flag set here
      6'd8:  ctrl_o = word(A_T3, B_T1, C_ZERO, S_T2,    T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 1, 0); // like c7, C = 0
      // ---- ladder iteration, word n loads the registers at the end of cn --
      6'd9:  ctrl_o = word(A_MR, B_T2, C_MR,   S_SR,    T1_SR,   T2_T1,   T3_HOLD, T4_HOLD, 0, 1); // X_A*Z_D, Zn^4, T2 = Xn
      6'd10: ctrl_o = word(A_SR, B_T4, C_ZERO, S_T2,    T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 0, 0); // b*Zn^4, square Xn
      6'd11: ctrl_o = word(A_SR, B_T1, C_ZERO, S_SR,    T1_MR,   T2_HOLD, T3_HOLD, T4_HOLD, 0, 0); // Xn^2*Zn^2, T1 = P1
      6'd12: ctrl_o = word(A_MR, B_T1, C_SR,   S_MRXT1, T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 0, 0); // P1*P2, C = Xn^4
      6'd13: ctrl_o = word(A_SR, B_XP, C_ZERO, S_T3,    T1_MR,   T2_HOLD, T3_SR,   T4_HOLD, 0, 0); // x*Z_A, new X_D, Z_A
      6'd14: ctrl_o = word(A_T3, B_XP, C_ZERO, S_T3,    T1_HOLD, T2_MR,   T3_HOLD, T4_HOLD, 0, 0); // new Z_D; spare x*Z_A
      6'd15: ctrl_o = word(A_T3, B_T1, C_MR,   S_T2,    T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 1, 0); // X_D*Z_A, square Zn
      // ---- post-process ---------------------------------------------------
      6'd16: ctrl_o = word(A_MR, B_T2, C_MR,   S_T3,    T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 0, 0); // X_A*Z_D
      6'd17: ctrl_o = word(A_T2, B_XP, C_ZERO, S_T3,    T1_HOLD, T2_HOLD, T3_HOLD, T4_MR,   0, 0); // T4 = U_A, x*Z_D
      6'd18: ctrl_o = word(A_T3, B_T2, C_ZERO, S_T3,    T1_MR,   T2_T1,   T3_HOLD, T4_HOLD, 0, 0); // Z_A*Z_D
      6'd19: ctrl_o = word(A_MR, B_T2, C_T2,   S_T3,    T1_HOLD, T2_T1,   T3_HOLD, T4_HOLD, 0, 1); // T2 = X1*Z2
      6'd20: ctrl_o = word(A_T2, B_XP, C_ZERO, S_T3,    T1_HOLD, T2_MR,   T3_YP,   T4_HOLD, 0, 0); // x*X1*Z2, T2 = U_D
      6'd21: ctrl_o = word(A_MR, B_XP, C_ZERO, S_T3,    T1_MR,   T2_HOLD, T3_HOLD, T4_HOLD, 0, 0); // T = x*Z12
      6'd22: ctrl_o = CTRL_IDLE;
      6'd23: ctrl_o = word(A_T3, B_T1, C_ZERO, S_T3,    T1_HOLD, T2_HOLD, T3_MR,   T4_HOLD, 0, 0); // y*Z12, T3 = N
      6'd24: ctrl_o = word(A_MR, B_XP, C_ZERO, S_T3,    T1_MR,   T2_HOLD, T3_HOLD, T4_HOLD, 0, 0); // x*T, T1 = T
      6'd25: ctrl_o = word(A_T2, B_T4, C_ZERO, S_T3,    T1_HOLD, T2_T1,   T3_HOLD, T4_HOLD, 0, 0); // U_D*U_A, T2 = T
      6'd26: ctrl_o = word(A_MR, B_T2, C_MR,   S_T3,    T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 0, 0);
      6'd27: ctrl_o = word(A_MR, B_T2, C_MR,   S_T3,    T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 0, 0);
      6'd28: ctrl_o = word(A_MR, B_T2, C_ZERO, S_T3,    T1_HOLD, T2_HOLD, T3_HOLD, T4_MR,   0, 0); // T4 = W
      // ---- inversion: beta_2k = beta_k^(2^k) * beta_k -----------------------
      6'd29: ctrl_o = word(A_MR, B_T2, C_ZERO, S_T2,    T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 0, 0);
      6'd30: ctrl_o = word(A_MR, B_T2, C_ZERO, S_SR,    T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 0, 0);
      6'd31: ctrl_o = word(A_SR, B_T2, C_ZERO, S_T3,    T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 0, 0);
      6'd32: ctrl_o = CTRL_IDLE;
      6'd33: ctrl_o = CTRL_IDLE;
      6'd34: ctrl_o = word(A_MR, B_T2, C_ZERO, S_T3,    T1_HOLD, T2_MR,   T3_HOLD, T4_HOLD, 0, 0);
      // ---- inversion: beta_k+1 = beta_k^2 * beta_1 --------------------------
      6'd35: ctrl_o = word(A_MR, B_T2, C_ZERO, S_T2,    T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 0, 0);
      6'd36: ctrl_o = word(A_SR, B_T1, C_ZERO, S_T3,    T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 0, 0);
      6'd37: ctrl_o = CTRL_IDLE;
      6'd38: ctrl_o = CTRL_IDLE;
      6'd39: ctrl_o = word(A_MR, B_T2, C_ZERO, S_T3,    T1_HOLD, T2_MR,   T3_HOLD, T4_HOLD, 0, 0);
      // ---- final square: SR = T^-1 in the next clock ------------------------
      6'd40: ctrl_o = word(A_MR, B_T2, C_ZERO, S_T2,    T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 0, 0);
      // ---- affine coordinates -----------------------------------------------
      6'd41: ctrl_o = word(A_SR, B_T4, C_ZERO, S_T3,    T1_SR,   T2_HOLD, T3_HOLD, T4_HOLD, 0, 0); // W*inv, T1 = inv
      6'd42: ctrl_o = word(A_T3, B_T1, C_ZERO, S_T3,    T1_HOLD, T2_HOLD, T3_YP,   T4_HOLD, 0, 0); // N*inv = x_Q
      6'd43: ctrl_o = word(A_MR, B_T2, C_ZERO, S_T3,    T1_HOLD, T2_T3,   T3_HOLD, T4_HOLD, 0, 0); // T2 = y
      6'd44: ctrl_o = word(A_MR, B_XP, C_ZERO, S_T3,    T1_MR,   T2_HOLD, T3_HOLD, T4_HOLD, 0, 0); // x*W*inv (+y)
      6'd45: ctrl_o = word(A_MR, B_T1, C_ZERO, S_T3,    T1_HOLD, T2_HOLD, T3_HOLD, T4_MR,   0, 0); // x_Q*W*inv, T4 = x_Q
      6'd46: ctrl_o = word(A_MR, B_T2, C_T2,   S_T3,    T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 0, 0);
      6'd47: ctrl_o = word(A_MR, B_T2, C_MR,   S_T3,    T1_HOLD, T2_HOLD, T3_HOLD, T4_HOLD, 0, 0);
      6'd48: ctrl_o = word(A_MR, B_T2, C_ZERO, S_T3,    T1_HOLD, T2_HOLD, T3_MR,   T4_HOLD, 0, 0); // T3 = y_Q
      default: ctrl_o = CTRL_IDLE;
    endcase
  end
endmodule
