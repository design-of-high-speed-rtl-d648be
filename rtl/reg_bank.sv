// reg_bank: the register bank of the scalar multiplier data path.
//
// Four caching registers T1..T4 and the four operand registers A, B, C
// (inputs of the FF MAC) and S (input of the FF squarer). Every register
// sits behind one 4:1 mux whose 2-bit select comes from the current control
// word, so the input delay of any register is one 4:1 mux. The inputs of each
// mux (see ecsm_pkg) keep the sources of the reference data path where
// this design's schedule can use them: A = {MR, SR, T2, T3} and
// B = {T2, T4, T1, xP} unchanged; C and the T registers add a hold or extra
// source where the reference leaves a mux input open; S takes
// {T3, T2, MR^T1, SR}, i.e. T3 in place of the reference's MR.
//
// Swap: the Montgomery ladder must double either of the two working points
// depending on the scalar bits. The control word carries two swap enables;
// when an enable is set and swap_i = 1, the LSB of the S (sw_s) or T2 (sw_t2)
// select is inverted. This is this design's reading of the two "swapping
// selection" bits. All registers load every clock (T registers hold through
// their mux); rst_ni clears them asynchronously.
module reg_bank
  import ecsm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_ni,
  input  ctrl_t ctrl_i,
  input  logic  swap_i,
  input  fe_t   mr_i,     // FF MAC result
  input  fe_t   sr_i,     // FF squarer result
  input  fe_t   xp_i,     // affine x of the base point
  input  fe_t   yp_i,     // affine y of the base point
  input  fe_t   b_i,      // curve coefficient b
  output fe_t   a_o,
  output fe_t   b_o,
  output fe_t   c_o,
  output fe_t   s_o,
  output fe_t   t3_o,     // holds the affine y of the result when done
  output fe_t   t4_o      // holds the affine x of the result when done
);
  fe_t t1_q, t2_q, t3_q, t4_q, a_q, b_q, c_q, s_q;
  fe_t t1_d, t2_d, t3_d, t4_d, a_d, b_d, c_d, s_d;
  logic [1:0] s_sel, t2_sel;

  assign s_sel  = {ctrl_i.s[1],  ctrl_i.s[0]  ^ (ctrl_i.sw_s  & swap_i)};
  assign t2_sel = {ctrl_i.t2[1], ctrl_i.t2[0] ^ (ctrl_i.sw_t2 & swap_i)};

  always_comb begin
    unique case (ctrl_i.a)
      A_MR:    a_d = mr_i;
      A_SR:    a_d = sr_i;
      A_T2:    a_d = t2_q;
      default: a_d = t3_q;
    endcase
    unique case (ctrl_i.b)
      B_T2:    b_d = t2_q;
      B_T4:    b_d = t4_q;
      B_T1:    b_d = t1_q;
      default: b_d = xp_i;
    endcase
    unique case (ctrl_i.c)
      C_MR:    c_d = mr_i;
      C_T2:    c_d = t2_q;
      C_ZERO:  c_d = '0;
      default: c_d = sr_i;
    endcase
    unique case (s_sel)
      2'd0:    s_d = t3_q;
      2'd1:    s_d = t2_q;
      2'd2:    s_d = mr_i ^ t1_q;
      default: s_d = sr_i;
    endcase
    unique case (ctrl_i.t1)
      T1_HOLD: t1_d = t1_q;
      T1_MR:   t1_d = mr_i;
      T1_SR:   t1_d = sr_i;
      default: t1_d = fe_t'(1);
    endcase
    unique case (t2_sel)
      2'd0:    t2_d = t2_q;
      2'd1:    t2_d = t3_q;
      2'd2:    t2_d = t1_q;
      default: t2_d = mr_i;
    endcase
    unique case (ctrl_i.t3)
      T3_HOLD: t3_d = t3_q;
      T3_MR:   t3_d = mr_i;
      T3_YP:   t3_d = yp_i;
      default: t3_d = sr_i;
    endcase
    unique case (ctrl_i.t4)
      T4_HOLD: t4_d = t4_q;
      T4_MR:   t4_d = mr_i;
      T4_B:    t4_d = b_i;
      default: t4_d = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni) begin
      t1_q <= '0; t2_q <= '0; t3_q <= '0; t4_q <= '0;
      a_q  <= '0; b_q  <= '0; c_q  <= '0; s_q  <= '0;
    end else begin
      t1_q <= t1_d; t2_q <= t2_d; t3_q <= t3_d; t4_q <= t4_d;
      a_q  <= a_d;  b_q  <= b_d;  c_q  <= c_d;  s_q  <= s_d;
    end
  end

  assign a_o  = a_q;
  assign b_o  = b_q;
  assign c_o  = c_q;
  assign s_o  = s_q;
  assign t3_o = t3_q;
  assign t4_o = t4_q;
endmodule
