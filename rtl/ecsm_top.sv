// ecsm_top: elliptic-curve scalar multiplier Q = k*P over GF(2^163).
//
// Montgomery ladder in Lopez-Dahab projective coordinates on a binary curve
// y^2 + xy = x^3 + a x^2 + b (the ladder and y recovery do not use a). One
// 3-stage pipelined Karatsuba-Ofman FF MAC and one non-pipelined FF squarer
// share a register bank; a 64 x 18 control ROM, addressed by a small state
// machine, steers the bank's 4:1 muxes every clock. Each
// scalar bit takes 7 clocks; one operation walks 1368 ROM words for M = 163
// (8 init + 163*7 ladder + 13 post-process + 197 inversion + 9 final), and
// done_o rises 1369 clocks after the edge that samples start_i.
// Interface: hold xp_i, yp_i, b_i stable while busy_o; pulse start_i for one
// clock while idle (k_i is captured then). done_o pulses once; xq_o / yq_o
// then hold the affine result until the next start. The result is wrong when
// k*P or (k+1)*P is the point at infinity (Z = 0 cannot be inverted).
module ecsm_top
  import ecsm_pkg::*;
(
  input  logic clk,
  input  logic rst_ni,
  input  logic start_i,
  input  fe_t  k_i,
  input  fe_t  xp_i,
  input  fe_t  yp_i,
  input  fe_t  b_i,
  output fe_t  xq_o,
  output fe_t  yq_o,
  output logic busy_o,
  output logic done_o
);
  logic [ADDR_W-1:0] addr;
  logic              swap;
  ctrl_t             ctrl;
  fe_t               a, b, c, s, mr, sr;

  ecsm_fsm u_fsm (
    .clk, .rst_ni, .start_i, .k_i,
    .addr_o(addr), .swap_o(swap), .busy_o, .done_o
  );

  control_rom u_rom (.addr_i(addr), .ctrl_o(ctrl));

  reg_bank u_bank (
    .clk, .rst_ni, .ctrl_i(ctrl), .swap_i(swap),
    .mr_i(mr), .sr_i(sr), .xp_i, .yp_i, .b_i,
    .a_o(a), .b_o(b), .c_o(c), .s_o(s),
    .t3_o(yq_o), .t4_o(xq_o)
  );

  ff_mac u_mac (.clk, .a, .b, .c, .mr);

  ff_sqr u_sqr (.s, .sr);
endmodule
