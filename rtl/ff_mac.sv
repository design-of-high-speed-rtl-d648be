// ff_mac: three-stage pipelined bit-parallel finite-field multiplier-
// accumulator, MR = A*B + C mod f(x), over GF(2^M).
//
// Stage 1: operand splitting and the first half of the classical leaf
// multipliers of the Karatsuba-Ofman tree (register inside the leaves).
// Stage 2: second half of the leaves and the Karatsuba alignment; the
// 2M-1-bit product is registered. Stage 3: modular reduction merged with the
// addition of C, combinational, so MR feeds the register-bank muxes directly.
// Timing, as in the design: A and B are presented in cycle t, C in cycle
// t+2, and MR is valid during cycle t+2 (captured at its end, i.e. usable
// in cycle t+3, the (n+1)th clock for n = 3). A new product may start every
// cycle; there is no valid/stall signalling, the control ROM tracks timing.
module ff_mac
  import ecsm_pkg::*;
(
  input  logic clk,
  input  fe_t  a,
  input  fe_t  b,
  input  fe_t  c,
  output fe_t  mr
);
  dp_t prod_d, prod_q;

  kom_mult #(.W(M), .LEVELS(KOM_LEVELS)) u_kom (.clk(clk), .a(a), .b(b), .p(prod_d));

  always_ff @(posedge clk) prod_q <= prod_d;

  assign mr = gf_reduce(prod_q) ^ c;
endmodule
