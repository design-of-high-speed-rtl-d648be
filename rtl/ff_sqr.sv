// ff_sqr: non-pipelined finite-field squarer, SR = S^2 mod f(x), GF(2^M).
//
// Squaring in polynomial basis only spreads the bits (bit i -> bit 2i), so
// the circuit is the reduction alone: a few XOR levels for the pentanomial.
// Purely combinational: the S operand register in front of it makes the
// result available one clock after S is loaded, as the design states.
module ff_sqr
  import ecsm_pkg::*;
(
  input  fe_t s,
  output fe_t sr
);
  dp_t spread;

  always_comb begin
    spread = '0;
    for (int unsigned i = 0; i < M; i++) spread[2*i] = s[i];
  end

  assign sr = gf_reduce(spread);
endmodule
