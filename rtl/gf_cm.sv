// gf_cm: threshold classical (schoolbook) multiplier over GF(2)[x], the leaf
// of the Karatsuba-Ofman tree (CM20/CM21 for the 163-bit field).
//
// p = a * b as polynomials, W x W -> 2W-1 bits. The partial products of the
// lower and the upper half of b's bits are summed separately and registered,
// and the two sums are XORed after the register. This puts the MAC's first
// pipeline cut inside the classical multipliers, as the design places it.
// Latency: one clock from a/b to p. No reset: the pipeline is free-running.
module gf_cm #(
  parameter int unsigned W = 20
) (
  input  logic           clk,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] p
);
  localparam int unsigned H = W / 2;

  logic [2*W-2:0] lo_d, hi_d, lo_q, hi_q;

  always_comb begin
    lo_d = '0;
    hi_d = '0;
    for (int unsigned i = 0; i < W; i++) begin
      if (i < H) lo_d ^= ({(2*W-1){b[i]}} & ((2*W-1)'(a) << i));
      else       hi_d ^= ({(2*W-1){b[i]}} & ((2*W-1)'(a) << i));
    end
  end

  always_ff @(posedge clk) begin
    lo_q <= lo_d;
    hi_q <= hi_d;
  end

  assign p = lo_q ^ hi_q;
endmodule
