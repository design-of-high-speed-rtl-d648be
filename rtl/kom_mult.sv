// kom_mult: Karatsuba-Ofman polynomial multiplier over GF(2)[x].
//
// p = a * b, W x W -> 2W-1 bits. Each level splits an operand into a low
// part of floor(W/2) bits and a high part of the remaining bits, forms the
// three half-size products al*bl, ah*bh and (al+ah)*(bl+bh), and aligns them
// as p = p0 + (pm + p0 + p2) x^L + p2 x^2L. After LEVELS splits the leaves are
// gf_cm classical multipliers; for W = 163 and LEVELS = 3 this gives the
// 163 -> 81/82 -> 40/41 -> 20/21 split with 27 CM20/CM21 leaves, as in the
// design's multiplier figure.
// The tree is written with generate loops over levels and nodes instead of a
// self-instantiating module. Level d has 3^d nodes; the children of node j
// are 3j (low), 3j+1 (high) and 3j+2 (middle), and node_w() gives its width.
// Operands and products of each level sit in arrays sized for the root;
// only the low bits that a node uses are driven from it.
// The only register is the one inside each leaf, so the latency is one clock:
// splitting and the leaf's first half run before the clock edge, the leaf's
// second half and the alignment after it.
module kom_mult #(
  parameter int unsigned W      = 163,
  parameter int unsigned LEVELS = 3
) (
  input  logic           clk,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-2:0] p
);
  localparam int unsigned NLEAF = 3 ** LEVELS;

  typedef logic [W-1:0]   op_t;
  typedef logic [2*W-2:0] pr_t;

  // Width of node j at level d: follow its base-3 path from the root.
  function automatic int unsigned node_w(int unsigned d, int unsigned j);
    int unsigned w = W;
    int unsigned div = 1;
    for (int unsigned l = 1; l < d; l++) div *= 3;
    for (int unsigned l = 0; l < d; l++) begin
      w   = ((j / div) % 3 == 0) ? w / 2 : w - w / 2;
      div = (div > 1) ? div / 3 : 1;
    end
    return w;
  endfunction

  // One set of node signals per level, so that no variable is both read
  // and written by the combinational tree.
  for (genvar d = 0; d <= LEVELS; d++) begin : g_sig
    op_t opa  [3**d];
    op_t opb  [3**d];
    pr_t prod [3**d];
  end

  assign g_sig[0].opa[0] = a;
  assign g_sig[0].opb[0] = b;
  assign p               = g_sig[0].prod[0];

  for (genvar d = 0; d < LEVELS; d++) begin : g_lvl
    for (genvar j = 0; j < 3 ** d; j++) begin : g_node
      localparam int unsigned NW = node_w(d, j);
      localparam int unsigned L  = NW / 2;
      localparam int unsigned H  = NW - L;

      logic [L-1:0]    al, bl;
      logic [H-1:0]    ah, bh, am, bm;
      logic [2*L-2:0]  p0;
      logic [2*H-2:0]  p2, pm, mid_s;
      logic [2*NW-2:0] mid, pn;

      assign al = g_sig[d].opa[j][L-1:0];
      assign bl = g_sig[d].opb[j][L-1:0];
      assign ah = g_sig[d].opa[j][NW-1:L];
      assign bh = g_sig[d].opb[j][NW-1:L];

      assign g_sig[d+1].opa[3*j]   = op_t'(al);
      assign g_sig[d+1].opb[3*j]   = op_t'(bl);
      assign g_sig[d+1].opa[3*j+1] = op_t'(ah);
      assign g_sig[d+1].opb[3*j+1] = op_t'(bh);
      assign am = ah ^ H'(al);
      assign bm = bh ^ H'(bl);
      assign g_sig[d+1].opa[3*j+2] = op_t'(am);
      assign g_sig[d+1].opb[3*j+2] = op_t'(bm);

      assign p0    = g_sig[d+1].prod[3*j][2*L-2:0];
      assign p2    = g_sig[d+1].prod[3*j+1][2*H-2:0];
      assign pm    = g_sig[d+1].prod[3*j+2][2*H-2:0];
      assign mid_s = pm ^ (2*H-1)'(p0) ^ p2;
      assign mid   = (2*NW-1)'(mid_s);
      assign pn    = (2*NW-1)'(p0) ^ (mid << L) ^ ((2*NW-1)'(p2) << (2*L));
      assign g_sig[d].prod[j] = pr_t'(pn);
    end
  end

  for (genvar j = 0; j < NLEAF; j++) begin : g_leaf
    localparam int unsigned NW = node_w(LEVELS, j);
    logic [2*NW-2:0] pl;
    gf_cm #(.W(NW)) u_cm (
      .clk(clk), .a(g_sig[LEVELS].opa[j][NW-1:0]), .b(g_sig[LEVELS].opb[j][NW-1:0]), .p(pl)
    );
    assign g_sig[LEVELS].prod[j] = pr_t'(pl);
  end
endmodule
