// tb_control_rom: runs the whole control program of the ROM on a
// behavioural model of the data path written here (registers, 4:1 muxes
// with swap, a 3-cycle MAC pipeline and a squarer built on the reference
// field arithmetic), with the address sequence generated by the testbench
// from the scalar and the inversion chain, not by the RTL state machine.
// The resulting affine point must equal the double-and-add reference.
// It also checks that every unused address holds the idle word.
module tb_control_rom;
  import ecsm_pkg::*;
  import ecsm_ref_pkg::*;

  logic [ADDR_W-1:0] addr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_rom dut (.addr_i(addr), .ctrl_o(ctrl));

  // behavioural data path state
  fe_t t1, t2, t3, t4, ra, rb, rc, rs;
  fe_t p1, p2;       // MAC pipeline: products of the two previous A/B pairs
  fe_t xp, yp, bc;
  bit  swap;

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int a);
    fe_t mr, sr, n1, n2, n3, n4, na, nb, nc, ns;
    int ss, s2;
    addr = a[ADDR_W-1:0];
    #1;
    mr = p2 ^ rc;                 // product of the pair loaded two clocks ago
    sr = ref_mul(rs, rs);
    ss = int'(ctrl.s) ^ ((ctrl.sw_s && swap) ? 1 : 0);
    s2 = int'(ctrl.t2) ^ ((ctrl.sw_t2 && swap) ? 1 : 0);
    na = (ctrl.a == A_MR) ? mr : (ctrl.a == A_SR) ? sr : (ctrl.a == A_T2) ? t2 : t3;
    nb = (ctrl.b == B_T2) ? t2 : (ctrl.b == B_T4) ? t4 : (ctrl.b == B_T1) ? t1 : xp;
    nc = (ctrl.c == C_MR) ? mr : (ctrl.c == C_T2) ? t2 : (ctrl.c == C_ZERO) ? '0 : sr;
    ns = (ss == 0) ? t3 : (ss == 1) ? t2 : (ss == 2) ? (mr ^ t1) : sr;
    n1 = (ctrl.t1 == T1_HOLD) ? t1 : (ctrl.t1 == T1_MR) ? mr : (ctrl.t1 == T1_SR) ? sr : fe_t'(1);
    n2 = (s2 == 0) ? t2 : (s2 == 1) ? t3 : (s2 == 2) ? t1 : mr;
    n3 = (ctrl.t3 == T3_HOLD) ? t3 : (ctrl.t3 == T3_MR) ? mr : (ctrl.t3 == T3_YP) ? yp : sr;
    n4 = (ctrl.t4 == T4_HOLD) ? t4 : (ctrl.t4 == T4_MR) ? mr : (ctrl.t4 == T4_B) ? bc : '0;
    p2 = p1;
    p1 = ref_mul(ra, rb);
    ra = na; rb = nb; rc = nc; rs = ns;
    t1 = n1; t2 = n2; t3 = n3; t4 = n4;
  endtask

  task automatic program_run(fe_t k, pt_t p);
    pt_t q;
    bit prev, cur;
    int kk;
    xp = p.x; yp = p.y;
    q = pt_mul(k, p);
    prev = 0;
    for (int a = 1; a <= 8; a++) begin
      step(a);
      if (a == 7) begin swap = k[M-1] ^ prev; prev = k[M-1]; end
    end
    for (int i = M - 1; i >= 0; i--) begin
      for (int a = 9; a <= 15; a++) begin
        step(a);
        if (a == 14) begin
          cur = (i > 0) ? k[i-1] : 1'b0;
          swap = cur ^ prev; prev = cur;
        end
      end
    end
    for (int a = 16; a <= 28; a++) step(a);
    // Itoh-Tsujii chain over the bits of M-1 below its leading one
    kk = 1;
    for (int bpos = $clog2(M) - 2; bpos >= 0; bpos--) begin
      step(29);
      for (int j = 1; j < kk; j++) step(30);
      for (int a = 31; a <= 34; a++) step(a);
      kk = 2 * kk;
      if (((M - 1) >> bpos) & 1) begin
        for (int a = 35; a <= 39; a++) step(a);
        kk = kk + 1;
      end
    end
    for (int a = 40; a <= 48; a++) step(a);
    checks++;
    if (t4 != q.x || t3 != q.y) begin
      failures++;
      $display("FAIL k=%h got x=%h y=%h exp x=%h y=%h", k, t4, t3, q.x, q.y);
    end
  endtask

  initial begin
    pt_t g;
    fe_t k;
    t1 = '0; t2 = '0; t3 = '0; t4 = '0; ra = '0; rb = '0; rc = '0; rs = '0;
    p1 = '0; p2 = '0; swap = 0;
    bc = B163_B;
    g = '{x: B163_GX, y: B163_GY, inf: 1'b0};
    for (int a = 49; a < 64; a++) begin
      addr = a[ADDR_W-1:0];
      #1;
      checks++;
      if (ctrl != CTRL_IDLE) begin failures++; $display("FAIL word %0d not idle", a); end
    end
    addr = '0; #1;
    checks++;
    if (ctrl != CTRL_IDLE) begin failures++; $display("FAIL word 0 not idle"); end
    program_run(fe_t'(163'd6), g);
    for (int r = 0; r < 2; r++) begin
      for (int w = 0; w < 6; w++) k[w*32 +: 32] = $urandom;
      k[M-1:M-2] = 2'b00;
      k[0] = r[0];
      program_run(k, g);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
