// tb_reg_bank: checks every input of every 4:1 mux of the register bank,
// the hold behaviour of T1..T4, the MR^T1 input of S, and the swap
// enables (LSB inversion of the S and T2 selects only when both the
// enable bit and the swap flag are set). Expected values come from a
// model of the registers kept in the testbench.
module tb_reg_bank;
  import ecsm_pkg::*;

  localparam int N = 3000;

  logic clk = 1'b0;
  logic rst_ni = 1'b0;
  ctrl_t ctrl;
  logic swap;
  fe_t mr, sr, xp, yp, bc, a_o, b_o, c_o, s_o, t3_o, t4_o;
  fe_t t1, t2, t3, t4, ea, eb, ec, es;
  int checks = 0, failures = 0;
  int n_swapped = 0;

  always #5 clk = ~clk;

  reg_bank dut (
    .clk, .rst_ni, .ctrl_i(ctrl), .swap_i(swap), .mr_i(mr), .sr_i(sr),
    .xp_i(xp), .yp_i(yp), .b_i(bc), .a_o, .b_o, .c_o, .s_o, .t3_o, .t4_o
  );

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fe_t rnd();
    fe_t v;
    for (int w = 0; w < 6; w++) v[w*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(string what, fe_t got, fe_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 8) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    int ss, s2;
    ctrl = CTRL_IDLE; swap = 1'b0;
    mr = '0; sr = '0; xp = '0; yp = '0; bc = '0;
    t1 = '0; t2 = '0; t3 = '0; t4 = '0;
    repeat (2) @(negedge clk);
    rst_ni = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      ctrl = ctrl_t'($urandom);
      swap = $urandom;
      mr = rnd(); sr = rnd(); xp = rnd(); yp = rnd(); bc = rnd();
      ea = (ctrl.a == A_MR) ? mr : (ctrl.a == A_SR) ? sr : (ctrl.a == A_T2) ? t2 : t3;
      eb = (ctrl.b == B_T2) ? t2 : (ctrl.b == B_T4) ? t4 : (ctrl.b == B_T1) ? t1 : xp;
      ec = (ctrl.c == C_MR) ? mr : (ctrl.c == C_T2) ? t2 : (ctrl.c == C_ZERO) ? '0 : sr;
      ss = int'(ctrl.s) ^ ((ctrl.sw_s && swap) ? 1 : 0);
      s2 = int'(ctrl.t2) ^ ((ctrl.sw_t2 && swap) ? 1 : 0);
      if ((ctrl.sw_s || ctrl.sw_t2) && swap) n_swapped++;
      es = (ss == 0) ? t3 : (ss == 1) ? t2 : (ss == 2) ? (mr ^ t1) : sr;
      @(posedge clk);
      #1;
      begin
        fe_t n1, n2, n3, n4;
        n1 = (ctrl.t1 == T1_HOLD) ? t1 : (ctrl.t1 == T1_MR) ? mr : (ctrl.t1 == T1_SR) ? sr : fe_t'(1);
        n2 = (s2 == 0) ? t2 : (s2 == 1) ? t3 : (s2 == 2) ? t1 : mr;
        n3 = (ctrl.t3 == T3_HOLD) ? t3 : (ctrl.t3 == T3_MR) ? mr : (ctrl.t3 == T3_YP) ? yp : sr;
        n4 = (ctrl.t4 == T4_HOLD) ? t4 : (ctrl.t4 == T4_MR) ? mr : (ctrl.t4 == T4_B) ? bc : '0;
        t1 = n1; t2 = n2; t3 = n3; t4 = n4;
      end
      check("A", a_o, ea);
      check("B", b_o, eb);
      check("C", c_o, ec);
      check("S", s_o, es);
      check("T1", dut.t1_q, t1);
      check("T2", dut.t2_q, t2);
      check("T3", t3_o, t3);
      check("T4", t4_o, t4);
    end
    checks++;
    if (n_swapped == 0) begin failures++; $display("FAIL swap never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
