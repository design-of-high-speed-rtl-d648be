// tb_ecsm_fsm: checks the address sequence of the control state machine.
// For random scalars it checks: M passes through the 7-word ladder body,
// the swap flag seen by each iteration equals k_i XOR k_(i+1) (0 above the
// top bit) and, after the loop, k_0; the squaring runs of the inversion have
// the lengths k-1 of the chain 1,2,5,10,20,40,81 for M = 163 (two beta_k+1
// steps); the whole program is 1368 words; done pulses once and busy
// covers the run; start while busy is ignored.
module tb_ecsm_fsm;
  import ecsm_pkg::*;

  logic clk = 1'b0;
  logic rst_ni = 1'b0;
  logic start = 1'b0;
  fe_t k;
  logic [ADDR_W-1:0] addr;
  logic swap, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecsm_fsm dut (.clk, .rst_ni, .start_i(start), .k_i(k), .addr_o(addr),
                .swap_o(swap), .busy_o(busy), .done_o(done));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run(fe_t kk);
    int words = 0, iters = 0, swap_err = 0, dones = 0, incs = 0, run_len = 0, nrun = 0;
    int runs[$];
    int exp_runs[7] = '{0, 1, 4, 9, 19, 39, 80};
    bit post_swap = 0;
    k = kk;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (addr != AD_IDLE) begin
      words++;
      if (addr == AD_LOOP1) begin
        bit e;
        e = kk[M-1-iters] ^ ((iters == 0) ? 1'b0 : kk[M-iters]);
        if (swap != e) swap_err++;
        iters++;
      end
      if (addr == AD_POST0) post_swap = swap;
      if (addr == AD_DSQ) run_len++;
      if (addr == AD_DM0) begin runs.push_back(run_len); run_len = 0; end
      if (addr == AD_IM3) incs++;
      if (words == 100) begin start = 1'b1; k = ~kk; end   // ignored while busy
      if (words == 101) start = 1'b0;
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low at word %0d", words); end
      @(negedge clk);
      if (done) dones++;
    end
    @(negedge clk);
    if (done) dones++;
    expect_eq("program words", words, 1368);
    expect_eq("ladder iterations", iters, M);
    expect_eq("swap mismatches", swap_err, 0);
    expect_eq("post-process swap = k0", int'(post_swap), int'(kk[0]));
    expect_eq("done pulses", dones, 1);
    expect_eq("beta_k+1 steps", incs, 2);
    expect_eq("squaring runs", runs.size(), 7);
    foreach (exp_runs[i]) if (i < runs.size()) expect_eq($sformatf("run %0d", i), runs[i], exp_runs[i]);
    nrun++;
  endtask

  initial begin
    fe_t kk;
    k = '0;
    repeat (2) @(negedge clk);
    rst_ni = 1'b1;
    @(negedge clk);
    for (int r = 0; r < 3; r++) begin
      for (int w = 0; w < 6; w++) kk[w*32 +: 32] = $urandom;
      kk[0] = r[0];
      run(kk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
