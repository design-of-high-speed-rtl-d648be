// tb_ecsm_top: end-to-end test of the scalar multiplier at full size
// (GF(2^163), all parameters at their defaults).
//
// Base points are multiples of the NIST B-163 generator, so every input is
// on the curve. Each run starts the design, waits for done, and compares
// (x, y) with an affine double-and-add reference (bit-serial field
// arithmetic, Fermat inversion), checks the result is on the curve, and
// checks the latency (done one clock after the 1368th ROM word). It also counts the mechanisms the
// design relies on and fails if one never happens: ladder iterations with
// swap = 0 and swap = 1, both inversion step kinds (beta_2k and beta_k+1),
// and the final slot selection for k*P in either slot (k0 = 0 and 1).
module tb_ecsm_top;
  import ecsm_pkg::*;
  import ecsm_ref_pkg::*;

  localparam int LATENCY = 1369;  // clock edges from start sampled to done seen
  localparam int NRUNS   = 6;

  logic clk = 1'b0;
  logic rst_ni = 1'b0;
  logic start = 1'b0;
  fe_t  k, xp, yp, bcoef, xq, yq;
  logic busy, done;

  int checks = 0;
  int failures = 0;
  int n_swap0 = 0, n_swap1 = 0, n_dbl_step = 0, n_inc_step = 0, n_k0_0 = 0, n_k0_1 = 0;

  always #5 clk = ~clk;

  ecsm_top dut (
    .clk, .rst_ni, .start_i(start), .k_i(k), .xp_i(xp), .yp_i(yp), .b_i(bcoef),
    .xq_o(xq), .yq_o(yq), .busy_o(busy), .done_o(done)
  );

  // Mechanism counters, observed on the state machine's ROM address.
  always @(posedge clk) begin
    if (dut.u_fsm.addr_o == AD_LOOP1) begin
      if (dut.u_fsm.swap_o) n_swap1++; else n_swap0++;
    end
    if (dut.u_fsm.addr_o == AD_DM3) n_dbl_step++;
    if (dut.u_fsm.addr_o == AD_IM3) n_inc_step++;
  end

  initial begin : watchdog
    repeat (NRUNS * (LATENCY + 50) + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t kk, pt_t p);
    pt_t q;
    int cycles;
    k = kk; xp = p.x; yp = p.y;
    q = pt_mul(kk, p);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    if (kk[0]) n_k0_1++; else n_k0_0++;
    checks += 3;
    if (q.inf || xq != q.x || yq != q.y) begin
      failures++;
      $display("FAIL k=%h\n  got x=%h y=%h\n  exp x=%h y=%h", kk, xq, yq, q.x, q.y);
    end
    if (!on_curve('{x: xq, y: yq, inf: 1'b0}, bcoef)) begin
      failures++;
      $display("FAIL result not on curve for k=%h", kk);
    end
    if (cycles != LATENCY) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, LATENCY);
    end
  endtask

  initial begin
    pt_t g, p;
    fe_t kk;
    bcoef = B163_B;
    g = '{x: B163_GX, y: B163_GY, inf: 1'b0};
    k = '0; xp = '0; yp = '0;
    checks++;
    if (!on_curve(g, bcoef)) begin
      failures++;
      $display("FAIL generator not on curve");
    end
    repeat (3) @(negedge clk);
    rst_ni = 1'b1;
    repeat (2) @(negedge clk);

    run(fe_t'(163'd2), g);                 // k0 = 0
    run(fe_t'(163'd7), g);                 // k0 = 1
    for (int r = 0; r < NRUNS - 2; r++) begin
      for (int w = 0; w < 6; w++) kk[w*32 +: 32] = $urandom;
      kk[M-1:M-2] = 2'b00;                 // keep k below the group order
      kk[0] = r[0];
      p = (r < 2) ? g : pt_mul(fe_t'(r + 3), g);
      run(kk, p);
    end

    checks += 6;
    if (n_swap0 == 0)    begin failures++; $display("FAIL no ladder step with swap = 0"); end
    if (n_swap1 == 0)    begin failures++; $display("FAIL no ladder step with swap = 1"); end
    if (n_dbl_step == 0) begin failures++; $display("FAIL no beta_2k inversion step"); end
    if (n_inc_step == 0) begin failures++; $display("FAIL no beta_k+1 inversion step"); end
    if (n_k0_0 == 0)     begin failures++; $display("FAIL no run with k*P in the D slot"); end
    if (n_k0_1 == 0)     begin failures++; $display("FAIL no run with k*P in the A slot"); end
    $display("mechanisms: swap0=%0d swap1=%0d dbl_steps=%0d inc_steps=%0d k0=0:%0d k0=1:%0d",
             n_swap0, n_swap1, n_dbl_step, n_inc_step, n_k0_0, n_k0_1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
