// tb_ff_mac: checks MR = A*B + C mod f(x) of the three-stage FF MAC against
// bit-serial reference arithmetic. A and B change every clock and C is
// presented two clocks after its A/B pair, so the test also pins the
// pipeline timing: MR of a pair must be valid in the third cycle (n = 3).
module tb_ff_mac;
  import ecsm_pkg::*;
  import ecsm_ref_pkg::*;

  localparam int N = 300;

  logic clk = 1'b0;
  fe_t a, b, c, mr;
  fe_t av[N], bv[N], cv[N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ff_mac dut (.clk, .a, .b, .c, .mr);

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

  initial begin
    for (int i = 0; i < N; i++) begin
      av[i] = rnd(); bv[i] = rnd(); cv[i] = (i % 3 == 0) ? '0 : rnd();
    end
    av[0] = '1; bv[0] = '1;
    av[1] = fe_t'(1); bv[1] = rnd();
    for (int t = 0; t < N + 2; t++) begin
      @(negedge clk);
      a = (t < N) ? av[t] : '0;
      b = (t < N) ? bv[t] : '0;
      c = (t >= 2) ? cv[t-2] : '0;
      #1;
      if (t >= 2) begin
        checks++;
        if (mr !== (ref_mul(av[t-2], bv[t-2]) ^ cv[t-2])) begin
          failures++;
          if (failures < 5) $display("FAIL op %0d got %h", t - 2, mr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
