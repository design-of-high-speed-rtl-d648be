// tb_ff_sqr: checks SR = S^2 mod f(x) of the combinational FF squarer
// against the bit-serial reference multiplication S*S, for corner values
// (0, 1, all ones, top bit) and random operands.
module tb_ff_sqr;
  import ecsm_pkg::*;
  import ecsm_ref_pkg::*;

  localparam int N = 500;

  fe_t s, sr;
  int checks = 0, failures = 0;

  ff_sqr dut (.s, .sr);

  initial begin : watchdog
    #(10 * N + 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      case (i)
        0: s = '0;
        1: s = fe_t'(1);
        2: s = '1;
        3: s = fe_t'(1) << (M - 1);
        default: for (int w = 0; w < 6; w++) s[w*32 +: 32] = $urandom;
      endcase
      #10;
      checks++;
      if (sr !== ref_mul(s, s)) begin
        failures++;
        if (failures < 5) $display("FAIL s=%h got %h", s, sr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
