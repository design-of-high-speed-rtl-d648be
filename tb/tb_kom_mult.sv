// tb_kom_mult: checks the 163-bit Karatsuba-Ofman multiplier (3 levels,
// CM20/CM21 leaves) against a schoolbook polynomial product, with a new
// operand pair every clock and the one-clock latency of the leaf register.
module tb_kom_mult;
  import ecsm_pkg::*;
  import ecsm_ref_pkg::*;

  localparam int N = 400;

  logic clk = 1'b0;
  fe_t a, b;
  logic [2*M-2:0] p, exp_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  kom_mult #(.W(M), .LEVELS(KOM_LEVELS)) dut (.clk, .a, .b, .p);

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
    a = '0; b = '0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      // value presented in the previous cycle must appear now
      if (i > 0) begin
        checks++;
        if (p !== exp_q) begin
          failures++;
          if (failures < 5) $display("FAIL i=%0d got %h exp %h", i, p, exp_q);
        end
      end
      case (i)
        0: begin a = '1; b = '1; end
        1: begin a = fe_t'(1); b = rnd(); end
        2: begin a = fe_t'(1) << (M - 1); b = fe_t'(1) << (M - 1); end
        default: begin a = rnd(); b = rnd(); end
      endcase
      exp_q = ref_pmul(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
