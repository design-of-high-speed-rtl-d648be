// ecsm_fsm: the small state machine that walks the control ROM.
//
// It keeps the 6-bit ROM address and does the conditional branching and
// jumping the ROM cannot: the ladder loop (M iterations of the 7-word body),
// the squaring runs of the Itoh-Tsujii inversion (their lengths follow the
// binary expansion of M-1), and the return to idle. It also holds the scalar
// in a shift register and produces the ladder swap flag: swap = k_i XOR
// k_(i+1), the scalar bit now processed against the one before it (0 before
// the first), updated once per iteration at word c6. Because the loop always
// writes the sum to the A slot and the double to the D slot, this flag says
// whether the point to be doubled next sits in the A slot. After the last bit
// a 0 is shifted in, so the flag then says whether k*P is in the A slot,
// which the post-process uses. The loop body is in the design; how the
// loop, the inversion steps and the swap flag are sequenced is this
// design's choice.
// Interface: start_i (one clock, while idle) captures k_i and starts; busy_o
// is high from then until done_o, a one-clock pulse after the last word.
// Assertions check that the address stays in the programmed ROM range and
// that done_o is a single pulse that ends a busy period. The reset disables
// the handshake assertions; Verilator reports that as a synchronous use of
// the asynchronous reset (SYNCASYNCNET), but no logic is involved.
module ecsm_fsm
  import ecsm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_ni,
  input  logic              start_i,
  input  fe_t               k_i,
  output logic [ADDR_W-1:0] addr_o,
  output logic              swap_o,
  output logic              busy_o,
  output logic              done_o
);
  localparam int unsigned CW = $clog2(M + 1);       // counters up to M
  localparam int unsigned EXP_MSB = $clog2(M) - 1;  // MSB position of M-1
  localparam logic [CW-1:0] EXP = CW'(M - 1);       // inversion exponent chain

  logic [ADDR_W-1:0] addr_q, addr_d;
  fe_t               key_q, key_d;
  logic              prev_q, prev_d, swap_q, swap_d, done_d, done_q;
  logic [CW-1:0]     iter_q, iter_d, kcnt_q, kcnt_d, sq_q, sq_d;
  logic [CW-1:0]     bit_q, bit_d;

  always_comb begin
    addr_d = addr_q;
    key_d  = key_q;
    prev_d = prev_q;
    swap_d = swap_q;
    iter_d = iter_q;
    kcnt_d = kcnt_q;
    sq_d   = sq_q;
    bit_d  = bit_q;
    done_d = 1'b0;

    if (addr_q == AD_INIT_SW || addr_q == AD_LOOP_SW) begin
      swap_d = key_q[M-1] ^ prev_q;
      prev_d = key_q[M-1];
      key_d  = key_q << 1;
    end

    unique case (addr_q)
      AD_IDLE: begin
        if (start_i) begin
          addr_d = AD_INIT0;
          key_d  = k_i;
          prev_d = 1'b0;
          swap_d = 1'b0;
        end
      end
      AD_LOOP7: begin
        if (iter_q == CW'(M - 1)) begin
          addr_d = AD_POST0;
        end else begin
          iter_d = iter_q + 1'b1;
          addr_d = AD_LOOP1;
        end
      end
      AD_POST12: begin
        addr_d = AD_DS0;
        kcnt_d = CW'(1);
        bit_d  = CW'(EXP_MSB - 1);
      end
      AD_DS0: begin
        sq_d   = kcnt_q - 1'b1;
        addr_d = (kcnt_q == CW'(1)) ? AD_DM0 : AD_DSQ;
      end
      AD_DSQ: begin
        sq_d = sq_q - 1'b1;
        if (sq_q == CW'(1)) addr_d = AD_DM0;
      end
      AD_DM3: begin
        kcnt_d = kcnt_q << 1;
        if (EXP[bit_q[$clog2(CW)-1:0]]) begin
          addr_d = AD_IS0;
        end else if (bit_q == '0) begin
          addr_d = AD_FS0;
        end else begin
          bit_d  = bit_q - 1'b1;
          addr_d = AD_DS0;
        end
      end
      AD_IM3: begin
        kcnt_d = kcnt_q + 1'b1;
        if (bit_q == '0) begin
          addr_d = AD_FS0;
        end else begin
          bit_d  = bit_q - 1'b1;
          addr_d = AD_DS0;
        end
      end
      AD_Q7: begin
        addr_d = AD_IDLE;
        done_d = 1'b1;
      end
      default: begin
        addr_d = addr_q + 1'b1;
        if (addr_q == AD_LOOP1 - 1) iter_d = '0;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni) begin
      addr_q <= AD_IDLE;
      key_q  <= '0;
      prev_q <= 1'b0;
      swap_q <= 1'b0;
      iter_q <= '0;
      kcnt_q <= '0;
      sq_q   <= '0;
      bit_q  <= '0;
      done_q <= 1'b0;
    end else begin
      addr_q <= addr_d;
      key_q  <= key_d;
      prev_q <= prev_d;
      swap_q <= swap_d;
      iter_q <= iter_d;
      kcnt_q <= kcnt_d;
      sq_q   <= sq_d;
      bit_q  <= bit_d;
      done_q <= done_d;
    end
  end

  assign addr_o = addr_q;
  assign swap_o = swap_q;
  assign busy_o = (addr_q != AD_IDLE);
  assign done_o = done_q;

  // The address never leaves the programmed part of the ROM.
  a_addr_range: assert property (@(posedge clk) addr_q <= AD_Q7);
  // done is a single pulse that ends a busy period: busy the clock before,
  // idle while it is high.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_ni) done_o |-> !busy_o && $past(busy_o));
  a_done_once:  assert property (@(posedge clk) disable iff (!rst_ni) done_o |=> !done_o);
endmodule
