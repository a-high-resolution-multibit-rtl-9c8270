// Random-bit source for the DEM switching network: a maximal-length 41-bit LFSR.
//
// A Fibonacci LFSR with the primitive feedback polynomial x^41 + x^38 + 1. The register is
// advanced NBITS = 31 steps per enabled clock (leap-forward, unrolled in one clock), and the 31
// feedback bits of those steps are the outputs, so every DEM switch receives a fresh bit of the
// same sequence each clock. Because 31 and the sequence length 2^41 - 1 have no common factor,
// the register state also repeats only every 2^41 - 1 clocks: about 25 days at 1 MHz, i.e. a
// repetition frequency of 0.45 uHz, far below the 0.001 Hz edge of the signal band. (With 40 bits
// and 31 steps per clock the period would shrink by a factor 31, since 31 divides 2^40 - 1.)
//
// Interface: rnd is registered; it changes one clock after a clock with en high. Reset loads
// the non-zero SEED. A maximal-length register of at least 40 bits follows the architecture;
// the width 41, the polynomial, the leap-forward arrangement and the seed are this design's
// choices.
module lfsr_rng
  import dac_pkg::*;
#(
  parameter int unsigned      W     = LFSR_W,
  parameter int unsigned      NBITS = DEM_RBITS,
  parameter logic [W-1:0]     TAPS  = W'((64'd1 << 40) | (64'd1 << 37)),
  parameter logic [W-1:0]     SEED  = W'(64'h00A5_C3E1_9B27)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [NBITS-1:0] rnd
);
  logic [W-1:0] state, nxt;
  logic [NBITS-1:0] bits;

  always_comb begin
    nxt = state;
    for (int i = 0; i < NBITS; i++) begin
      bits[i] = ^(nxt & TAPS);
      nxt     = {nxt[W-2:0], bits[i]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SEED;
      rnd   <= '0;
    end else if (en) begin
      state <= nxt;
      rnd   <= bits;
    end
  end

  // An LFSR must never reach the all-zero lock-up state.
  a_nonzero: assert property (@(posedge clk) disable iff (!rst_n) state != '0);
endmodule
