// Second-order digital delta-sigma modulator with a Q_BITS-wide (5-bit, 32-level) quantizer.
//
// The modulator keeps the top Q_BITS of a 32-bit word and shapes the IN_W - Q_BITS = 27
// discarded bits of quantisation error out of the baseband with the noise transfer function
// (1 - z^-1)^2. It is built in error-feedback form: v = u + 2 e[n-1] - e[n-2], the quantizer takes
// the Q_BITS most significant bits of v (floor), and the new error e[n] = v - y 2^27 is the
// discarded low part, always in [0, 2^27). The signal transfer function is 1, so
// y 2^27 = u - (1 - z^-1)^2 e.
//
// Because e is bounded, v stays inside the quantizer's range as long as u lies in
// [-2^31 + 2^27, 2^31 - 2^28]; an input limiter clamps u to that range (about -0.6 dBFS) so the
// loop can never overload, and raises `sat` in a cycle where it clamped.
//
// Interface: din is sampled when en is high (every clock in this design, 1 MHz). code is the
// quantizer output as an unsigned level 0 .. 2^Q_BITS - 1 (level = y + 2^(Q_BITS-1)), i.e. the
// number of unit elements to switch on; it is registered and valid one clock after the input.
//
// The order, the 5-bit quantizer and the 32-bit input follow the architecture; the
// error-feedback structure, the input limiter and the offset-binary output are this design's
// choices.
module dsm2_modulator
  import dac_pkg::*;
#(
  parameter int unsigned W  = IN_W,
  parameter int unsigned QB = Q_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic [QB-1:0]       code,
  output logic                sat
);
  localparam int unsigned S  = W - QB;   // discarded bits
  localparam int unsigned VW = W + 3;    // room for u + 2 e1 - e2
  localparam logic signed [VW-1:0] UMAX = (VW'(1) <<< (W - 1)) - (VW'(1) <<< (S + 1));
  localparam logic signed [VW-1:0] UMIN = -(VW'(1) <<< (W - 1)) + (VW'(1) <<< S);

  logic [S-1:0] e1, e2;          // past errors, always non-negative
  logic signed [VW-1:0] u, v;
  logic signed [VW-S-1:0] y;
  logic [S-1:0] e;
  logic clamp;

  always_comb begin
    u     = VW'(din);
    clamp = 1'b0;
    if (u > UMAX) begin u = UMAX; clamp = 1'b1; end
    if (u < UMIN) begin u = UMIN; clamp = 1'b1; end
    v = u + (VW'({1'b0, e1}) <<< 1) - VW'({1'b0, e2});
    y = v[VW-1:S];               // floor(v / 2^S)
    e = v[S-1:0];                // v - y 2^S
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1   <= '0;
      e2   <= '0;
      code <= QB'(1 << (QB - 1));  // mid-scale: zero signal
      sat  <= 1'b0;
    end else if (en) begin
      e1   <= e;
      e2   <= e1;
      code <= QB'(y) ^ QB'(1 << (QB - 1));  // offset binary
      sat  <= clamp;
    end
  end

  // The limiter guarantees the quantizer never leaves its QB-bit range.
  property p_in_range;
    @(posedge clk) disable iff (!rst_n) en |-> (y >= -(1 << (QB - 1))) && (y < (1 << (QB - 1)));
  endproperty
  a_in_range: assert property (p_in_range);
endmodule
