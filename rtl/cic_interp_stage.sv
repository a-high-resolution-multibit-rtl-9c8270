// One sinc^K (CIC) interpolation stage with rate factor R.
//
// K comb sections run at the input rate (in_tick), the comb result is zero-stuffed up to the
// output rate and K integrators run at the output rate (out_tick). The cascade's impulse response
// is the K-fold convolution of an R-sample boxcar, i.e. a sinc^K frequency response, with a DC
// gain of R^(K-1). All internal arithmetic is modular in W bits, wide enough for the final sum,
// so intermediate wrap-around cancels exactly. The gain is removed by multiplying with a rounded
// reciprocal 2^SH / R^(K-1) (exact when R^(K-1) is a power of two, otherwise off by well under
// one output LSB) and rounding to nearest; the result is saturated to OUT_W bits.
//
// Timing: in_tick must coincide with every R-th out_tick. The input is sampled when in_tick is
// high; out changes after each out_tick and is stable in between. Latency from an input sample to
// the first output it affects is K+1 output ticks.
module cic_interp_stage #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned OUT_W = 32,
  parameter int unsigned R     = 8,
  parameter int unsigned K     = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_tick,
  input  logic                    out_tick,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);
  localparam longint unsigned GAIN  = longint'(R) ** (K - 1);
  localparam int unsigned     GB    = (GAIN > 1) ? $clog2(GAIN) : 0;
  localparam int unsigned     W     = IN_W + K * $clog2(R) + 1;
  localparam int unsigned     SH    = 32 + GB;
  localparam longint unsigned RECIP = ((64'd1 << SH) + GAIN / 2) / GAIN;
  localparam int unsigned     PW    = W + SH + 2;

  logic signed [W-1:0] comb_dly [K];
  logic signed [W-1:0] comb_val [K+1];
  logic signed [W-1:0] stuffed_val;
  logic                pending;
  logic signed [W-1:0] integ [K];

  // Comb cascade (combinational through the delay registers).
  always_comb begin
    comb_val[0] = W'(din);
    for (int k = 0; k < K; k++) comb_val[k+1] = comb_val[k] - comb_dly[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) comb_dly[k] <= '0;
      stuffed_val <= '0;
      pending     <= 1'b0;
    end else if (in_tick) begin
      for (int k = 0; k < K; k++) comb_dly[k] <= comb_val[k];
      stuffed_val <= comb_val[K];
      pending     <= 1'b1;
    end else if (out_tick) begin
      pending <= 1'b0;
    end
  end

  // Integrator cascade at the output rate; the zero-stuffed sample enters once per input.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) integ[k] <= '0;
    end else if (out_tick) begin
      integ[0] <= integ[0] + (pending ? stuffed_val : W'(0));
      for (int k = 1; k < K; k++) integ[k] <= integ[k] + integ[k-1];
    end
  end

  // Gain normalisation with round to nearest and saturation.
  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] scaled;
  localparam logic signed [PW-1:0] OMAX    = (PW'(1) <<< (OUT_W - 1)) - PW'(1);
  localparam logic signed [PW-1:0] OMIN    = -(PW'(1) <<< (OUT_W - 1));
  localparam logic signed [PW-1:0] RECIP_S = PW'(RECIP);

  always_comb begin
    prod   = PW'(integ[K-1]) * RECIP_S;
    scaled = (prod + (PW'(1) <<< (SH - 1))) >>> SH;
    if (scaled > OMAX)      dout = OMAX[OUT_W-1:0];
    else if (scaled < OMIN) dout = OMIN[OUT_W-1:0];
    else                    dout = scaled[OUT_W-1:0];
  end
endmodule
