// Three-stage sinc^K interpolation filter: 1.5625 kHz PCM in, 1 MHz out.
//
// The 32-bit PCM input, already oversampled to 1.5625 kHz, is raised to the 1 MHz modulator rate
// by three cascaded CIC (sinc^K) interpolators with rate factors R1, R2 and R3 (8, 8 and 10,
// product 640). A rate generator makes the clock enables for every rate from the 1 MHz clock.
// The filter pulls its input: pcm_req is high for one clock every R1*R2*R3 clocks and pcm_in is
// sampled in that cycle. out changes every clock (out_valid stays high after reset) and is a
// signed 32-bit sample with unity DC gain.
//
// The three-stage sinc^k structure, the 32-bit word and the two end rates follow the
// architecture. The rate factors are chosen so that their product is the required 640. The
// order K = 3, the pull interface and the rounding are this design's choices.
module sinc_interpolator
  import dac_pkg::*;
#(
  parameter int unsigned W  = IN_W,
  parameter int unsigned R1 = 8,
  parameter int unsigned R2 = 8,
  parameter int unsigned R3 = 10,
  parameter int unsigned K  = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] pcm_in,
  output logic                pcm_req,
  output logic signed [W-1:0] dout,
  output logic                out_valid
);
  logic tick0, tick1, tick2;
  logic signed [W-1:0] s1, s2;

  rate_gen #(.R1(R1), .R2(R2), .R3(R3)) u_rate (
    .clk, .rst_n, .tick0, .tick1, .tick2
  );

  cic_interp_stage #(.IN_W(W), .OUT_W(W), .R(R1), .K(K)) u_st1 (
    .clk, .rst_n, .in_tick(tick0), .out_tick(tick1), .din(pcm_in), .dout(s1)
  );
  cic_interp_stage #(.IN_W(W), .OUT_W(W), .R(R2), .K(K)) u_st2 (
    .clk, .rst_n, .in_tick(tick1), .out_tick(tick2), .din(s1), .dout(s2)
  );
  cic_interp_stage #(.IN_W(W), .OUT_W(W), .R(R3), .K(K)) u_st3 (
    .clk, .rst_n, .in_tick(tick2), .out_tick(1'b1), .din(s2), .dout(dout)
  );

  assign pcm_req   = tick0;
  assign out_valid = rst_n;
endmodule
