// Rate strobe generator for the interpolation chain.
//
// Three nested counters (modulo R3, R2 and R1) give the clock enables of every rate in the
// chain: tick2 every R3 clocks, tick1 every R2*R3 clocks and tick0, the PCM input rate, every
// R1*R2*R3 clocks. The last stage of the chain runs on every clock. All ticks are high together
// when the counters wrap, so a new input sample and the first output sample of every stage line
// up. Ticks are decoded from registered counters; there is no latency other than that. Running
// everything in the one 1 MHz clock domain with clock enables is this design's choice.
module rate_gen #(
  parameter int unsigned R1 = 8,
  parameter int unsigned R2 = 8,
  parameter int unsigned R3 = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick0,  // PCM input rate
  output logic tick1,  // rate after stage 1
  output logic tick2   // rate after stage 2
);
  logic [$clog2(R1)-1:0] c1;
  logic [$clog2(R2)-1:0] c2;
  logic [$clog2(R3)-1:0] c3;

  assign tick2 = (c3 == '0);
  assign tick1 = tick2 && (c2 == '0);
  assign tick0 = tick1 && (c1 == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= '0;
      c2 <= '0;
      c3 <= '0;
    end else begin
      c3 <= (32'(c3) == R3 - 1) ? '0 : c3 + 1'b1;
      if (32'(c3) == R3 - 1) begin
        c2 <= (32'(c2) == R2 - 1) ? '0 : c2 + 1'b1;
        if (32'(c2) == R2 - 1)
          c1 <= (32'(c1) == R1 - 1) ? '0 : c1 + 1'b1;
      end
    end
  end
endmodule
