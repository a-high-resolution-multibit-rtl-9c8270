// Behavioural model (not synthesizable logic) of the analogue reconstruction low-pass filter.
//
// The summed output current of the unit sources flows into a load resistance R_LOAD shunted by
// a capacitor, a first-order RC low-pass with corner frequency FC. The model is evaluated once
// per clock period TCLK (the DAC's switches change only on clock edges, so the input current is
// constant over a period) with the exact discrete-time step of the RC network:
// v <= v + (i_in * R_LOAD - v) * (1 - exp(-2 pi FC TCLK)).
//
// Interface: i_in in amperes, v_out in volts, both `real`; v_out changes on rising clk edges
// and is 0 after reset. A low-pass filter after the summed DAC output follows the architecture;
// its order, corner frequency and load are modelling choices.
module recon_filter #(
  parameter real R_LOAD = 1.0e3,    // ohms: 32 x 100 uA full scale gives 3.2 V
  parameter real FC     = 100.0,    // Hz
  parameter real TCLK   = 1.0e-6    // s, 1 MHz system clock
) (
  input  logic clk,
  input  logic rst_n,
  input  real  i_in,
  output real  v_out
);
  localparam real PI = 3.14159265358979323846;
  real alpha;

  assign alpha = 1.0 - $exp(-2.0 * PI * FC * TCLK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_out <= 0.0;
    else        v_out <= v_out + (i_in * R_LOAD - v_out) * alpha;
  end
endmodule
