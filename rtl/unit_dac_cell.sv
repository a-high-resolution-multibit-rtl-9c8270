// Behavioural model (not synthesizable logic) of one unit current source of the DAC array.
//
// The cell is the sum of a fixed source I0, nominally 90 % of the unit current, and an
// adjustable source whose current is set by the voltage on its gate, which a hold capacitor
// keeps between calibrations. Both parts carry a static mismatch (M0, M1, relative). The output
// switches steer the whole cell current to one of three paths so that the source stays biased
// when it is not in use: the DAC output (on = 1), the calibrator (cal = 1, which takes priority)
// or the dummy path (neither).
//
// Interface: currents are in amperes, voltages in volts, as `real`. While cal is high the gate
// voltage follows vg_cal, sampled on each rising clk edge; when cal falls the last value is
// held. After reset the gate sits at VG_NOM. Outputs follow the inputs without delay. The
// 90 % / 10 % split and the three current paths follow the architecture; the linear gate-voltage
// law, VG_NOM and the sampled hold are modelling choices.
module unit_dac_cell
  import dac_pkg::*;
#(
  parameter real I_UNIT = I_REF,   // nominal unit current
  parameter real VG_NOM = 1.0,     // gate voltage giving the nominal 10 % adjustable current
  parameter real M0     = 0.0,     // relative mismatch of the fixed source
  parameter real M1     = 0.0      // relative mismatch of the adjustable source
) (
  input  logic clk,
  input  logic rst_n,
  input  logic on,
  input  logic cal,
  input  real  vg_cal,
  output real  i_dac,
  output real  i_dummy,
  output real  i_cal,
  output real  i_cell
);
  real vg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   vg <= VG_NOM;
    else if (cal) vg <= vg_cal;
  end

  always_comb begin
    i_cell  = 0.9 * I_UNIT * (1.0 + M0) + 0.1 * I_UNIT * (1.0 + M1) * (vg / VG_NOM);
    i_cal   = cal ? i_cell : 0.0;
    i_dac   = (!cal && on) ? i_cell : 0.0;
    i_dummy = (!cal && !on) ? i_cell : 0.0;
  end
endmodule
