// Behavioural model (not synthesizable logic) of the shared unit-source calibrator.
//
// The 5 V and 2.5 V references across the calibration resistor R_CAL set a reference current
// I_REF = (5 - 2.5) / R_CAL. The current of the source under calibration, i_cal, is compared
// with it: the difference flows through R_CAL and gives an error voltage at the op-amp input.
// An integrating loop moves the source's adjustable-gate voltage vg_out until the error
// is zero, i.e. until the source delivers I_REF.
//
// The op-amp has an input offset VOS. With correlated double sampling enabled (cds_en), every
// clock alternates between two phases: in the sample phase the op-amp's inputs are shorted and
// its offset is stored on the hold capacitor C_h, and in the amplify phase the stored value is
// subtracted from the error, so the offset drops out. Without CDS the loop settles with an
// error current of VOS / R_CAL.
//
// Interface: start (one clock) restarts the loop for a newly connected source from vg = VG_NOM;
// vg_out updates on rising clk edges (amplify phases only when CDS is on). Currents in amperes,
// voltages in volts, as `real`. The references, the resistor, the single op-amp and CDS at the
// 1 MHz system clock follow the architecture; the integrating loop, its gain KI and the
// numeric values of VOS and VG_NOM are modelling choices.
module calibrator
  import dac_pkg::*;
#(
  parameter real VHI    = VREF_HI,
  parameter real VLO    = VREF_LO,
  parameter real RCAL   = R_CAL,
  parameter real VOS    = 1.0e-3,  // op-amp input offset
  parameter real KI     = 2.0,     // integrator gain per update (V per V of error)
  parameter real VG_NOM = 1.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic cds_en,
  input  real  i_cal,
  output real  vg_out,
  output logic cds_phase   // 1 = amplify phase
);
  real iref, verr, vhold;

  assign iref = (VHI - VLO) / RCAL;

  always_comb verr = (iref - i_cal) * RCAL + VOS - (cds_en ? vhold : 0.0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vg_out    <= VG_NOM;
      vhold     <= 0.0;
      cds_phase <= 1'b0;
    end else if (start) begin
      vg_out    <= VG_NOM;
      cds_phase <= 1'b0;
    end else if (cds_en && !cds_phase) begin
      vhold     <= VOS;        // inputs shorted: only the offset appears
      cds_phase <= 1'b1;
    end else begin
      vg_out    <= vg_out + KI * verr;
      cds_phase <= 1'b0;
    end
  end
endmodule
