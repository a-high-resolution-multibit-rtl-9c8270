// Shared constants of the multibit delta-sigma DAC.
//
// The input word is 32 bits, the modulator quantizes to 5 bits (32 levels), the DEM network
// drives 32 unit current sources and one more source is kept spare so that the single
// calibrator can always have one offline. The system clock is 1 MHz and the PCM input arrives
// at 1.5625 kHz, so the interpolator must raise the rate by 640 = 8 * 8 * 10. These numbers
// follow the architecture; the LFSR width (41) and its taps are this design's choice of a
// maximal-length register "of at least 40 bits".
package dac_pkg;
  localparam int unsigned IN_W       = 32;  // PCM / interpolator word
  localparam int unsigned Q_BITS     = 5;   // quantizer width
  localparam int unsigned N_ELEM     = 32;  // unit elements driven by the DEM network
  localparam int unsigned N_CELLS    = N_ELEM + 1;  // plus one spare for calibration
  localparam int unsigned OSR_TOTAL  = 640; // 1 MHz / 1.5625 kHz
  localparam int unsigned LFSR_W     = 41;
  localparam int unsigned DEM_RBITS  = N_ELEM - 1;  // one random bit per tree switch

  // Unit-current scale used by the analogue behavioural models (amperes, volts, ohms).
  localparam real VREF_HI   = 5.0;
  localparam real VREF_LO   = 2.5;
  localparam real R_CAL     = 25.0e3;
  localparam real I_REF     = (VREF_HI - VREF_LO) / R_CAL;  // 100 uA unit current
endpackage
