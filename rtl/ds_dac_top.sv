// Multibit delta-sigma DAC: 32-bit PCM in, 33 calibrated unit current sources out.
//
// Data path, all on the 1 MHz system clock:
//   sinc_interpolator  raises the 32-bit PCM input from 1.5625 kHz to 1 MHz (x640, three
//                      sinc^3 stages) and pulls each PCM sample with pcm_req;
//   dsm2_modulator     second-order noise shaping down to a 5-bit (32-level) code;
//   dem_tree           randomised DEM: picks which `code` of the 32 unit elements are on, using
//                      31 fresh bits per clock from lfsr_rng (41-bit maximal-length LFSR);
//   cal_controller     keeps one of the 33 unit sources offline for calibration, rotating
//                      every CAL_PERIOD clocks, and routes the 32 DEM outputs to the others;
//   unit_dac_cell x33  behavioural current sources with static mismatch and a trimmable part;
//   calibrator         behavioural, shared, trims the offline source to I_REF, with CDS;
//   recon_filter       behavioural first-order RC low-pass on the summed output current.
//
// Latency from a PCM sample to the current sources is fixed: interpolator, then one clock in
// the modulator and one in the DEM register. i_out is the sum of the currents the switched-on
// sources deliver to the output node, i_dummy_sum what the others send to the dummy path,
// v_out the filtered output voltage, and cds_phase the calibrator's CDS phase. The mismatch of
// source c is a fixed spread of +-MISMATCH (c * 37 mod 33 spread evenly), so runs are
// repeatable. The block structure follows the architecture; see each block for its own choices.
module ds_dac_top
  import dac_pkg::*;
#(
  parameter int unsigned CAL_PERIOD = 1024,
  parameter real         MISMATCH   = 0.005,   // peak relative mismatch of I0 and of I1
  parameter real         VOS        = 1.0e-3   // calibrator op-amp offset
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] pcm_in,
  input  logic                   cds_en,
  output logic                   pcm_req,
  output logic [Q_BITS-1:0]      code,
  output logic                   sat,
  output logic [N_CELLS-1:0]     cell_on,
  output logic [$clog2(N_CELLS)-1:0] cal_idx,
  output logic                   cds_phase,
  output real                    i_out,
  output real                    i_dummy_sum,
  output real                    v_out
);
  logic signed [IN_W-1:0] interp;
  logic                   interp_valid;
  logic [N_ELEM-2:0]      rnd;
  logic [N_ELEM-1:0]      sel;
  logic [N_CELLS-1:0]     cal_sel;
  logic                   cal_start;
  real                    vg_cal;
  real                    i_cal_total;
  real                    i_dac   [N_CELLS];
  real                    i_dummy [N_CELLS];
  real                    i_cal   [N_CELLS];

  sinc_interpolator u_interp (
    .clk, .rst_n, .pcm_in, .pcm_req, .dout(interp), .out_valid(interp_valid)
  );

  dsm2_modulator u_dsm (
    .clk, .rst_n, .en(interp_valid), .din(interp), .code, .sat
  );

  lfsr_rng u_lfsr (
    .clk, .rst_n, .en(1'b1), .rnd
  );

  dem_tree u_dem (
    .clk, .rst_n, .en(1'b1), .code, .rnd, .sel
  );

  cal_controller #(.CAL_PERIOD(CAL_PERIOD)) u_calctl (
    .clk, .rst_n, .sel, .cell_on, .cal_sel, .cal_idx, .cal_start
  );

  for (genvar c = 0; c < N_CELLS; c++) begin : g_cell
    localparam real SPREAD = (real'((c * 37) % N_CELLS) / real'(N_CELLS - 1)) * 2.0 - 1.0;
    unit_dac_cell #(
      .M0(MISMATCH * SPREAD),
      .M1(-MISMATCH * SPREAD)
    ) u_cell (
      .clk, .rst_n,
      .on     (cell_on[c]),
      .cal    (cal_sel[c]),
      .vg_cal (vg_cal),
      .i_dac  (i_dac[c]),
      .i_dummy(i_dummy[c]),
      .i_cal  (i_cal[c]),
      .i_cell ()
    );
  end

  always_comb begin
    i_out       = 0.0;
    i_dummy_sum = 0.0;
    i_cal_total = 0.0;
    for (int c = 0; c < N_CELLS; c++) begin
      i_out       = i_out + i_dac[c];
      i_dummy_sum = i_dummy_sum + i_dummy[c];
      i_cal_total = i_cal_total + i_cal[c];
    end
  end

  calibrator #(.VOS(VOS)) u_cal (
    .clk, .rst_n, .start(cal_start), .cds_en, .i_cal(i_cal_total), .vg_out(vg_cal), .cds_phase
  );

  recon_filter u_lpf (
    .clk, .rst_n, .i_in(i_out), .v_out
  );
endmodule
