// Self-checking testbench for the calibrator behavioural model.
//
// A unit_dac_cell with deliberately large mismatch (+2 % on I0, -5 % on I1) is connected to the
// calibrator. With CDS on, after 200 clocks the cell current must equal the reference current
// (5 V - 2.5 V) / 25 kohm = 100 uA within 1 ppm, and the CDS phase must alternate every clock.
// With CDS off the loop must settle to the reference plus the offset error VOS / R_CAL
// (40 nA for 1 mV), showing what the offset cancellation removes. Before calibration the cell
// must be off by its mismatch.
module tb_calibrator;
  localparam real IREF = 2.5 / 25.0e3;
  localparam real VOS = 1.0e-3;
  logic clk = 0, rst_n = 0, start, cds_en, cds_phase;
  real i_cal, vg_out, i_dac, i_dummy, i_cell;
  int checks = 0, failures = 0;

  unit_dac_cell #(.I_UNIT(IREF), .M0(0.02), .M1(-0.05)) u_cell (
    .clk, .rst_n, .on(1'b0), .cal(1'b1), .vg_cal(vg_out), .i_dac, .i_dummy, .i_cal, .i_cell
  );
  calibrator #(.VOS(VOS)) dut (.clk, .rst_n, .start, .cds_en, .i_cal, .vg_out, .cds_phase);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real rel;
  int toggles;
  logic last_phase;

  initial begin
    start = 0; cds_en = 1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    #1;
    rel = (i_cell - IREF) / IREF;
    checks++;
    if (rel < 0.01) begin failures++; $display("FAIL: no initial mismatch %e", rel); end
    start = 1;
    @(negedge clk);
    start = 0;
    toggles = 0;
    last_phase = cds_phase;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      if (cds_phase != last_phase) toggles++;
      last_phase = cds_phase;
    end
    rel = (i_cell - IREF) / IREF;
    $display("CDS on: relative error %e", rel);
    checks++;
    if (rel > 1.0e-6 || rel < -1.0e-6) begin failures++; $display("FAIL: CDS on"); end
    checks++;
    if (toggles < 190) begin failures++; $display("FAIL: CDS phases %0d", toggles); end
    // CDS off: the offset remains
    cds_en = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (200) @(negedge clk);
    rel = (i_cell - IREF - VOS / 25.0e3) / (VOS / 25.0e3);
    $display("CDS off: error current %e A", i_cell - IREF);
    checks++;
    if (rel > 0.01 || rel < -0.01) begin failures++; $display("FAIL: CDS off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
