// End-to-end testbench for ds_dac_top at its default parameters.
//
// Plays 70 PCM samples (44,800 clocks of 1 MHz, 44.8 ms): 20 samples at +0.25 of full scale,
// 5 over-range samples at +full scale (the modulator's limiter must engage), then -0.5 of full
// scale. This covers one whole calibration rotation over the 33 unit sources (33 x 1024 clocks).
// Checked against values worked out here, not taken from the design:
//   - pcm_req comes every 640 clocks;
//   - the number of sources switched on equals the previous clock's code, and the offline
//     source is never on;
//   - the average code over the +0.25 segment is 16 + 0.25 * 16 = 20;
//   - with the offline source fixed, the same code gives many different source selections
//     (randomised DEM);
//   - every source is taken offline once; before its calibration the output current shows the
//     mismatch, after the whole rotation i_out is the number of sources on times
//     I_REF = 2.5 V / 25 kohm within 1 ppm, and i_out + i_dummy_sum is 32 * I_REF;
//   - the filtered output settles to 8 * I_REF * 1 kohm = 0.8 V for the -0.5 segment;
//   - the CDS phase alternates.
// Each of these mechanisms is counted and must have happened at least once.
module tb_ds_dac_top;
  localparam int  NPCM = 70;
  localparam int  NCYC = NPCM * 640;
  localparam real IREF = 2.5 / 25.0e3;

  logic clk = 0, rst_n = 0, cds_en;
  logic signed [31:0] pcm_in;
  logic pcm_req, sat, cds_phase;
  logic [4:0] code;
  logic [32:0] cell_on;
  logic [5:0] cal_idx;
  real i_out, i_dummy_sum, v_out;
  int checks = 0, failures = 0;

  ds_dac_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10 * (NCYC + 2000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [31:0] pcm_value(int k);
    if (k < 20) return 32'sh2000_0000;        // +0.25 FS
    else if (k < 25) return 32'sh7fff_ffff;   // over range
    else return -32'sh4000_0000;              // -0.5 FS
  endfunction

  int nreq = 0;
  always @(negedge clk) if (pcm_req) begin
    pcm_in <= pcm_value(nreq);
    nreq <= nreq + 1;
  end

  // mechanism counters
  int n_req_ok, n_req_bad, n_sat, n_cal_rot, n_cds, n_mismatch, n_cnt_bad, n_off_bad;
  int n_iout_bad, n_sum_bad;
  int visited[33];
  logic [32:0] seen20[$];
  longint code_sum;
  int code_n;
  real vsum;
  int vn;

  initial begin
    int last_req;
    logic [4:0] prev_code;
    logic [5:0] prev_idx;
    logic prev_phase;
    int nvisit;
    n_req_ok = 0; n_req_bad = 0; n_sat = 0; n_cal_rot = 0; n_cds = 0; n_mismatch = 0;
    n_cnt_bad = 0; n_off_bad = 0; n_iout_bad = 0; n_sum_bad = 0;
    code_sum = 0; code_n = 0; vsum = 0.0; vn = 0;
    foreach (visited[c]) visited[c] = 0;
    cds_en = 1;
    pcm_in = pcm_value(0);
    last_req = -1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    prev_code = code;
    prev_idx = cal_idx;
    prev_phase = cds_phase;
    for (int t = 0; t < NCYC; t++) begin
      @(posedge clk);
      #1;
      if (pcm_req) begin
        if (last_req >= 0) begin
          if (t - last_req == 640) n_req_ok++; else n_req_bad++;
        end
        last_req = t;
      end
      if (sat) n_sat++;
      if (cds_phase != prev_phase) n_cds++;
      if (cal_idx != prev_idx) n_cal_rot++;
      visited[cal_idx] = 1;
      // DEM: as many sources on as the previous code; offline source off
      checks++;
      if ($countones(cell_on) != int'(prev_code)) n_cnt_bad++;
      if (cell_on[cal_idx]) n_off_bad++;
      if (code == 5'd20 && cal_idx == 6'd3 && seen20.size() < 200) begin
        bit found;
        found = 0;
        foreach (seen20[k]) if (seen20[k] == cell_on) found = 1;
        if (!found) seen20.push_back(cell_on);
      end
      // average code during the +0.25 FS segment (well after the interpolator settles)
      if (t >= 3000 && t < 12000) begin
        code_sum += longint'(code);
        code_n++;
      end
      // output current against the ideal unit current
      begin
        real ideal, err;
        ideal = real'($countones(cell_on)) * IREF;
        err = i_out - ideal;
        if (err < 0) err = -err;
        if (t < 16 * 1024 && err > 1.0e-3 * IREF) n_mismatch++;
        if (t > 34 * 1024) begin
          checks++;
          if (err > 1.0e-6 * IREF * 32) n_iout_bad++;
          err = i_out + i_dummy_sum - 32.0 * IREF;
          if (err < 0) err = -err;
          checks++;
          if (err > 1.0e-6 * IREF * 32) n_sum_bad++;
        end
      end
      if (t >= NCYC - 2000) begin
        vsum += v_out;
        vn++;
      end
      prev_code = code;
      prev_idx = cal_idx;
      prev_phase = cds_phase;
    end

    nvisit = 0;
    foreach (visited[c]) nvisit += visited[c];
    $display("pcm requests ok=%0d bad=%0d", n_req_ok, n_req_bad);
    $display("limiter engaged %0d clocks; calibration rotations %0d; sources visited %0d",
             n_sat, n_cal_rot, nvisit);
    $display("CDS phase changes %0d; clocks with visible mismatch before calibration %0d",
             n_cds, n_mismatch);
    $display("distinct selections for code 20 with source 3 offline: %0d", seen20.size());
    $display("average code %f (expect 20), final v_out %f V (expect 0.8)",
             real'(code_sum) / code_n, vsum / vn);

    failures += n_cnt_bad + n_off_bad + n_iout_bad + n_sum_bad + n_req_bad;
    if (n_cnt_bad != 0) $display("FAIL: source count != code %0d times", n_cnt_bad);
    if (n_off_bad != 0) $display("FAIL: offline source on %0d times", n_off_bad);
    if (n_iout_bad != 0) $display("FAIL: i_out not calibrated %0d times", n_iout_bad);
    if (n_sum_bad != 0) $display("FAIL: current not conserved %0d times", n_sum_bad);
    checks++; if (n_req_ok < NPCM - 2) begin failures++; $display("FAIL: pcm requests"); end
    checks++; if (n_sat == 0) begin failures++; $display("FAIL: limiter never engaged"); end
    checks++; if (n_cal_rot < 33 || nvisit != 33) begin failures++; $display("FAIL: rotation"); end
    checks++; if (n_cds == 0) begin failures++; $display("FAIL: CDS never ran"); end
    checks++; if (n_mismatch == 0) begin failures++; $display("FAIL: no mismatch seen"); end
    checks++; if (seen20.size() < 20) begin failures++; $display("FAIL: DEM not random"); end
    checks++;
    if (real'(code_sum) / code_n < 19.99 || real'(code_sum) / code_n > 20.01) begin
      failures++; $display("FAIL: average code");
    end
    checks++;
    if (vsum / vn < 0.796 || vsum / vn > 0.804) begin failures++; $display("FAIL: v_out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
