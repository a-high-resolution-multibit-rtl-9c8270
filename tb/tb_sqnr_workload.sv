// Workload testbench: in-band quantisation noise of the converter's digital path.
//
// Drives ds_dac_top at its default parameters with a 10 Hz sine at -6 dBFS (amplitude 2^30 of a
// 2^31 full scale), the top of the 0.001-10 Hz signal band and the amplitude of the 140 dB SQNR
// target, as 32-bit PCM at 1.5625 kHz, for 0.3 s (300,000 clocks, three signal periods).
// It compares the modulator's output (code - 16) * 2^27 with the modulator's input, the
// interpolated 1 MHz signal, and passes the difference through a sinc^3 low-pass of length
// 8192 (3 dB corner near 54 Hz, so the measurement band is wider than the 10 Hz signal band and
// the result is pessimistic). The ratio of the sine's power to the power of the filtered
// difference is the in-band signal-to-quantisation-noise ratio; it must exceed 140 dB.
module tb_sqnr_workload;
  localparam int  NCYC = 300_000;
  localparam int  L = 8192;
  localparam real PI = 3.14159265358979323846;
  localparam real AMP = 1073741824.0;   // 2^30

  logic clk = 0, rst_n = 0, cds_en = 1;
  logic signed [31:0] pcm_in = 0;
  logic pcm_req, sat, cds_phase;
  logic [4:0] code;
  logic [32:0] cell_on;
  logic [5:0] cal_idx;
  real i_out, i_dummy_sum, v_out;
  int checks = 0, failures = 0;

  ds_dac_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10 * (NCYC + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int k = 0;
  always @(negedge clk) if (pcm_req) begin
    pcm_in <= 32'($rtoi(AMP * $sin(2.0 * PI * 10.0 * real'(k) / 1562.5)));
    k <= k + 1;
  end

  // three cascaded running sums of length L (sinc^3), in exact integer arithmetic
  longint hist1[L], hist2[L], hist3[L];
  longint s1, s2, s3;
  real err_pow;
  int  n_err, n_sat;

  initial begin
    longint d;
    int p;
    real f;
    s1 = 0; s2 = 0; s3 = 0; err_pow = 0.0; n_err = 0; n_sat = 0;
    for (int i = 0; i < L; i++) begin hist1[i] = 0; hist2[i] = 0; hist3[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NCYC; t++) begin
      // modulator input this clock and the code it produces one clock later
      d = longint'(dut.u_dsm.din);
      @(posedge clk);
      #1;
      if (sat) n_sat++;
      d = d - ((longint'(code) - 16) <<< 27);
      p = t % L;
      s1 += d - hist1[p];       hist1[p] = d;
      s2 += s1 - hist2[p];      hist2[p] = s1;
      s3 += s2 - hist3[p];      hist3[p] = s2;
      if (t >= 40_000) begin    // after the interpolator and filter have filled
        f = real'(s3) / (real'(L) * real'(L) * real'(L));
        err_pow += f * f;
        n_err++;
      end
    end
    begin
      real sig_pow, sqnr;
      sig_pow = AMP * AMP / 2.0;
      err_pow = err_pow / n_err;
      if (err_pow <= 0.0) sqnr = 400.0;
      else sqnr = 10.0 * $log10(sig_pow / err_pow);
      $display("in-band error rms %f LSB of 2^31 full scale; SQNR %f dB (target 140 dB)",
               $sqrt(err_pow), sqnr);
      checks++;
      if (sqnr < 140.0) begin failures++; $display("FAIL: SQNR below 140 dB"); end
      checks++;
      if (n_sat != 0) begin failures++; $display("FAIL: -6 dBFS input hit the limiter"); end
      checks++;
      if (k < NCYC / 640 - 1) begin failures++; $display("FAIL: PCM samples %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
