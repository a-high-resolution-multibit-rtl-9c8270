// Self-checking testbench for dsm2_modulator.
//
// Drives random inputs (a slow random walk, occasional steps beyond the limiter range) and checks
// the noise-shaping identity independently of the modulator's internals: with d = u - y 2^27,
// where u is the input after the testbench's own clamp, the double running sum of d equals the
// quantisation error and must stay in [0, 2^27) for every sample. It also checks the one-clock
// latency, the sat flag against the clamp, that a constant input gives a code average equal to
// the input, and that the limiter was exercised.
module tb_dsm2_modulator;
  localparam int W = 32, QB = 5, S = W - QB;
  localparam longint UMAX = (64'sd1 <<< 31) - (64'sd1 <<< 28);
  localparam longint UMIN = -(64'sd1 <<< 31) + (64'sd1 <<< 27);
  localparam int NCYC = 40000;

  logic clk = 0, rst_n = 0, en;
  logic signed [W-1:0] din;
  logic [QB-1:0] code;
  logic sat;
  int checks = 0, failures = 0;

  dsm2_modulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10 * (NCYC + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint a1, a2, u_prev, ulim;
  int nsat, sat_bad, idle_bad;
  longint dc_sum;
  longint walk;

  initial begin
    a1 = 0; a2 = 0; nsat = 0; sat_bad = 0; idle_bad = 0; dc_sum = 0;
    en = 1;
    din = 0;
    walk = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NCYC; n++) begin
      // choose the input for this cycle
      if (n < 30000) begin
        walk += longint'($signed($urandom)) >>> 6;
        if (walk > 64'sh7fff_ffff) walk = 64'sh7fff_ffff;
        if (walk < -64'sh8000_0000) walk = -64'sh8000_0000;
        din = (n % 1000 < 20) ? ((n % 2000 < 1000) ? 32'sh7fff_ffff : 32'sh8000_0000) : W'(walk);
      end else begin
        din = 32'sd300_000_007;     // constant: check the average
      end
      en = (n % 17 != 5);           // a few idle cycles
      ulim = longint'(din);
      if (ulim > UMAX) ulim = UMAX;
      if (ulim < UMIN) ulim = UMIN;
      @(posedge clk);
      #1;
      if (en) begin
        longint y;
        y = longint'(code) - 16;
        a1 += ulim - (y <<< S);
        a2 += a1;
        checks++;
        if (a2 < 0 || a2 >= (64'sd1 <<< S)) begin
          failures++;
          if (failures < 5) $display("FAIL n=%0d: error state %0d out of range", n, a2);
        end
        if (sat != (ulim != longint'(din))) sat_bad++;
        if (sat) nsat++;
        if (n >= 30000) dc_sum += y <<< S;
      end else begin
        if (code != u_prev[QB-1:0]) idle_bad++;
      end
      u_prev = longint'(code);
    end
    checks++;
    if (sat_bad != 0) begin failures++; $display("FAIL: sat flag wrong %0d times", sat_bad); end
    checks++;
    if (idle_bad != 0) begin failures++; $display("FAIL: output changed without en"); end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL: limiter never engaged"); end
    begin
      real avg;
      int n_en;
      n_en = 0;
      for (int n = 30000; n < NCYC; n++) if (n % 17 != 5) n_en++;
      avg = real'(dc_sum) / real'(n_en);
      $display("DC input 300000007, average output %f, limiter engaged %0d times", avg, nsat);
      checks++;
      if (avg - 300000007.0 > 2.0e5 || avg - 300000007.0 < -2.0e5) begin
        failures++; $display("FAIL: average");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
