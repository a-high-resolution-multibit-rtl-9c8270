// Self-checking testbench for sinc_interpolator.
//
// Feeds a sequence of random 32-bit PCM samples on pcm_req, records the 1 MHz output stream, and
// compares it with an independent floating-point model: each stage is written as a direct
// convolution of the zero-stuffed input with the K-fold convolution of an R-sample boxcar,
// divided by R^(K-1). The filter's fixed latency is found by searching a small range of lags;
// at the best lag every sample must agree within 2 LSB (three stages of rounding). Also checked:
// pcm_req comes exactly every R1*R2*R3 clocks, out_valid is high every clock, and a constant
// input comes out exactly unchanged.
module tb_sinc_interpolator;
  localparam int R1 = 8, R2 = 8, R3 = 10, K = 3;
  localparam int TOT = R1 * R2 * R3;
  localparam int NS = 12;           // random samples
  localparam int NDC = 4;           // trailing constant samples
  localparam int NALL = NS + NDC;
  localparam int NOUT = NALL * TOT;

  logic clk = 0, rst_n = 0;
  logic signed [31:0] pcm_in;
  logic pcm_req, out_valid;
  logic signed [31:0] dout;

  int checks = 0, failures = 0;

  sinc_interpolator #(.R1(R1), .R2(R2), .R3(R3), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10 * (NOUT + 3000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x[NALL];
  real y3[];
  longint d[NOUT];

  // Reference stage: y[n] = sum_m in[m] * h[n - m*R] / R^(K-1)
  function automatic void ref_stage(input real xin[], input int r, output real yout[]);
    int hl = K * (r - 1) + 1;
    real h[];
    real t[];
    real g = 1.0;
    h = new[hl];
    for (int i = 0; i < hl; i++) h[i] = 0.0;
    h[0] = 1.0;
    for (int k = 1; k < K; k++) begin
      t = new[hl];
      for (int i = 0; i < hl; i++) begin
        t[i] = 0.0;
        for (int j = 0; j < r; j++) if (i - j >= 0) t[i] += h[i - j];
      end
      h = t;
    end
    // last boxcar
    t = new[hl];
    for (int i = 0; i < hl; i++) begin
      t[i] = 0.0;
      for (int j = 0; j < r; j++) if (i - j >= 0) t[i] += h[i - j];
    end
    h = t;
    for (int k = 1; k < K; k++) g = g * r;
    yout = new[xin.size() * r];
    for (int n = 0; n < yout.size(); n++) begin
      real acc;
      acc = 0.0;
      for (int m = 0; m < xin.size(); m++) begin
        int idx;
        idx = n - m * r;
        if (idx >= 0 && idx < hl) acc += xin[m] * h[idx];
      end
      yout[n] = acc / g;
    end
  endfunction

  int nreq = 0;
  int last_req = -1;
  int cyc = 0;
  int t0 = -1;
  int period_bad = 0;
  int valid_bad = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (!out_valid) valid_bad++;
    if (pcm_req) begin
      if (last_req >= 0 && cyc - last_req != TOT) period_bad++;
      last_req = cyc;
      if (t0 < 0) t0 = cyc;
      nreq++;
    end
    if (t0 >= 0 && cyc - t0 < NOUT) d[cyc - t0] = longint'(dout);
  end

  always_comb pcm_in = (nreq < NALL) ? x[nreq] : x[NALL-1];

  initial begin
    real x0[], y1[], y2[];
    int best_lag;
    real best_err;
    for (int i = 0; i < NS; i++) x[i] = int'($urandom) >>> 1;
    x[0] = 32'sh3fff_0000;
    for (int i = NS; i < NALL; i++) x[i] = -32'sd123456789;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait (t0 >= 0 && cyc - t0 >= NOUT);
    @(posedge clk);
    x0 = new[NALL];
    for (int i = 0; i < NALL; i++) x0[i] = real'(x[i]);
    ref_stage(x0, R1, y1);
    ref_stage(y1, R2, y2);
    ref_stage(y2, R3, y3);
    best_lag = -1;
    best_err = 1.0e30;
    for (int lag = 0; lag < 600; lag++) begin
      real e;
      e = 0.0;
      for (int n = 0; n < NOUT - 600; n++) begin
        real dd;
        dd = real'(d[n + lag]) - y3[n];
        if (dd < 0) dd = -dd;
        if (dd > e) e = dd;
      end
      if (e < best_err) begin best_err = e; best_lag = lag; end
    end
    $display("best lag %0d cycles, max error %f LSB", best_lag, best_err);
    checks++;
    if (best_err > 2.0) begin failures++; $display("FAIL: output differs from reference"); end
    // sample-by-sample count at the best lag
    for (int n = 0; n < NOUT - 600; n += 7) begin
      real dd;
      dd = real'(d[n + best_lag]) - y3[n];
      checks++;
      if (dd > 2.0 || dd < -2.0) failures++;
    end
    // the tail of constant input must come out exactly
    checks++;
    if (d[NOUT-1] != -64'sd123456789) begin
      failures++; $display("FAIL: DC output %0d", d[NOUT-1]);
    end
    checks++;
    if (period_bad != 0 || nreq < NALL) begin failures++; $display("FAIL: pcm_req period"); end
    checks++;
    if (valid_bad != 0) begin failures++; $display("FAIL: out_valid dropped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
