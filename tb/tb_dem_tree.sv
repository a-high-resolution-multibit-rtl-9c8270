// Self-checking testbench for dem_tree.
//
// Drives random codes with random switch bits and compares every selection with a recursive
// reference written in the testbench from the split rule (each block gives floor(x/2) to each
// half and the odd element to the half its bit picks; block i uses bit i-1, children 2i and
// 2i+1). It also checks the one-clock latency and en, that the number of selected elements
// equals the code for every code 0..31, that the same code yields many different selections,
// and that all 32 elements are used about equally often. Finally it gives the elements a fixed
// mismatch of up to +-1 % and averages the resulting output error for each code: with random
// selection that average must lie within 0.005 unit of a straight line through zero (a gain
// error only, no static nonlinearity), whereas always using the lowest elements leaves a bow
// of about 0.04 unit for the same mismatch.
module tb_dem_tree;
  localparam int N = 32;
  localparam int NCYC = 20000;
  logic clk = 0, rst_n = 0, en;
  logic [4:0] code;
  logic [N-2:0] rnd;
  logic [N-1:0] sel;
  int checks = 0, failures = 0;

  dem_tree dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10 * (NCYC + 200));
    failures++;
    $display("watchdog expired");
    begin
      real msum, inl, inl_max, therm, therm_max;
      msum = 0.0;
      foreach (mis[j]) msum += mis[j];
      inl_max = 0.0;
      therm_max = 0.0;
      therm = 0.0;
      for (int c = 1; c < 32; c++) begin
        therm += mis[c - 1];
        inl = err_sum[c] / err_n[c] - real'(c) * msum / N;
        if (inl < 0) inl = -inl;
        if (inl > inl_max) inl_max = inl;
        inl = therm - real'(c) * msum / N;
        if (inl < 0) inl = -inl;
        if (inl > therm_max) therm_max = inl;
      end
      $display("static error per code (units): random selection %f, fixed selection %f",
               inl_max, therm_max);
      checks++;
      if (inl_max > 0.005 || therm_max < 0.02) begin
        failures++; $display("FAIL: mismatch not linearised");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: fill the leaves below heap node i with count x
  function automatic void ref_fill(input int i, input int x, input logic [N-2:0] r,
                                   ref logic [N-1:0] s);
    int h, l;
    if (i >= N) begin
      s[i - N] = (x != 0);
      return;
    end
    h = x / 2 + ((x % 2 == 1) && r[i-1] ? 1 : 0);
    l = x / 2 + ((x % 2 == 1) && !r[i-1] ? 1 : 0);
    ref_fill(2 * i + 1, h, r, s);
    ref_fill(2 * i, l, r, s);
  endfunction

  int use_cnt[N];
  real mis[N];
  real err_sum[32];
  int  err_n[32];
  logic [N-1:0] seen16[$];
  logic [N-1:0] exp_sel, prev;
  logic [N-1:0] tmp;
  int mism, cnt_bad, distinct16;
  longint total_on;

  initial begin
    mism = 0; cnt_bad = 0; total_on = 0;
    foreach (use_cnt[j]) use_cnt[j] = 0;
    // fixed mismatch pattern, +-1 %, with a bow so that a fixed selection is non-linear
    foreach (mis[j]) mis[j] = 0.01 * ($sin(real'(j) * 0.9) + (real'(j) - 15.5) * (real'(j) - 15.5) / 240.0 - 0.35);
    foreach (err_sum[c]) begin err_sum[c] = 0.0; err_n[c] = 0; end
    en = 0; code = 0; rnd = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      en   = (n % 13 != 7);
      code = (n < 64) ? 5'(n % 32) : 5'($urandom);
      rnd  = (N-1)'({$urandom, $urandom});
      prev = sel;
      tmp  = '0;
      ref_fill(1, int'(code), rnd, tmp);
      exp_sel = en ? tmp : prev;
      @(posedge clk);
      #1;
      checks++;
      if (sel !== exp_sel) begin
        mism++;
        if (mism < 5) $display("FAIL n=%0d code=%0d got %h exp %h", n, code, sel, exp_sel);
      end
      if (en) begin
        checks++;
        if ($countones(sel) != int'(code)) cnt_bad++;
        for (int j = 0; j < N; j++) use_cnt[j] += int'(sel[j]);
        begin
          real e;
          e = 0.0;
          for (int j = 0; j < N; j++) if (sel[j]) e += mis[j];
          err_sum[code] += e;
          err_n[code]++;
        end
        total_on += $countones(sel);
        if (code == 16 && seen16.size() < 400) begin
          bit found;
          found = 0;
          foreach (seen16[k]) if (seen16[k] == sel) found = 1;
          if (!found) seen16.push_back(sel);
        end
      end
    end
    failures += mism + cnt_bad;
    distinct16 = seen16.size();
    $display("distinct selections seen for code 16: %0d", distinct16);
    checks++;
    if (distinct16 < 100) begin failures++; $display("FAIL: selection not random"); end
    for (int j = 0; j < N; j++) begin
      real ratio;
      ratio = real'(use_cnt[j]) * N / real'(total_on);
      checks++;
      if (ratio < 0.95 || ratio > 1.05) begin
        failures++; $display("FAIL: element %0d used %f of its share", j, ratio);
      end
    end
    begin
      real msum, inl, inl_max, therm, therm_max;
      msum = 0.0;
      foreach (mis[j]) msum += mis[j];
      inl_max = 0.0;
      therm_max = 0.0;
      therm = 0.0;
      for (int c = 1; c < 32; c++) begin
        therm += mis[c - 1];
        inl = err_sum[c] / err_n[c] - real'(c) * msum / N;
        if (inl < 0) inl = -inl;
        if (inl > inl_max) inl_max = inl;
        inl = therm - real'(c) * msum / N;
        if (inl < 0) inl = -inl;
        if (inl > therm_max) therm_max = inl;
      end
      $display("static error per code (units): random selection %f, fixed selection %f",
               inl_max, therm_max);
      checks++;
      if (inl_max > 0.005 || therm_max < 0.02) begin
        failures++; $display("FAIL: mismatch not linearised");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
