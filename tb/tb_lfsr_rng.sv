// Self-checking testbench for lfsr_rng.
//
// A bit-serial reference LFSR in the testbench, written from the polynomial
// x^41 + x^38 + 1 and the same seed, is stepped 31 times per enabled clock and every
// output word is compared with it. It also checks that en low freezes the output, that the bits
// are balanced (ones fraction within 1 % of one half) and, on a 5-bit version of the generator
// (polynomial x^5 + x^3 + 1, one step per clock), that the period is exactly 2^5 - 1.
module tb_lfsr_rng;
  localparam int NB = 31;
  localparam int NCYC = 20000;
  logic clk = 0, rst_n = 0, en;
  logic [NB-1:0] rnd;
  logic [4:0] rnd5;
  int checks = 0, failures = 0;

  lfsr_rng dut (.clk, .rst_n, .en, .rnd);
  lfsr_rng #(.W(5), .NBITS(5), .TAPS(5'b10100), .SEED(5'b00001)) dut5 (
    .clk, .rst_n, .en(1'b1), .rnd(rnd5)
  );

  always #5 clk = ~clk;

  initial begin
    #(10 * (NCYC + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [40:0] ref_s;
  logic [NB-1:0] exp_w, prev;
  longint ones;

  function automatic logic ref_step(ref logic [40:0] s);
    logic fb;
    fb = s[40] ^ s[37];
    s  = {s[39:0], fb};
    return fb;
  endfunction

  initial begin
    ref_s = 41'h00A5_C3E1_9B27;
    ones = 0;
    en = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      en = (n % 11 != 3);
      prev = rnd;
      @(posedge clk);
      #1;
      if (en) begin
        for (int i = 0; i < NB; i++) exp_w[i] = ref_step(ref_s);
        checks++;
        if (rnd !== exp_w) begin
          failures++;
          if (failures < 5) $display("FAIL n=%0d got %h exp %h", n, rnd, exp_w);
        end
        ones += $countones(rnd);
      end else begin
        checks++;
        if (rnd !== prev) failures++;
      end
    end
    begin
      real frac;
      frac = real'(ones) / (real'(NB) * real'(NCYC - NCYC / 11));
      $display("ones fraction %f", frac);
      checks++;
      if (frac < 0.49 || frac > 0.51) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Period of the 5-bit generator: its internal state must return to the seed after 31 clocks
  // and not earlier.
  initial begin
    logic [4:0] first;
    int period;
    @(posedge rst_n);
    @(posedge clk); #2;
    first = dut5.state;
    period = 0;
    do begin
      @(posedge clk); #2;
      period++;
    end while (dut5.state != first && period < 100);
    checks++;
    // NBITS = 5 steps per clock and gcd(5, 31) = 1, so the state period is 31 clocks.
    if (period != 31) begin failures++; $display("FAIL: 5-bit period %0d", period); end
  end
endmodule
