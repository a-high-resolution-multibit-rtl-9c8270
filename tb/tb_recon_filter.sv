// Self-checking testbench for the recon_filter behavioural model.
//
// Applies a current step and compares the output each clock with the closed-form response of a
// first-order RC low-pass sampled every TCLK, v[n] = I R (1 - exp(-2 pi FC TCLK n)); then
// removes the input and checks the decay. The corner frequency is raised to 10 kHz to keep the
// run short.
module tb_recon_filter;
  localparam real R = 1.0e3, FC = 1.0e4, T = 1.0e-6, PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  real i_in, v_out, expv, v0;
  int checks = 0, failures = 0;

  recon_filter #(.R_LOAD(R), .FC(FC), .TCLK(T)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i_in = 0.0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    i_in = 2.0e-3;
    for (int n = 1; n <= 500; n++) begin
      @(posedge clk); #1;
      expv = 2.0e-3 * R * (1.0 - $exp(-2.0 * PI * FC * T * n));
      checks++;
      if (v_out - expv > 1.0e-9 || v_out - expv < -1.0e-9) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d v=%f exp=%f", n, v_out, expv);
      end
    end
    @(negedge clk);
    v0 = v_out;
    i_in = 0.0;
    for (int n = 1; n <= 200; n++) begin
      @(posedge clk); #1;
      expv = v0 * $exp(-2.0 * PI * FC * T * n);
      checks++;
      if (v_out - expv > 1.0e-9 || v_out - expv < -1.0e-9) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
