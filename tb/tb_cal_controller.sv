// Self-checking testbench for cal_controller.
//
// Runs with a short dwell time (CAL_PERIOD = 16) for several full rotations. Every clock it
// builds the expected source enables from the testbench's own count of the offline index
// (starting at 0 and advancing every 16 clocks) and compares cell_on, cal_sel, cal_idx and
// cal_start with it. It also counts that every one of the 33 sources was taken offline.
module tb_cal_controller;
  localparam int N = 32, P = 16;
  localparam int NCYC = P * (N + 1) * 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] sel;
  logic [N:0] cell_on, cal_sel;
  logic [5:0] cal_idx;
  logic cal_start;
  int checks = 0, failures = 0;

  cal_controller #(.N(N), .CAL_PERIOD(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10 * (NCYC + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int off, visited[N+1], nvisit;
  logic [N:0] exp_on, exp_cal;
  logic exp_start;

  initial begin
    foreach (visited[c]) visited[c] = 0;
    sel = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NCYC; n++) begin
      // n clocks have passed since reset was released
      off = (n / P) % (N + 1);
      exp_start = (n % P == 0);
      sel = {$urandom};
      #1;
      exp_on = '0;
      exp_cal = '0;
      exp_cal[off] = 1'b1;
      for (int j = 0; j < N; j++)
        if (sel[j]) exp_on[(j < off) ? j : j + 1] = 1'b1;
      checks++;
      if (cell_on !== exp_on || cal_sel !== exp_cal || int'(cal_idx) != off ||
          cal_start !== exp_start) begin
        failures++;
        if (failures < 5)
          $display("FAIL n=%0d off=%0d idx=%0d on=%h exp=%h start=%b", n, off, cal_idx,
                   cell_on, exp_on, cal_start);
      end
      visited[int'(cal_idx) % (N + 1)] = 1;
      @(negedge clk);
    end
    nvisit = 0;
    foreach (visited[c]) nvisit += visited[c];
    checks++;
    if (nvisit != N + 1) begin failures++; $display("FAIL: %0d sources visited", nvisit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
