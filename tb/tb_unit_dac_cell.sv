// Self-checking testbench for the unit_dac_cell behavioural model.
//
// Checks that the cell current goes to exactly one of the three paths for every on/cal
// combination, that the current at the nominal gate voltage is I0 + I1 with the given mismatch,
// that the gate voltage follows vg_cal while cal is high and is held after cal falls, and that
// the current changes linearly with it (10 % of the unit current per VG_NOM).
module tb_unit_dac_cell;
  localparam real IU = 100.0e-6, M0 = 0.01, M1 = -0.02;
  logic clk = 0, rst_n = 0, on, cal;
  real vg_cal, i_dac, i_dummy, i_cal, i_cell;
  int checks = 0, failures = 0;

  unit_dac_cell #(.I_UNIT(IU), .VG_NOM(1.0), .M0(M0), .M1(M1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(real a, real b);
    real d;
    d = a - b;
    if (d < 0) d = -d;
    return d < 1.0e-12;
  endfunction

  task automatic check(string what, real got, real exp);
    checks++;
    if (!near(got, exp)) begin
      failures++;
      $display("FAIL %s: got %e exp %e", what, got, exp);
    end
  endtask

  real inom;

  initial begin
    on = 0; cal = 0; vg_cal = 0.0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    inom = 0.9 * IU * (1.0 + M0) + 0.1 * IU * (1.0 + M1);
    for (int k = 0; k < 4; k++) begin
      on = k[0]; cal = k[1];
      #1;
      check("cell", i_cell, inom);
      check("dac", i_dac, (on && !cal) ? inom : 0.0);
      check("dummy", i_dummy, (!on && !cal) ? inom : 0.0);
      check("cal", i_cal, cal ? inom : 0.0);
      check("sum", i_dac + i_dummy + i_cal, inom);
    end
    // gate follows vg_cal while cal is high
    cal = 1; vg_cal = 1.5;
    @(posedge clk); #1;
    check("tracked", i_cell, 0.9 * IU * (1.0 + M0) + 0.1 * IU * (1.0 + M1) * 1.5);
    @(negedge clk);
    cal = 0; vg_cal = 0.2;
    repeat (3) @(posedge clk);
    #1;
    check("held", i_cell, 0.9 * IU * (1.0 + M0) + 0.1 * IU * (1.0 + M1) * 1.5);
    on = 1; #1;
    check("held dac", i_dac, 0.9 * IU * (1.0 + M0) + 0.1 * IU * (1.0 + M1) * 1.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
