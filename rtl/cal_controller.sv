// Calibration controller: rotates one spare unit source offline and routes the DEM selection.
//
// There are N + 1 = 33 unit current sources but only N = 32 DEM outputs, so one source is
// always offline and connected to the single shared calibrator. The controller keeps the index
// `cal_idx` of that source and moves it to the next source (0, 1, .., N, 0, ..) every CAL_PERIOD
// clocks, so every source is recalibrated once per (N + 1) * CAL_PERIOD clocks. The DEM
// selection is routed around the offline source: DEM output j drives source j when j < cal_idx
// and source j + 1 otherwise, so exactly the selected number of sources is on and the offline
// source is never on.
//
// Interface: sel is the registered DEM selection; cell_on (combinational from sel and cal_idx)
// drives the sources' output switches, cal_sel (one-hot) connects one source to the
// calibrator, and cal_start is high for one clock in the first clock with a new cal_idx. The
// first rotation happens CAL_PERIOD clocks after reset, which starts with source 0 offline.
//
// The 33-source arrangement with one source offline follows the architecture; the rotation
// order, the dwell time CAL_PERIOD and the routing rule are this design's choices.
module cal_controller
  import dac_pkg::*;
#(
  parameter int unsigned N          = N_ELEM,
  parameter int unsigned CAL_PERIOD = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0]           sel,
  output logic [N:0]             cell_on,
  output logic [N:0]             cal_sel,
  output logic [$clog2(N+1)-1:0] cal_idx,
  output logic                   cal_start
);
  localparam int unsigned IW = $clog2(N + 1);
  localparam int unsigned TW = $clog2(CAL_PERIOD);

  logic [TW-1:0] timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer     <= '0;
      cal_idx   <= '0;
      cal_start <= 1'b1;
    end else begin
      cal_start <= 1'b0;
      if (32'(timer) == CAL_PERIOD - 1) begin
        timer     <= '0;
        cal_idx   <= (32'(cal_idx) == N) ? '0 : cal_idx + 1'b1;
        cal_start <= 1'b1;
      end else begin
        timer <= timer + 1'b1;
      end
    end
  end

  always_comb begin
    for (int c = 0; c <= N; c++) begin
      cal_sel[c] = (c == int'(cal_idx));
      if (c < int'(cal_idx))       cell_on[c] = sel[c];
      else if (c == int'(cal_idx)) cell_on[c] = 1'b0;
      else                         cell_on[c] = sel[c-1];
    end
  end

  a_offline_idle: assert property (@(posedge clk) disable iff (!rst_n) (cell_on & cal_sel) == '0);
  a_count:        assert property (@(posedge clk) disable iff (!rst_n)
                                   $countones(cell_on) == $countones(sel));
endmodule
