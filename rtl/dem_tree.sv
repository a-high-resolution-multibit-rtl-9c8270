// Fully randomised dynamic element matching (DEM) switching network.
//
// The modulator's code says how many of the N unit current sources must be on; this network
// decides which. It is a binary tree of N - 1 switching blocks (dem_switch) in log2(N) layers:
// the root receives the code, every block splits its count between its two halves, sending the
// odd element, if any, to the half chosen by its own random bit, and the N leaves are the
// element selections. The number of selected elements always equals the code, while the choice
// of elements is random and uncorrelated with the signal, so static mismatch between the unit
// sources turns into white noise instead of harmonic spurs.
//
// Interface: code (0 .. 2^QB - 1, at most N) and the N - 1 random bits rnd are taken when en is
// high; block i of the tree in heap order (root 1, children 2i and 2i+1) uses rnd[i-1]. sel is
// registered: it holds the selection one clock after the code.
//
// A tree of switches steered by random bits that expands the 5-bit code into a 32-wide selection
// follows the architecture; the split rule of each block is this design's choice of the
// simplest rule that does that.
module dem_tree
  import dac_pkg::*;
#(
  parameter int unsigned N  = N_ELEM,
  parameter int unsigned QB = Q_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [QB-1:0] code,
  input  logic [N-2:0]  rnd,
  output logic [N-1:0]  sel
);
  localparam int unsigned CW = $clog2(N) + 1;

  // node[1] is the root, node[N .. 2N-1] are the leaves
  logic [CW-1:0] node [1:2*N-1];

  assign node[1] = CW'(code);

  for (genvar i = 1; i < N; i++) begin : g_sw
    dem_switch #(.CW(CW)) u_sw (
      .x (node[i]),
      .r (rnd[i-1]),
      .hi(node[2*i+1]),
      .lo(node[2*i])
    );
  end

  logic [N-1:0] leaves;
  always_comb
    for (int j = 0; j < N; j++) leaves[j] = node[N + j][0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sel <= '0;
    else if (en) sel <= leaves;
  end

  a_count: assert property (@(posedge clk) disable iff (!rst_n)
                            en |=> ($countones(sel) == int'($past(code))));
endmodule
