// One switching block of the randomised DEM tree.
//
// It receives a count x of unit elements to switch on among the 2 * HALF elements below it and
// splits it between its two halves: each half gets floor(x / 2), and when x is odd the spare
// element goes to the upper or lower half as the random bit r decides. Purely combinational.
// x may be at most 2 * HALF so each half stays within its capacity.
module dem_switch #(
  parameter int unsigned CW = 6   // count width
) (
  input  logic [CW-1:0] x,
  input  logic          r,
  output logic [CW-1:0] hi,
  output logic [CW-1:0] lo
);
  logic odd_hi, odd_lo;

  always_comb begin
    odd_hi = x[0] & r;
    odd_lo = x[0] & !r;
    hi = (x >> 1) + {{(CW-1){1'b0}}, odd_hi};
    lo = (x >> 1) + {{(CW-1){1'b0}}, odd_lo};
  end
endmodule
