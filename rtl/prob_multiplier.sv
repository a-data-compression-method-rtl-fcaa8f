// prob_multiplier: width of the symbol-0 sub-interval, A * p(0|s).
//
// Multiplies the W-bit interval width A by the 8-bit probability p (in
// 1/256 units) and drops the 8 fraction bits: a0 = floor(A * p / 256).
// Combinational. With A >= 2^(W-1) >= 256 and 1 <= p <= 255 both
// sub-intervals a0 and A - a0 are at least 1.
// The source design uses one multiplication per coded bit, done by a
// reduced-area parallel multiplier whose structure it does not give; this
// module is a plain array multiplier written as '*'.
module prob_multiplier
  import aft_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  prob_t        p,
  output logic [W-1:0] a0
);
  logic [W+P_W-1:0] prod;
  assign prod = a * p;
  assign a0   = prod[W+P_W-1:P_W];
endmodule
