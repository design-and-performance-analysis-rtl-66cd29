// bk_prefix_cell: the prefix operator of the Brent-Kung carry network.
//
// It merges the (propagate, generate) pair of a more significant bit span
// (hi = Pi,Gi) with that of the adjacent less significant span (lo = Pj,Gj)
// into the pair of the joined span:
//   CP0 = Pi & Pj
//   CG0 = Gi | (Pi & Gj)
// The joined span propagates a carry only if both halves do, and generates
// one if the upper half does, or the lower half does and the upper passes it
// on. These two equations are those of the design; the struct packaging of the
// pair is this implementation's choice. Purely combinational, no clock.
module bk_prefix_cell
  import bcd_pkg::*;
(
  input  pg_t hi,   // (Pi, Gi): more significant span
  input  pg_t lo,   // (Pj, Gj): less significant span
  output pg_t out   // (CP0, CG0): joined span
);

  always_comb begin
    out.p = hi.p & lo.p;
    out.g = hi.g | (hi.p & lo.g);
  end

endmodule
