// black_cell: full prefix operator of the carry generation stage.
//
// Combines a higher-order group (hi) with the adjacent lower-order group (lo)
// into one group spanning both:
//   G = G_hi OR (P_hi AND G_lo)      group generate
//   P = P_hi AND P_lo                group propagate
// Three gates (AND, OR, AND). It is used wherever the combined group does not
// yet reach the carry-in, so its propagate is still needed by a later level.
// Purely combinational, no clock.
module black_cell
  import ppa_pkg::*;
(
  input  pg_t hi,   // group of the more significant bits
  input  pg_t lo,   // adjacent group of the less significant bits
  output pg_t out   // merged group
);

  always_comb begin
    out.g = hi.g | (hi.p & lo.g);
    out.p = hi.p & lo.p;
  end

endmodule
