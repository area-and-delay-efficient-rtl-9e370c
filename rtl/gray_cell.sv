// gray_cell: generate-only prefix operator of the carry generation stage.
//
// Computes G = G_hi OR (P_hi AND G_lo), the same generate as black_cell, but
// no propagate. It is placed where the lower group already reaches the
// carry-in of the adder, so the result is a finished carry and no later cell
// needs its propagate. Two gates (AND, OR), which is the saving over a black
// cell. Purely combinational, no clock.
module gray_cell
  import ppa_pkg::*;
(
  input  pg_t  hi,    // group of the more significant bits
  input  logic lo_g,  // generate of the lower group, which ends at the carry-in
  output logic g      // carry out of the merged group
);

  always_comb g = hi.g | (hi.p & lo_g);

endmodule
