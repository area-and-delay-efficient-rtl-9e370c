// ppa_carry_tree: carry generation stage of the parallel prefix adder.
//
// A Kogge-Stone style prefix network over the WIDTH+1 (generate, propagate)
// positions made by ppa_preprocess (position 0 is the carry-in). Level l
// combines every position i with position i-2^l, so after ceil(log2(WIDTH+1))
// levels every position holds the group generate of all bits from the
// carry-in up to itself, which is the carry out of that bit.
//
// Two cell types are used:
//   black_cell  where the merged group does not yet reach the carry-in
//               (generate and propagate are both still needed);
//   gray_cell   where the lower group already reaches the carry-in, so the
//               result is a finished carry and only the generate is formed.
// Positions below 2^l just pass through at level l.
//
// Interface: pg[0] carry-in, pg[i+1] bit i; carry[0] is the carry-in,
// carry[i+1] the carry out of bit i (carry[WIDTH] is the carry-out of the
// adder). Purely combinational, depth ceil(log2(WIDTH+1)) cells.
module ppa_carry_tree
  import ppa_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  pg_t  [WIDTH:0] pg,
  output logic [WIDTH:0] carry
);

  localparam int unsigned N      = WIDTH + 1;
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;

  // lvl[l] holds the groups after l levels of the network
  pg_t [N-1:0] lvl [LEVELS+1];

  assign lvl[0] = pg;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < N; i++) begin : g_pos
      if (i < D) begin : g_pass
        assign lvl[l+1][i] = lvl[l][i];
      end else if (i < 2 * D) begin : g_gray
        // lower group [0 .. i-D] is complete: the carry is final here
        gray_cell u_gray (
          .hi   (lvl[l][i]),
          .lo_g (lvl[l][i-D].g),
          .g    (lvl[l+1][i].g)
        );
        // a group that contains the carry-in position never propagates
        assign lvl[l+1][i].p = 1'b0;
      end else begin : g_black
        black_cell u_black (
          .hi  (lvl[l][i]),
          .lo  (lvl[l][i-D]),
          .out (lvl[l+1][i])
        );
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) carry[i] = lvl[LEVELS][i].g;
  end

endmodule
