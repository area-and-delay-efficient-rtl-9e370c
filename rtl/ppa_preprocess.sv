// ppa_preprocess: pre-processing stage of the parallel prefix adder.
//
// For every bit pair it forms
//   P_i = A_i XOR B_i     (propagate)
//   G_i = A_i AND B_i     (generate)
// The carry-in enters this stage too: it is placed below bit 0 as an extra
// prefix position with G = cin and P = 0, so that the carry tree treats it
// like any other generate and no separate carry-in logic is needed later.
//
// Interface: pg[0] is the carry-in position, pg[i+1] belongs to bit i.
// Purely combinational.
module ppa_preprocess
  import ppa_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output pg_t  [WIDTH:0]   pg
);

  always_comb begin
    pg[0].g = cin;
    pg[0].p = 1'b0;
    for (int i = 0; i < WIDTH; i++) begin
      pg[i+1].p = a[i] ^ b[i];
      pg[i+1].g = a[i] & b[i];
    end
  end

endmodule
