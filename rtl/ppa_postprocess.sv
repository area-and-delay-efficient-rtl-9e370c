// ppa_postprocess: post-processing stage of the parallel prefix adder.
//
// Each sum bit is the bit's own propagate XORed with the carry coming out of
// the bit below it:
//   S_i = P_i XOR C_(i-1)
// with C_(-1) the adder's carry-in. The carry out of the top bit is the
// adder's carry-out.
//
// Interface: carry[0] is the carry-in, carry[i] the carry into bit i,
// carry[WIDTH] the carry-out. Purely combinational.
module ppa_postprocess #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH:0]   carry,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  always_comb begin
    sum  = p ^ carry[WIDTH-1:0];
    cout = carry[WIDTH];
  end

endmodule
