// ppa: parallel prefix adder, sum = a + b + cin.
//
// Three stages in sequence:
//   1. ppa_preprocess  - per-bit propagate (XOR) and generate (AND); the
//                        carry-in becomes an extra generate below bit 0.
//   2. ppa_carry_tree  - logarithmic prefix network of black and gray cells
//                        that produces the carry into every bit at once.
//   3. ppa_postprocess - sum bit = propagate XOR carry from the bit below.
// The default width of 16 bits is the adder described for the design; the
// multiplier instantiates it at 64 bits and the exponent path at 8.
// Purely combinational; delay grows with log2(WIDTH+1).
module ppa
  import ppa_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  pg_t  [WIDTH:0]   pg;
  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] p;

  ppa_preprocess #(.WIDTH(WIDTH)) u_pre (
    .a   (a),
    .b   (b),
    .cin (cin),
    .pg  (pg)
  );

  ppa_carry_tree #(.WIDTH(WIDTH)) u_tree (
    .pg    (pg),
    .carry (carry)
  );

  always_comb begin
    for (int i = 0; i < WIDTH; i++) p[i] = pg[i+1].p;
  end

  ppa_postprocess #(.WIDTH(WIDTH)) u_post (
    .p     (p),
    .carry (carry),
    .sum   (sum),
    .cout  (cout)
  );

endmodule
