// ppm_top: the parallel prefix multiplier with its exponent adder.
//
// Two independent datapaths stand side by side:
//   * ppm       - the 32 x 32 -> 64-bit parallel prefix multiplier with
//                 signed/unsigned operand selects and a registered product;
//   * u_exp_add - an 8-bit parallel prefix adder that adds two exponent
//                 fields (eb + ew), the exponent path of the floating-point
//                 multiplier organisation. Its sum would feed the final
//                 product stage of that organisation, which is not part of
//                 this RTL, so sum and carry are brought out as ports.
// The exponent path is combinational; the product path has one cycle of
// latency (see ppm). No bias is subtracted from the exponent sum: only the
// raw addition is specified.
module ppm_top #(
  parameter int unsigned N  = 32,  // multiplier operand width
  parameter int unsigned EW = 8    // exponent width
) (
  input  logic           clk,
  input  logic           sa,
  input  logic           sb,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] c,
  output logic           cout,
  input  logic [EW-1:0]  eb,
  input  logic [EW-1:0]  ew,
  output logic [EW-1:0]  e_sum,
  output logic           e_cout
);

  ppm #(.N(N)) u_ppm (
    .clk  (clk),
    .sa   (sa),
    .sb   (sb),
    .a    (a),
    .b    (b),
    .c    (c),
    .cout (cout)
  );

  ppa #(.WIDTH(EW)) u_exp_add (
    .a    (eb),
    .b    (ew),
    .cin  (1'b0),
    .sum  (e_sum),
    .cout (e_cout)
  );

endmodule
