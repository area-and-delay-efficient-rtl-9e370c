// ppm: parallel prefix multiplier, c = a * b, registered.
//
// An array multiplier whose row adders are parallel prefix adders (ppa).
// Operand a selects the rows: row k is b, extended to 2N bits, shifted left by
// k and kept only if a[k] is set. The rows are accumulated in a chain of N-1
// prefix adders of width 2N:
//   s[0] = row 0
//   s[k] = s[k-1] + row k          k = 1 .. N-1
// so s[k] is the sum of rows 0..k and s[N-1] is the product.
//
// Signed operands. sa = 1 makes a two's-complement number, sb = 1 makes b
// one. With sb set, b is sign-extended instead of zero-extended. With sa set,
// bit a[N-1] weighs -2^(N-1), so the last row is subtracted: its adder gets
// the inverted row and a carry-in of 1. The product is exact in 2N bits for
// every combination of sa and sb.
//
// cout is the carry out of the last prefix adder of the chain. For unsigned
// operands it is always 0; in the signed modes it is the carry of the
// two's-complement addition, not part of the product.
//
// Timing: the whole chain is combinational; c and cout are captured on the
// rising edge of clk, so they show the product of the operands present at the
// previous edge (latency one cycle, one product per cycle). There is no reset:
// the outputs are meaningful after the first edge.
//
// The port list and the 32-bit operand width follow the published block; the
// chained row structure, the meaning of sa/sb, of cout and the output
// register are this design's own reading of it.
module ppm #(
  parameter int unsigned N = 32
) (
  input  logic           clk,
  input  logic           sa,    // 1: a is two's complement
  input  logic           sb,    // 1: b is two's complement
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] c,
  output logic           cout
);

  localparam int unsigned W = 2 * N;

  logic [W-1:0] bext;          // b extended to the product width
  logic [W-1:0] row   [N];     // addend of each stage (row N-1 possibly inverted)
  logic [W-1:0] s     [N];     // running sums
  logic [N-1:0] carry;         // carry out of each stage (index 0 unused)
  logic         sub_last;      // last row is subtracted

  always_comb begin
    bext     = {{N{sb & b[N-1]}}, b};
    sub_last = sa & a[N-1];
    for (int k = 0; k < N; k++) begin
      row[k] = a[k] ? (bext << k) : '0;
    end
    if (sub_last) row[N-1] = ~(bext << (N - 1));
  end

  assign s[0]     = row[0];
  assign carry[0] = 1'b0;

  for (genvar k = 1; k < N; k++) begin : g_row
    // only the last stage can subtract
    localparam bit LAST = (k == N - 1);
    ppa #(.WIDTH(W)) u_add (
      .a    (s[k-1]),
      .b    (row[k]),
      .cin  (LAST ? sub_last : 1'b0),
      .sum  (s[k]),
      .cout (carry[k])
    );
  end

  always_ff @(posedge clk) begin
    c    <= s[N-1];
    cout <= carry[N-1];
  end

endmodule
