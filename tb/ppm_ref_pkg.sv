// ppm_ref_pkg: reference model of the parallel prefix multiplier, for the
// testbenches. It uses the simulator's own multiplication and addition, not
// the adder structure of the design.
//   product: a and b are extended to 64 bits (sign-extended when their
//            signed flag is set) and multiplied modulo 2^64, which is the
//            exact product for every signedness combination.
//   cout:    carry out of the last accumulation step, i.e. of
//            (a[30:0] * b) + row31, where row31 is b<<31 when a[31] is set
//            and sa = 0, its two's complement negation when a[31] and sa are
//            set, and 0 otherwise.
package ppm_ref_pkg;

  function automatic logic [63:0] ext(input logic [31:0] v, input logic s);
    return s ? {{32{v[31]}}, v} : {32'b0, v};
  endfunction

  function automatic logic [63:0] product(input logic [31:0] a, input logic [31:0] b,
                                          input logic sa, input logic sb);
    return ext(a, sa) * ext(b, sb);
  endfunction

  function automatic logic carry_out(input logic [31:0] a, input logic [31:0] b,
                                     input logic sa, input logic sb);
    logic [63:0] low, r;
    logic [64:0] t;
    low = {33'b0, a[30:0]} * ext(b, sb);
    r   = ext(b, sb) << 31;
    if (!a[31])  return 1'b0;
    if (!sa)     t = {1'b0, low} + {1'b0, r};
    else         t = {1'b0, low} + {1'b0, ~r} + 65'd1;
    return t[64];
  endfunction

endpackage
