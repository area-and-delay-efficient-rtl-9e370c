// tb_ppm_top: end-to-end test of the top level at its default sizes
// (32 x 32 multiplier, 8-bit exponent adder).
// Operands stream in one per clock cycle while the exponent adder is driven
// at the same time. Every product is checked one cycle after its operands and
// every exponent sum in the same cycle. The test counts how often each
// mechanism of the design occurred and fails if one never did:
//   unsigned product, a signed only, b signed only, both signed,
//   subtracted last row (sa = 1 and a[31] = 1), multiplier carry-out = 1,
//   exponent carry-out = 1, and a back-to-back product in consecutive cycles.
`timescale 1ns/1ps
module tb_ppm_top;
  import ppm_ref_pkg::*;

  logic        clk = 1'b0;
  logic        sa, sb;
  logic [31:0] a, b;
  logic [63:0] c;
  logic        cout;
  logic [7:0]  eb, ew, e_sum;
  logic        e_cout;
  int checks = 0, failures = 0;
  int n_unsigned = 0, n_sa = 0, n_sb = 0, n_both = 0, n_sub = 0;
  int n_cout = 0, n_ecout = 0, n_stream = 0;

  ppm_top dut (
    .clk(clk), .sa(sa), .sb(sb), .a(a), .b(b), .c(c), .cout(cout),
    .eb(eb), .ew(ew), .e_sum(e_sum), .e_cout(e_cout)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] exp_c;
  logic        exp_co;
  logic        pending = 1'b0;

  initial begin
    a = '0; b = '0; sa = 1'b0; sb = 1'b0; eb = '0; ew = '0;
    @(posedge clk);
    for (int t = 0; t < 20000; t++) begin
      logic [31:0] av, bv;
      logic        sav, sbv;
      av = $urandom; bv = $urandom; sav = 1'($urandom); sbv = 1'($urandom);
      if (t % 7 == 0) av[31] = 1'b1;
      @(negedge clk);
      a = av; b = bv; sa = sav; sb = sbv;
      eb = 8'($urandom); ew = 8'($urandom);
      #1;
      checks++;
      if ({e_cout, e_sum} !== 9'({1'b0, eb} + {1'b0, ew})) begin
        failures++;
        $display("FAIL exponent %0d+%0d = %0d", eb, ew, {e_cout, e_sum});
      end
      if (e_cout) n_ecout++;
      @(posedge clk);
      #1;
      checks++;
      if (c !== product(av, bv, sav, sbv) || cout !== carry_out(av, bv, sav, sbv)) begin
        failures++;
        $display("FAIL a=%h b=%h sa=%b sb=%b got %h/%b exp %h/%b", av, bv, sav, sbv,
                 c, cout, product(av, bv, sav, sbv), carry_out(av, bv, sav, sbv));
      end
      case ({sav, sbv})
        2'b00: n_unsigned++;
        2'b10: n_sa++;
        2'b01: n_sb++;
        default: n_both++;
      endcase
      if (sav && av[31]) n_sub++;
      if (cout) n_cout++;
      if (t > 0) n_stream++;
    end
    $display("mechanisms: unsigned=%0d a_signed=%0d b_signed=%0d both_signed=%0d",
             n_unsigned, n_sa, n_sb, n_both);
    $display("mechanisms: subtracted_row=%0d mult_cout=%0d exp_cout=%0d back_to_back=%0d",
             n_sub, n_cout, n_ecout, n_stream);
    if (n_unsigned == 0) begin failures++; $display("FAIL no unsigned product"); end
    if (n_sa == 0)       begin failures++; $display("FAIL no a-signed product"); end
    if (n_sb == 0)       begin failures++; $display("FAIL no b-signed product"); end
    if (n_both == 0)     begin failures++; $display("FAIL no signed x signed product"); end
    if (n_sub == 0)      begin failures++; $display("FAIL last row never subtracted"); end
    if (n_cout == 0)     begin failures++; $display("FAIL multiplier carry-out never set"); end
    if (n_ecout == 0)    begin failures++; $display("FAIL exponent carry-out never set"); end
    if (n_stream == 0)   begin failures++; $display("FAIL no back-to-back products"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
