// tb_gray_cell: exhaustive check of the gray (generate-only) prefix cell.
// All 8 combinations of (hi.g, hi.p, lo_g) are applied.
`timescale 1ns/1ps
module tb_gray_cell;
  import ppa_pkg::*;

  pg_t  hi;
  logic lo_g, g;
  int   checks = 0, failures = 0;

  gray_cell dut (.hi(hi), .lo_g(lo_g), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_g;
      {hi.g, hi.p, lo_g} = 3'(v);
      #1;
      exp_g = (hi.g == 1'b1) || (hi.p == 1'b1 && lo_g == 1'b1);
      checks++;
      if (g !== exp_g) begin
        failures++;
        $display("FAIL v=%b got g=%b exp %b", v[2:0], g, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
