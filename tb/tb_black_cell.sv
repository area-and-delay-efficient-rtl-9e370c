// tb_black_cell: exhaustive check of the black prefix cell.
// All 16 combinations of (hi.g, hi.p, lo.g, lo.p) are applied and the merged
// generate and propagate compared with the prefix-operator truth table.
`timescale 1ns/1ps
module tb_black_cell;
  import ppa_pkg::*;

  pg_t hi, lo, out;
  int  checks = 0, failures = 0;

  black_cell dut (.hi(hi), .lo(lo), .out(out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      {hi.g, hi.p, lo.g, lo.p} = 4'(v);
      #1;
      // group generates if hi generates, or hi propagates a carry made by lo
      exp_g = (hi.g == 1'b1) || (hi.p == 1'b1 && lo.g == 1'b1);
      exp_p = (hi.p == 1'b1) && (lo.p == 1'b1);
      checks++;
      if (out.g !== exp_g || out.p !== exp_p) begin
        failures++;
        $display("FAIL v=%b got g=%b p=%b exp g=%b p=%b", v[3:0], out.g, out.p, exp_g, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
