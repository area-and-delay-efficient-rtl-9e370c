// tb_ppa_carry_tree: random check of the prefix network.
// Random (g, p) vectors are applied at three widths (16, the default, plus 5
// and 64 to cover a non-power-of-two and the multiplier width). Every carry
// is compared with a bit-serial ripple evaluation
//   c[0] = g[0];  c[i] = g[i] | (p[i] & c[i-1])
// Position 0 is the carry-in slot and always has p = 0.
`timescale 1ns/1ps
module tb_ppa_carry_tree;
  import ppa_pkg::*;

  int checks = 0, failures = 0;

  pg_t [16:0]  pg16;  logic [16:0] c16;
  pg_t [5:0]   pg5;   logic [5:0]  c5;
  pg_t [64:0]  pg64;  logic [64:0] c64;

  ppa_carry_tree #(.WIDTH(16)) dut16 (.pg(pg16), .carry(c16));
  ppa_carry_tree #(.WIDTH(5))  dut5  (.pg(pg5),  .carry(c5));
  ppa_carry_tree #(.WIDTH(64)) dut64 (.pg(pg64), .carry(c64));

  // random (g, p) pair; g and p are not both 1 as they come from one bit pair
  function automatic pg_t rand_pg();
    pg_t r;
    case ($urandom % 3)
      0: begin r.g = 1'b1; r.p = 1'b0; end
      1: begin r.g = 1'b0; r.p = 1'b1; end
      default: begin r.g = 1'b0; r.p = 1'b0; end
    endcase
    // mostly propagate, so that long carry chains occur
    if ($urandom % 4 != 0) begin r.g = 1'b0; r.p = 1'b1; end
    return r;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic r;
      foreach (pg16[i]) pg16[i] = rand_pg();
      foreach (pg5[i])  pg5[i]  = rand_pg();
      foreach (pg64[i]) pg64[i] = rand_pg();
      pg16[0].p = 1'b0; pg5[0].p = 1'b0; pg64[0].p = 1'b0;
      pg16[0].g = 1'($urandom); pg5[0].g = 1'($urandom); pg64[0].g = 1'($urandom);
      #1;
      r = 1'b0;
      for (int i = 0; i <= 16; i++) begin
        r = pg16[i].g | (pg16[i].p & r);
        checks++;
        if (c16[i] !== r) begin failures++; $display("FAIL w16 pos %0d", i); end
      end
      r = 1'b0;
      for (int i = 0; i <= 5; i++) begin
        r = pg5[i].g | (pg5[i].p & r);
        checks++;
        if (c5[i] !== r) begin failures++; $display("FAIL w5 pos %0d", i); end
      end
      r = 1'b0;
      for (int i = 0; i <= 64; i++) begin
        r = pg64[i].g | (pg64[i].p & r);
        checks++;
        if (c64[i] !== r) begin failures++; $display("FAIL w64 pos %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
