// tb_ppa_preprocess: random check of the pre-processing stage at 16 bits.
// Each bit's propagate must be A xor B and its generate A and B; position 0
// must carry the carry-in as a generate with no propagate.
`timescale 1ns/1ps
module tb_ppa_preprocess;
  import ppa_pkg::*;

  localparam int W = 16;
  logic [W-1:0] a, b;
  logic         cin;
  pg_t  [W:0]   pg;
  int checks = 0, failures = 0;

  ppa_preprocess #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .pg(pg));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      a   = W'($urandom);
      b   = W'($urandom);
      cin = 1'($urandom);
      if (t == 0) begin a = '1; b = '1; cin = 1'b1; end
      if (t == 1) begin a = '0; b = '1; cin = 1'b0; end
      #1;
      checks++;
      if (pg[0].g !== cin || pg[0].p !== 1'b0) begin
        failures++;
        $display("FAIL carry-in slot g=%b p=%b cin=%b", pg[0].g, pg[0].p, cin);
      end
      for (int i = 0; i < W; i++) begin
        checks++;
        if (pg[i+1].p !== (a[i] != b[i]) || pg[i+1].g !== (a[i] && b[i])) begin
          failures++;
          $display("FAIL bit %0d a=%b b=%b p=%b g=%b", i, a[i], b[i], pg[i+1].p, pg[i+1].g);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
