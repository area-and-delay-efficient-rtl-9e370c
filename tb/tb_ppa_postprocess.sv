// tb_ppa_postprocess: random check of the post-processing stage at 16 bits.
// Sum bit i must be propagate i xor the carry into bit i; the carry-out is
// the top carry.
`timescale 1ns/1ps
module tb_ppa_postprocess;
  localparam int W = 16;
  logic [W-1:0] p, sum;
  logic [W:0]   carry;
  logic         cout;
  int checks = 0, failures = 0;

  ppa_postprocess #(.WIDTH(W)) dut (.p(p), .carry(carry), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      p     = W'($urandom);
      carry = (W+1)'({$urandom, $urandom});
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (sum[i] !== ((p[i] + carry[i]) % 2 == 1)) begin
          failures++;
          $display("FAIL bit %0d p=%b c=%b s=%b", i, p[i], carry[i], sum[i]);
        end
      end
      checks++;
      if (cout !== carry[W]) begin
        failures++;
        $display("FAIL cout=%b exp %b", cout, carry[W]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
