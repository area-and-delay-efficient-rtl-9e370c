// tb_exponent_adder: exhaustive check of the 8-bit exponent adder.
// The parallel prefix adder is instantiated at 8 bits with carry-in 0, as in
// the exponent path, and every pair of exponent fields is added.
`timescale 1ns/1ps
module tb_exponent_adder;
  int checks = 0, failures = 0;

  logic [7:0] eb, ew, e_sum;
  logic       e_cout;

  ppa #(.WIDTH(8)) dut (.a(eb), .b(ew), .cin(1'b0), .sum(e_sum), .cout(e_cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        eb = 8'(x); ew = 8'(y);
        #1;
        checks++;
        if ({e_cout, e_sum} !== 9'(x + y)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d+%0d = %0d", x, y, {e_cout, e_sum});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
