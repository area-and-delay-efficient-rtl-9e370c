// tb_ppa: check of the parallel prefix adder at its default width (16 bits)
// and at the 64-bit width the multiplier uses. Random operands plus corner
// cases (all ones + carry-in, which ripples a carry through every bit) are
// compared with the simulator's own addition a + b + cin.
`timescale 1ns/1ps
module tb_ppa;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;  logic ci16, co16;
  logic [63:0] a64, b64, s64;  logic ci64, co64;

  ppa dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  ppa #(.WIDTH(64)) dut64 (.a(a64), .b(b64), .cin(ci64), .sum(s64), .cout(co64));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic [16:0] e16;
      logic [64:0] e64;
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; ci64 = 1'($urandom);
      case (t)
        0: begin a16 = '1; b16 = '0; ci16 = 1'b1; a64 = '1; b64 = '0; ci64 = 1'b1; end
        1: begin a16 = '1; b16 = '1; ci16 = 1'b1; a64 = '1; b64 = '1; ci64 = 1'b1; end
        2: begin a16 = '0; b16 = '0; ci16 = 1'b0; a64 = '0; b64 = '0; ci64 = 1'b0; end
        3: begin a16 = 16'h5555; b16 = 16'hAAAA; ci16 = 1'b1; a64 = {32{2'b01}}; b64 = {32{2'b10}}; ci64 = 1'b1; end
        default: ;
      endcase
      #1;
      e16 = {1'b0, a16} + {1'b0, b16} + 17'(ci16);
      e64 = {1'b0, a64} + {1'b0, b64} + 65'(ci64);
      checks += 2;
      if ({co16, s16} !== e16) begin
        failures++;
        $display("FAIL16 %h+%h+%b = %b_%h exp %h", a16, b16, ci16, co16, s16, e16);
      end
      if ({co64, s64} !== e64) begin
        failures++;
        $display("FAIL64 %h+%h+%b = %b_%h exp %h", a64, b64, ci64, co64, s64, e64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
