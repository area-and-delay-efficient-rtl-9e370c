// tb_ppm: self-checking test of the 32 x 32 parallel prefix multiplier at its
// default size.
// A new operand set is applied on every falling clock edge. After each rising
// edge c/cout must hold the result of the operands applied just before it
// (one cycle of latency, one product per cycle), and right before the edge
// they must still hold the previous result. Cases: the 16 x 15 = 240 example
// (sa = 0, sb = 1), sign corner cases, and random operands in all four
// signedness modes.
`timescale 1ns/1ps
module tb_ppm;
  import ppm_ref_pkg::*;

  logic        clk = 1'b0;
  logic        sa, sb;
  logic [31:0] a, b;
  logic [63:0] c;
  logic        cout;
  int checks = 0, failures = 0;

  ppm dut (.clk(clk), .sa(sa), .sb(sb), .a(a), .b(b), .c(c), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] av, input logic [31:0] bv,
                       input logic sav, input logic sbv);
    logic [63:0] prev_c;
    logic        prev_co, exp_co;
    logic [63:0] exp_c;
    @(negedge clk);
    prev_c = c; prev_co = cout;
    a = av; b = bv; sa = sav; sb = sbv;
    exp_c  = product(av, bv, sav, sbv);
    exp_co = carry_out(av, bv, sav, sbv);
    #4;  // 1 ns before the rising edge: outputs must not have moved yet
    checks++;
    if (c !== prev_c || cout !== prev_co) begin
      failures++;
      $display("FAIL output changed before the clock edge");
    end
    @(posedge clk);
    #1;
    checks++;
    if (c !== exp_c || cout !== exp_co) begin
      failures++;
      $display("FAIL a=%h b=%h sa=%b sb=%b got %h/%b exp %h/%b",
               av, bv, sav, sbv, c, cout, exp_c, exp_co);
    end
  endtask

  initial begin
    a = '0; b = '0; sa = 1'b0; sb = 1'b0;
    @(posedge clk);
    apply(32'd16, 32'd15, 1'b0, 1'b1);          // 16 * 15 = 240
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b0, 1'b0);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1, 1'b1);  // -1 * -1
    apply(32'h8000_0000, 32'h8000_0000, 1'b1, 1'b1);  // most negative squared
    apply(32'h8000_0000, 32'h0000_0001, 1'b1, 1'b0);
    apply(32'h7FFF_FFFF, 32'h8000_0000, 1'b0, 1'b1);
    apply(32'd0, 32'hDEAD_BEEF, 1'b1, 1'b1);
    for (int t = 0; t < 4000; t++) begin
      apply($urandom, $urandom, 1'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
