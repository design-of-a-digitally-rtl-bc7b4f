// tb_dll_skew_buf: self-checking test of the skew buffer model.
//
// A 32 MHz clock goes in; just before SKEW_NS after each edge the output must
// still show the old level, and just after it the new one.
`timescale 1ns / 1ps
module tb_dll_skew_buf;
  localparam real SKEW = 1.0;
  logic in = 1'b0, out;
  int   checks = 0, failures = 0;

  always #15.625 in = ~in;

  dll_skew_buf #(.SKEW_NS(SKEW)) dut (.in, .out);

  always @(in) begin
    automatic logic v = in;
    #(SKEW - 0.05);
    checks++;
    if (out !== ~v) begin failures++; $display("FAIL early change t=%0t", $realtime); end
    #0.1;
    checks++;
    if (out !== v) begin failures++; $display("FAIL late change t=%0t", $realtime); end
  end

  initial begin
    #2000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
