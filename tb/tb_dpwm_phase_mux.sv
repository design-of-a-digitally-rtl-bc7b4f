// tb_dpwm_phase_mux: self-checking test of the 16-to-1 phase multiplexer.
//
// Random phase vectors and every select value: the output must equal the
// selected input.
`timescale 1ns / 1ps
module tb_dpwm_phase_mux;
  logic [15:0] phases;
  logic [3:0]  sel;
  logic        ck_mux;
  int checks = 0, failures = 0;

  dpwm_phase_mux dut (.phases, .sel, .ck_mux);

  initial begin
    for (int r = 0; r < 200; r++) begin
      phases = 16'($urandom);
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        #1;
        checks++;
        if (ck_mux !== phases[s]) begin
          failures++; $display("FAIL phases=%h sel=%0d out=%0d", phases, s, ck_mux);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
