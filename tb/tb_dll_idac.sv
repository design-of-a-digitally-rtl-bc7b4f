// tb_dll_idac: self-checking test of the current DAC model.
//
// Every code and trim setting is applied; both outputs must equal the unit
// current times the code plus 28 units for ITRIM[0] and 40 for ITRIM[1].
`timescale 1ns / 1ps
module tb_dll_idac;
  logic [6:0] dac_in;
  logic [1:0] trim;
  real i_bias, vp, vn, expv;
  int  checks = 0, failures = 0;

  dll_idac dut (.dac_in, .trim, .i_bias, .vp, .vn);

  initial begin
    for (int b = 1; b <= 2; b++) begin
      i_bias = 0.75 * b;
      for (int t = 0; t < 4; t++) begin
        for (int c = 0; c < 128; c++) begin
          dac_in = 7'(c); trim = 2'(t);
          #1;
          expv = i_bias * (c + ((t & 1) ? 28 : 0) + ((t & 2) ? 40 : 0));
          checks++;
          if (vp > expv + 1e-9 || vp < expv - 1e-9 || vn > expv + 1e-9 || vn < expv - 1e-9) begin
            failures++;
            $display("FAIL code %0d trim %0d: vp=%f vn=%f expected %f", c, t, vp, vn, expv);
          end
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
