// tb_dll_icdl: self-checking test of the current-controlled delay line model.
//
// For several control currents a clock is sent through the line; the rising
// and falling edges of phase i must arrive (i+1) cell delays after the input
// edge, with the cell delay (VDD/2)*C_L/I worked out here (each cell delay
// is rounded to the 1 ps time precision, so the tolerance grows by 1 ps a cell). A current so low
// that the cell delay exceeds the half period must stop the clock.
`timescale 1ns / 1ps
module tb_dll_icdl;
  localparam real VDD = 1.8, CL = 286.458;
  real vp, vn, td;
  logic ck_in = 1'b0;
  logic [15:0] d;
  logic ck_fb;
  realtime t_in, t_tap [16];
  int checks = 0, failures = 0;

  dll_icdl dut (.vp, .vn, .ck_in, .d, .ck_fb);

  logic [15:0] d_prev = '0;
  always @(d) begin
    for (int i = 0; i < 16; i++) if (d[i] !== d_prev[i]) t_tap[i] = $realtime;
    d_prev = d;
  end

  task automatic run_current(input real i_ua);
    vp = i_ua; vn = i_ua;
    td = 0.5 * VDD * CL / i_ua;
    #100;
    for (int e = 0; e < 4; e++) begin
      ck_in = ~ck_in; t_in = $realtime;
      #80;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (t_tap[i] - t_in > (i+1)*td + 0.001*(i+2) || t_tap[i] - t_in < (i+1)*td - 0.001*(i+2) || d[i] !== ck_in) begin
          failures++;
          $display("FAIL I=%0.1f tap %0d: %0.4f ns, expected %0.4f", i_ua, i, t_tap[i] - t_in, (i+1)*td);
        end
      end
      checks++;
      if (ck_fb !== d[15]) begin failures++; $display("FAIL ck_fb"); end
    end
  endtask

  initial begin
    vp = 132.0; vn = 132.0;
    run_current(132.0);   // 1.953 ns per cell
    run_current(109.0);
    run_current(195.0);
    run_current(68.0);
    // Starved line: 8 ns pulses against a cell delay of about 26 ns.
    vp = 10.0; vn = 10.0;
    #2000;
    repeat (40) begin #8 ck_in = ~ck_in; end
    #4;
    checks++;
    if (t_tap[15] > 2000.0) begin failures++; $display("FAIL starved line passed pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
