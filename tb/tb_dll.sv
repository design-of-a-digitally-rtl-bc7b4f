// tb_dll: self-checking test of the whole delay-locked loop.
//
// Six loops run side by side on one 32 MHz reference, each at its own
// process corner and trim setting:
//   fast   (X_PVT 0.8256, both trims): must walk down from 64 one code per
//          cycle and settle on the three codes at the lock point;
//   slow   (X_PVT 1.312, both trims): must walk up and settle likewise;
//   typ    (X_PVT 1.0, both trims): settles near 64; its phases must then be
//          spaced T/16 apart, and gating it (low-power mode) must stop the
//          clock and keep the code; its switching jitter (spread of one
//          cell delay while locked) must stay below 30 ps;
//   over   (X_PVT 1.49, both trims): too slow even at code 127, must stop
//          at 127 and flag overrun;
//   under  (X_PVT 0.51, both trims): too fast even at code 0, must stop at 0
//          and flag underrun;
//   fail   (X_PVT 0.4, both trims): the line starts shorter than half a
//          period, which the detector misreads as too long, so the code runs
//          the wrong way up to 127 (the known limit of this detector).
// Lock points are worked out here from the delay law: the line is 16 *
// X_PVT * 0.9 * 286.458 / (code + trim) ns long, and the loop dithers between
// the last code whose line is longer than T and the next two codes: an edge
// takes a whole period to cross the line and so sees the code change on the
// way, which delays the loop by one cycle and widens its dither.
`timescale 1ns / 1ps
module tb_dll;
  localparam real T = 31.25;
  localparam int NI = 6;
  localparam real XP [NI] = '{0.8256, 1.312, 1.0, 1.49, 0.51, 0.4};
  localparam int  TR [NI] = '{68, 68, 68, 68, 68, 68};

  logic clk = 1'b0, rst_n = 1'b1;
  logic en [NI];
  logic [1:0] itrim [NI];
  real  i_bias = 1.0;
  logic ck_ref [NI], ck_fb [NI], decr [NI], ovr [NI], und [NI];
  logic [15:0] phases [NI];
  logic [6:0]  code [NI];
  int   checks = 0, failures = 0;
  int   n_over = 0, n_under = 0;

  always #(T/2) clk = ~clk;

  for (genvar k = 0; k < NI; k++) begin : g_dll
    dll #(.X_PVT(XP[k])) u (
      .clk, .rst_n, .en(en[k]), .itrim(itrim[k]), .i_bias,
      .ck_ref(ck_ref[k]), .phases(phases[k]), .ck_fb(ck_fb[k]), .decr(decr[k]),
      .code(code[k]), .overrun(ovr[k]), .underrun(und[k]));
  end

  function automatic real line_ns(input int k, input int c);
    return 16.0 * XP[k] * 0.9 * 286.458 / (c + TR[k]);
  endfunction

  // Largest code whose line is still longer than T.
  function automatic int lock_code(input int k);
    for (int c = 127; c >= 0; c--) if (line_ns(k, c) > T) return c;
    return -1;
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) begin
    for (int k = 0; k < NI; k++) begin
      if (ovr[k]) n_over++;
      if (und[k]) n_under++;
    end
  end

  // Step rule: each cycle the code moves by at most one.
  logic [6:0] prev [NI];
  always @(posedge clk) begin
    #5;
    if (rst_n)
      for (int k = 0; k < NI; k++) begin
        int dlt;
        dlt = int'(code[k]) - int'(prev[k]);
        chk(dlt >= -1 && dlt <= 1, $sformatf("dll %0d step %0d", k, dlt));
      end
    prev = code;
  end

  realtime t_ref, t_ph [16];
  logic [15:0] ph_prev;

  initial begin
    int lc;
    #1 rst_n = 1'b0;
    for (int k = 0; k < NI; k++) begin en[k] = 1'b1; itrim[k] = (TR[k] != 0) ? 2'b11 : 2'b00; end
    #40;
    for (int k = 0; k < NI; k++) chk(code[k] == 7'd64, "reset code 64");
    @(negedge clk) rst_n = 1'b1;
    // Fast corner: monotone walk down during the first 20 cycles.
    repeat (20) begin
      @(posedge clk); #5;
      chk(decr[0] == 1'b1, "fast corner asks for less current");
    end
    repeat (130) @(posedge clk);
    for (int k = 0; k < 3; k++) begin
      lc = lock_code(k);
      repeat (8) begin
        @(posedge clk); #5;
        chk(int'(code[k]) >= lc && int'(code[k]) <= lc + 2,
            $sformatf("dll %0d code %0d, lock codes %0d..%0d", k, code[k], lc, lc + 2));
        chk(line_ns(k, code[k]) > T - 0.8 && line_ns(k, code[k]) < T + 0.8,
            $sformatf("dll %0d line %0.3f ns", k, line_ns(k, code[k])));
      end
    end
    chk(code[3] == 7'd127, "slow-extreme loop saturates at 127");
    chk(code[4] == 7'd0,   "too-fast loop saturates at 0");
    chk(code[5] == 7'd127, "line below half a period runs the wrong way");
    chk(n_over > 10 && n_under > 10, "overrun and underrun flagged");

    // Phase spacing of the typical loop: phase i rises (i+1)*T/16 after ck_ref.
    @(posedge ck_ref[2]); t_ref = $realtime;
    ph_prev = phases[2];
    while ($realtime < t_ref + 30.0) begin
      @(phases[2]);
      for (int i = 0; i < 16; i++)
        if (phases[2][i] && !ph_prev[i]) t_ph[i] = $realtime;
      ph_prev = phases[2];
    end
    for (int i = 0; i < 16; i++)
      chk((t_ph[i] - t_ref) > (i+1)*T/16 - 0.5 && (t_ph[i] - t_ref) < (i+1)*T/16 + 0.5,
          $sformatf("phase %0d at %0.3f ns", i, t_ph[i] - t_ref));

    // Switching jitter of the locked typical loop: spread of the first
    // cell's delay over 64 reference periods; the source design's target is
    // below 30 ps (one code at N = 132 is T/16/132 = 14.8 ps; the three-code
    // dither spans two of them, 29.6 ps; 1 ps is added for the simulator's
    // time resolution).
    begin
      realtime t0, dmin, dmax;
      dmin = 1.0e9; dmax = 0.0;
      repeat (64) begin
        @(posedge ck_ref[2]); t0 = $realtime;
        @(posedge phases[2][0]);
        if ($realtime - t0 < dmin) dmin = $realtime - t0;
        if ($realtime - t0 > dmax) dmax = $realtime - t0;
      end
      $display("typical loop: first-cell delay %0.4f .. %0.4f ns, spread %0.1f ps",
               dmin, dmax, (dmax - dmin) * 1000.0);
      chk(dmax - dmin > 0.001 && dmax - dmin < 0.031,
          $sformatf("switching jitter %0.1f ps, expected 1..30 ps", (dmax - dmin) * 1000.0));
    end

    // Low-power mode: clock gated, code kept.
    begin
      logic [6:0] held;
      int edges;
      @(posedge clk); #3 en[2] = 1'b0;
      @(posedge clk); #5 held = code[2];
      edges = 0;
      fork
        begin repeat (50) @(posedge clk); end
        forever begin @(posedge ck_ref[2]); edges++; end
      join_any
      disable fork;
      chk(edges == 0, "gated DLL clock stopped");
      chk(code[2] == held, "code kept while gated");
      #3 en[2] = 1'b1;
      repeat (3) @(posedge clk);
      #5;
      lc = lock_code(2);
      chk(int'(code[2]) >= lc - 1 && int'(code[2]) <= lc + 3, "still locked after wake-up");
    end
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
