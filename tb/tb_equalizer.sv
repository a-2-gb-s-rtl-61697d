// tb_equalizer: self-checking test of the equalizer loop.
//
// Random tap sets and random received samples (large enough to hit the
// saturation of u) are fed four per clock. A symbol-by-symbol reference
// written directly from the equations (main DFE subtracted from r, 6-tap LE,
// 8-tap sub-DFE and slicer) predicts every decision, including the start
// after the synchronous restart, where past decisions are -1 and the
// registered u history is zero. Three runs: default tap allocation, random
// main-DFE offsets, and offsets below the legal minimum (clamped). The
// latency of four clocks from input block to decision is checked too.
module tb_equalizer;
  import eq60_pkg::*;

  localparam int NB  = 300;          // blocks per run
  localparam int NS  = NB * P;
  localparam int OFS = 100;          // index offset for negative symbols

  logic clk = 0, rst_n = 0, fill = 0, clr = 0;
  coef_t [L+B-1:0] h;
  coef_t [A-1:0]   w;
  logic  [NGRP-1:0][OFFW-1:0] off;
  logic busy;
  logic signed [P-1:0][RW-1:0] r;
  logic [P-1:0] xhat;

  int checks = 0, failures = 0;

  equalizer dut (.clk, .rst_n, .fill, .clr, .h, .w, .off, .busy, .r, .xhat);

  always #5 clk = ~clk;

  initial begin
    #(2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rs  [NS];
  int uu  [-OFS:NS+16];
  int xb  [-OFS:NS+16];      // decisions as +1/-1

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic int satv(int v, int wbits);
    int hi = (1 << (wbits - 1)) - 1;
    int lo = -(1 << (wbits - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  function automatic int rsample(int n);
    return (n >= 0 && n < NS) ? rs[n] : 0;
  endfunction

  function automatic int xv(int n);
    return (n < -12) ? -1 : xb[n];
  endfunction

  // Reference: u(n) needs decisions up to n-9; z(k) needs u up to k+5.
  task automatic reference();
    for (int n = -OFS; n <= NS + 16; n++) begin uu[n] = 0; xb[n] = -1; end
    for (int n = -12; n < NS; n++) begin
      // u(n+5) first, as it depends only on older decisions
      for (int m = n; m <= n + 5; m++) begin
        if (m >= -7 && m <= NS + 8) begin
          int y = 0;
          for (int g = 0; g < NGRP; g++) begin
            int o = clampi(int'(off[g]), 8, REACH - K);
            for (int j = 1; j <= K; j++) y += int'(h[L + g*K + j - 1]) * xv(m - o - j);
          end
          uu[m] = satv(rsample(m) - y, UW);
        end
      end
      begin
        int zacc = 0, z, s = 0;
        for (int i = 1; i <= A; i++) zacc += int'(w[i-1]) * uu[n + i - 1];
        z = satv(zacc >>> FRAC, ZW);
        for (int l = 1; l <= L; l++) s += int'(h[l-1]) * xv(n - l);
        xb[n] = (z - s >= 0) ? 1 : -1;
      end
    end
  endtask

  task automatic run(input int mode);
    for (int i = 0; i < L + B; i++) h[i] = coef_t'($signed($urandom_range(0, 80)) - 40);
    for (int i = 0; i < A; i++) w[i] = coef_t'($signed($urandom_range(0, 60)) - 30);
    w[0] = 8'sd64;
    for (int g = 0; g < NGRP; g++) begin
      if (mode == 0)      off[g] = OFFW'(L + K * g);
      else if (mode == 1) off[g] = OFFW'($urandom_range(8, 66));
      else                off[g] = OFFW'($urandom_range(0, 7));
    end
    for (int n = 0; n < NS; n++) rs[n] = $signed($urandom_range(0, 4000)) - 2000;
    reference();
    @(negedge clk); fill = 1; @(negedge clk); fill = 0;
    while (busy) @(negedge clk);
    clr = 1; r = '0;
    @(negedge clk); clr = 0;
    for (int t = 0; t < NB + 6; t++) begin
      for (int p = 0; p < P; p++) r[p] = RW'(rsample(4 * t + p));
      @(posedge clk); #1;
      // after this edge xhat holds block t-3
      if (t - 3 >= 0 && t - 3 < NB) begin
        for (int p = 0; p < P; p++) begin
          checks++;
          if (xhat[p] != (xb[4 * (t - 3) + p] > 0)) begin
            failures++;
            if (failures < 10) $display("mode %0d block %0d lane %0d: got %0b", mode, t - 3, p, xhat[p]);
          end
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    r = '0; h = '0; w = '0; off = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) run(m);
    // latency: one-block impulse after a quiet stretch with all-zero taps
    h = '0; w = '0; w[0] = 8'sd64;
    for (int g = 0; g < NGRP; g++) off[g] = OFFW'(L + K * g);
    @(negedge clk); fill = 1; @(negedge clk); fill = 0;
    while (busy) @(negedge clk);
    clr = 1; r = '0; @(negedge clk); clr = 0;
    begin
      int seen;
      seen = -1;
      // block 5 is positive, all others negative; the decision for block 5
      // must show up after the fourth clock edge that follows its input.
      for (int t = 0; t < 14; t++) begin
        for (int p = 0; p < P; p++) r[p] = (t == 5) ? 12'sd200 : -12'sd200;
        @(posedge clk); #1;
        if (t >= 3 && xhat == 4'b1111 && seen < 0) seen = t - 5 + 1;
        @(negedge clk);
      end
      checks++;
      if (seen != 4) begin
        failures++;
        $display("latency %0d, expected 4", seen);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
