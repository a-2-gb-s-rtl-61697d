// tb_mdfe: checks the 4-way parallel main DFE.
//
// With random taps, random decision histories and random (sometimes
// out-of-range, hence clamped) group offsets, each output must equal
//   y[p] = sum_{g,j} h[6g+j] * xhat(4c+5+p - off[g] - j)
// evaluated here directly from hist (hist[i] = xhat(4c-1-i), 1 = +1).
module tb_mdfe;
  import eq60_pkg::*;

  logic clk = 0, rst_n = 0, fill = 0;
  coef_t [B-1:0] coef;
  logic [NGRP-1:0][OFFW-1:0] off;
  logic busy;
  logic [REACH-1:0] hist;
  logic signed [P-1:0][CW+4:0] y;

  int checks = 0, failures = 0;

  mdfe dut (.clk, .rst_n, .fill, .coef, .off, .busy, .hist, .y);

  always #5 clk = ~clk;

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '0; off = '0; coef = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      for (int i = 0; i < B; i++) coef[i] = coef_t'($urandom_range(0, 255));
      for (int g = 0; g < NGRP; g++)
        off[g] = (run == 0) ? OFFW'(L + K * g) : OFFW'($urandom_range(0, 127));
      fill = 1; @(negedge clk); fill = 0;
      while (busy) @(negedge clk);
      for (int v = 0; v < 200; v++) begin
        for (int i = 0; i < REACH; i++) hist[i] = 1'($urandom_range(0, 1));
        #1;
        for (int p = 0; p < P; p++) begin
          int e;
          e = 0;
          for (int g = 0; g < NGRP; g++) begin
            int o;
            o = int'(off[g]);
            if (o < 8) o = 8;
            if (o > REACH - K) o = REACH - K;
            for (int j = 1; j <= K; j++) begin
              int lagidx;   // xhat(4c+5+p-o-j) = hist[o+j-6-p]
              lagidx = o + j - 6 - p;
              e += int'(coef[g*K + j - 1]) * (hist[lagidx] ? 1 : -1);
            end
          end
          checks++;
          if (int'(signed'(y[p])) != e) begin
            failures++;
            if (failures < 10) $display("run %0d lane %0d: %0d vs %0d", run, p, y[p], e);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
