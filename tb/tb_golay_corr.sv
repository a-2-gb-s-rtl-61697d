// tb_golay_corr: checks the parallel Golay pulse compressor against a
// brute-force correlation with the transmitted sequences Ga and Gb.
//
// Random 12-bit samples are fed four per clock. The reference computes
//   ca(n) = sum_i Ga[i] * r(n-127+i)   (and cb with Gb)
// directly; the first 127 outputs see the zero history after reset and are
// checked as well. The seven-clock latency is part of the comparison. A
// second check confirms that the pair is complementary (the lag-1
// autocorrelations cancel) and that the package builds the same pair.
module tb_golay_corr;
  import eq60_pkg::*;

  localparam int NB  = 200;
  localparam int NS  = NB * P;
  localparam int OW  = RW + GSTAGES;

  logic clk = 0, rst_n = 0;
  logic signed [P-1:0][RW-1:0] r;
  logic signed [P-1:0][OW-1:0] ca, cb;

  int checks = 0, failures = 0;
  int rs [NS];
  logic [GN-1:0] ga, gb;

  golay_corr dut (.clk, .rst_n, .clr(1'b0), .r, .ca, .cb);

  always #5 clk = ~clk;

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int corr(input logic [GN-1:0] g, input int n);
    int acc = 0;
    for (int i = 0; i < GN; i++) begin
      int k = n - (GN - 1) + i;
      if (k >= 0 && k < NS) acc += (g[i] ? 1 : -1) * rs[k];
    end
    return acc;
  endfunction

  // Independent construction of the pair: a/b recursion, then time reversal.
  task automatic make_pair();
    int a [GN], b [GN], na [GN], nb [GN];
    int dl [GSTAGES] = '{1, 8, 2, 4, 16, 32, 64};
    int wt [GSTAGES] = '{-1, -1, -1, -1, 1, -1, -1};
    for (int n = 0; n < GN; n++) begin a[n] = int'(n == 0); b[n] = int'(n == 0); end
    for (int s = 0; s < GSTAGES; s++) begin
      for (int n = 0; n < GN; n++) begin
        int bd = (n >= dl[s]) ? wt[s] * b[n - dl[s]] : 0;
        na[n] = a[n] + bd;
        nb[n] = a[n] - bd;
      end
      a = na; b = nb;
    end
    for (int n = 0; n < GN; n++) begin
      ga[n] = a[GN-1-n] > 0;
      gb[n] = b[GN-1-n] > 0;
    end
  endtask

  initial begin
    make_pair();
    begin
      // complementary check at zero lag and one side lobe
      int s1a, s1b;
      s1a = 0; s1b = 0;
      for (int i = 0; i < GN - 1; i++) begin
        s1a += (ga[i] == ga[i+1]) ? 1 : -1;
        s1b += (gb[i] == gb[i+1]) ? 1 : -1;
      end
      checks++;
      if (s1a + s1b != 0) begin failures++; $display("pair is not complementary"); end
    end
    checks++;
    if (ga != golay_seq(1'b0) || gb != golay_seq(1'b1)) begin
      failures++; $display("package sequences differ from the reference pair");
    end
    for (int n = 0; n < NS; n++) rs[n] = $signed($urandom_range(0, 4000)) - 2000;
    r = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NB + GSTAGES + 2; t++) begin
      for (int p = 0; p < P; p++) r[p] = (t < NB) ? RW'(rs[4*t + p]) : '0;
      @(posedge clk); #1;
      if (t - GSTAGES + 1 >= 0 && t - GSTAGES + 1 < NB) begin
        int blk, ea, eb;
        blk = t - GSTAGES + 1;
        for (int p = 0; p < P; p++) begin
          ea = corr(ga, 4*blk + p);
          eb = corr(gb, 4*blk + p);
          checks += 2;
          if (int'(signed'(ca[p])) != ea || int'(signed'(cb[p])) != eb) begin
            failures++;
            if (failures < 10) $display("n=%0d ca %0d/%0d cb %0d/%0d", 4*blk+p, ca[p], ea, cb[p], eb);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
