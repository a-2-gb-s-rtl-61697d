// tb_seq_gen: checks the transmitter's sequence generator.
//
// The data symbols outside frames must follow b(n) = b(n-15) xor b(n-14)
// from an all-ones start, and continue unbroken across a frame. A start
// pulse must give, one clock later, 128 blocks flagged by pre, the first
// also by sof, holding [Ga tail 64 | Ga | Ga head 64 | Gb tail 64 | Gb |
// Gb head 64]; the pair is built here from its delay/weight recursion.
module tb_seq_gen;
  import eq60_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [P-1:0] x;
  logic pre, sof;

  int checks = 0, failures = 0;
  logic [GN-1:0] ga, gb;
  bit data [$];
  bit prem [$];
  int nsof, nframe;

  seq_gen dut (.clk, .rst_n, .start, .x, .pre, .sof);

  always #5 clk = ~clk;

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_pair();
    int a [GN], b [GN], na [GN], nb [GN];
    int dl [GSTAGES];
    int wt [GSTAGES];
    dl = '{1, 8, 2, 4, 16, 32, 64};
    wt = '{-1, -1, -1, -1, 1, -1, -1};
    for (int n = 0; n < GN; n++) begin a[n] = int'(n == 0); b[n] = int'(n == 0); end
    for (int s = 0; s < GSTAGES; s++) begin
      for (int n = 0; n < GN; n++) begin
        int bd;
        bd = (n >= dl[s]) ? wt[s] * b[n - dl[s]] : 0;
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

  task automatic check_preamble();
    for (int i = 0; i < PRE_LEN; i++) begin
      int j, k;
      bit e;
      j = i % (2 * GN);
      k = (j + CPLEN) % GN;
      e = (i < 2 * GN) ? ga[k] : gb[k];
      checks++;
      if (prem[i] != e) begin
        failures++;
        if (failures < 10) $display("preamble symbol %0d wrong", i);
      end
    end
  endtask

  initial begin
    make_pair();
    for (int i = 0; i < 15; i++) data.push_back(1'b1);
    nsof = 0; nframe = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 700; c++) begin
      start = (c == 40 || c == 400);
      @(posedge clk); #1;
      if (start) begin
        // the block of the start clock is still data
        checks++;
        if (pre) begin failures++; $display("pre too early"); end
      end
      if (sof) begin
        nsof++;
        checks++;
        if (!pre) begin failures++; $display("sof without pre"); end
        if (prem.size() != 0) begin failures++; $display("sof inside preamble"); end
      end
      if (pre) begin
        for (int p = 0; p < P; p++) prem.push_back(x[p]);
        if (prem.size() == PRE_LEN) begin
          check_preamble();
          prem.delete();
          nframe++;
        end
      end else begin
        checks++;
        if (prem.size() != 0) begin failures++; $display("short preamble"); prem.delete(); end
        for (int p = 0; p < P; p++) data.push_back(x[p]);
      end
      @(negedge clk);
    end
    for (int n = 15; n < data.size(); n++) begin
      checks++;
      if (data[n] != (data[n-15] ^ data[n-14])) begin
        failures++;
        if (failures < 10) $display("PRBS symbol %0d wrong", n);
      end
    end
    checks++;
    if (nsof != 2 || nframe != 2) begin
      failures++;
      $display("%0d sof, %0d full preambles, expected 2 and 2", nsof, nframe);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
