// tb_chan_est: channel estimator test.
//
// The testbench builds the 512-symbol preamble itself (Ga and Gb, each with
// a 64-symbol cyclic prefix and suffix), passes it and random data before
// and after through a random channel of up to 48 taps, and feeds the
// samples four per clock with start in the clock of the first preamble
// block. Without noise the estimate must equal every channel tap exactly;
// taps beyond the channel must read zero. The completion time (PRE_LEN/4 + 7
// clocks after start) is checked. Two channels are run back to back, so the
// restart of the FSMs is exercised too.
module tb_chan_est;
  import eq60_pkg::*;

  localparam int LEADB = 20;                 // data blocks before the preamble
  localparam int NB    = LEADB + PRE_LEN / P + 40;
  localparam int NS    = NB * P;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [P-1:0][RW-1:0] r;
  logic busy, done;
  coef_t [NH-1:0] h_est;
  logic [$clog2(NH)-1:0] raddr = '0;
  coef_t rdata;

  int checks = 0, failures = 0;

  chan_est dut (.clk, .rst_n, .start, .r, .busy, .done, .h_est, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x  [NS];
  int rs [NS];
  int h  [NH];
  logic [GN-1:0] ga, gb;

  task automatic run(input int ntaps);
    int t0, tdone;
    for (int t = 0; t < NH; t++) h[t] = 0;
    for (int t = 0; t < ntaps; t++) h[t] = $signed($urandom_range(0, 60)) - 30;
    h[$urandom_range(0, 10)] = 64;
    for (int n = 0; n < NS; n++) x[n] = ($urandom_range(0, 1) != 0) ? 1 : -1;
    for (int i = 0; i < PRE_LEN; i++) begin
      int j, k;
      j = i % (2 * GN);
      k = (j + CPLEN) % GN;
      x[LEADB * P + i] = ((i < 2 * GN) ? ga[k] : gb[k]) ? 1 : -1;
    end
    for (int n = 0; n < NS; n++) begin
      rs[n] = 0;
      for (int t = 0; t < NH; t++) if (n - t >= 0) rs[n] += h[t] * x[n - t];
    end
    tdone = -1;
    for (int b = 0; b < NB; b++) begin
      for (int p = 0; p < P; p++) r[p] = RW'(rs[4*b + p]);
      start = (b == LEADB);
      @(posedge clk); #1;
      if (b >= LEADB && done && tdone < 0) tdone = b - LEADB + 1;
      @(negedge clk);
    end
    start = 0;
    checks++;
    if (tdone != PRE_LEN / P + 7) begin
      failures++;
      $display("estimate ready after %0d clocks, expected %0d", tdone, PRE_LEN / P + 7);
    end
    for (int t = 0; t < NH; t++) begin
      raddr = 6'(t);
      #1;
      checks++;
      if (int'(rdata) != h[t] || h_est[t] != rdata) begin
        failures++;
        if (failures < 12) $display("tap %0d: %0d, expected %0d", t, rdata, h[t]);
      end
    end
  endtask

  initial begin
    ga = golay_seq(1'b0);
    gb = golay_seq(1'b1);
    r = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(48);
    run(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
