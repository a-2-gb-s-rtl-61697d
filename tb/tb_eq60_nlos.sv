// tb_eq60_nlos: long-delay-spread (NLOS-like) workload on the full chip.
//
// The emulated channel has a direct path at c_5, two pre-cursors and four
// echo clusters whose interference reaches 58 symbols: lags 1..8 (sub-DFE),
// 9..14, 20..25, 35..40 and 53..58. The main-DFE groups are placed on the
// four far clusters (offsets 8, 19, 34, 52) and the DFE taps are taken from
// the on-chip Golay channel estimate (use_ce = 1):
//  1. a preamble is sent; the estimate must equal the 64 channel taps and
//     the equalizer tables must reload themselves; the link is error free;
//  2. with the groups left at the nominal lags 9..32 the far clusters are
//     not cancelled and errors must appear;
//  3. with the moved groups and noise, the bit error rate is reported and
//     must stay well below one half.
// The top runs at its default size.
module tb_eq60_nlos;
  import eq60_pkg::*;

  logic clk = 0, rst_n = 0;
  logic scan_en = 0, scan_in = 0, scan_out, cfg_update = 0;
  logic tx_start = 0, lut_load = 0, eq_clr = 0, bert_clr = 0, bert_en = 0;
  logic [P-1:0] xhat;
  logic tx_pre, lut_busy, ce_busy, ce_done;
  logic [$clog2(NH)-1:0] ce_raddr = '0;
  coef_t ce_rdata;
  logic [31:0] bert_bits, bert_errs;

  int checks = 0, failures = 0;

  eq60_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(4000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic scan_cfg(input cfg_t c);
    logic [CFG_BITS-1:0] v;
    v = c;
    @(negedge clk);
    scan_en = 1;
    for (int i = 0; i < CFG_BITS; i++) begin
      scan_in = v[i];
      @(negedge clk);
    end
    scan_en = 0;
    cfg_update = 1;
    @(negedge clk);
    cfg_update = 0;
  endtask

  task automatic measure(input int ncyc, output int bits, output int errs);
    @(negedge clk); eq_clr = 1; @(negedge clk); eq_clr = 0;
    repeat (100) @(negedge clk);
    bert_clr = 1; @(negedge clk); bert_clr = 0; bert_en = 1;
    repeat (ncyc) @(negedge clk);
    bert_en = 0;
    @(negedge clk);
    bits = int'(bert_bits);
    errs = int'(bert_errs);
  endtask

  cfg_t c;
  int bits, errs;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    c = '0;
    // direct path and pre-cursors
    c.emu_coef[5] = 8'sd64;
    c.emu_coef[4] = -8'sd8;
    c.emu_coef[3] = 8'sd4;
    // clusters: lag = index - 5
    for (int lag = 1; lag <= 8; lag++)   c.emu_coef[5 + lag] = coef_t'(12 - lag);
    for (int lag = 9; lag <= 14; lag++)  c.emu_coef[5 + lag] = coef_t'((lag % 2 != 0) ? 5 : -5);
    for (int lag = 20; lag <= 25; lag++) c.emu_coef[5 + lag] = coef_t'(8 - (lag - 20));
    for (int lag = 35; lag <= 40; lag++) c.emu_coef[5 + lag] = coef_t'(-(12 - (lag - 35)));
    for (int lag = 53; lag <= 58; lag++) c.emu_coef[5 + lag] = coef_t'(12 - (lag - 53));
    c.le_w[0]     = 8'sd64;
    c.mdfe_off[0] = 7'd8;
    c.mdfe_off[1] = 7'd19;
    c.mdfe_off[2] = 7'd34;
    c.mdfe_off[3] = 7'd52;
    c.use_ce      = 1'b1;
    c.ce_main     = 6'd5;
    scan_cfg(c);
    @(negedge clk); lut_load = 1; @(negedge clk); lut_load = 0;
    while (lut_busy) @(negedge clk);

    // 1. estimate, automatic reload, error-free link
    @(negedge clk); tx_start = 1; @(negedge clk); tx_start = 0;
    begin
      int t;
      bit saw_busy;
      t = 0;
      saw_busy = 0;
      while (!ce_done && t < 1000) begin @(negedge clk); t++; end
      check(ce_done == 1'b1, "channel estimate completes");
      for (int k = 0; k < 4; k++) begin
        if (lut_busy) saw_busy = 1;
        @(negedge clk);
      end
      check(saw_busy, "tables reload after the estimate");
      while (lut_busy) @(negedge clk);
    end
    begin
      int nbad;
      nbad = 0;
      for (int t = 0; t < NH; t++) begin
        ce_raddr = 6'(t);
        #1;
        if (ce_rdata != c.emu_coef[t]) nbad++;
      end
      check(nbad == 0, $sformatf("estimate equals the channel (%0d taps differ)", nbad));
    end
    measure(2000, bits, errs);
    $display("NLOS channel, groups moved, estimated taps : %0d errors in %0d bits", errs, bits);
    check(bits == 4 * 2000, "four decisions per clock");
    check(errs == 0, "long channel equalized error free");

    // 2. nominal allocation leaves the far clusters
    for (int g = 0; g < NGRP; g++) c.mdfe_off[g] = OFFW'(L + K * g);
    scan_cfg(c);
    @(negedge clk); lut_load = 1; @(negedge clk); lut_load = 0;
    while (lut_busy) @(negedge clk);
    measure(2000, bits, errs);
    $display("NLOS channel, nominal groups              : %0d errors in %0d bits", errs, bits);
    check(errs > 0, "nominal allocation cannot cancel lags beyond 32");

    // 3. moved groups with noise
    c.mdfe_off[0] = 7'd8;
    c.mdfe_off[1] = 7'd19;
    c.mdfe_off[2] = 7'd34;
    c.mdfe_off[3] = 7'd52;
    c.noise_amp   = 8'd40;
    scan_cfg(c);
    @(negedge clk); lut_load = 1; @(negedge clk); lut_load = 0;
    while (lut_busy) @(negedge clk);
    measure(2000, bits, errs);
    $display("NLOS channel, groups moved, noise amp 40  : %0d errors in %0d bits", errs, bits);
    check(errs < bits / 10, "noisy long channel: error rate below 10 %");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
