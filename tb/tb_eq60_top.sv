// tb_eq60_top: end-to-end test of the test chip at its default size.
//
// The chip's own transmitter drives the receiver, as on the bench:
//  1. reset configuration (ideal channel): no bit errors;
//  2. a multipath channel with pre-cursor taps, sub-DFE and main-DFE range
//     taps and one echo 50 symbols late, reached by moving main-DFE group 3
//     (adjustable tap allocation); DFE taps loaded through the scan chain:
//     no bit errors, four bits per clock;
//  3. same channel with the DFE taps zeroed: the eye is closed, errors;
//  4. correct taps plus noise: some errors, far fewer than half;
//  5. mode switch to estimated taps: a preamble is sent, the channel
//     estimate must equal the emulator taps exactly (no noise), the DFE
//     tables reload by themselves and the link is error free again.
// Every mechanism is counted and a mechanism that never happened fails.
module tb_eq60_top;
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
  int n_scan = 0, n_fill = 0, n_tapmove = 0, n_dfe_off_err = 0, n_noise_err = 0;
  int n_preamble = 0, n_ce_done = 0, n_autofill = 0, n_mode_switch = 0;

  eq60_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(3000000);
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
    n_scan++;
  endtask

  task automatic load_tables();
    @(negedge clk); lut_load = 1; @(negedge clk); lut_load = 0;
    check(lut_busy == 1'b1, "tables busy after lut_load");
    while (lut_busy) @(negedge clk);
    n_fill++;
  endtask

  // Restart the equalizer, let it settle, then count errors for ncyc clocks.
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

  // multipath channel, main cursor at c_5
  task automatic set_channel(ref cfg_t cc);
    cc.emu_coef = '0;
    cc.emu_coef[3]  = 8'sd6;
    cc.emu_coef[4]  = -8'sd16;
    cc.emu_coef[5]  = 8'sd64;
    cc.emu_coef[7]  = 8'sd20;
    cc.emu_coef[10] = -8'sd25;
    cc.emu_coef[14] = 8'sd30;
    cc.emu_coef[20] = 8'sd24;
    cc.emu_coef[31] = 8'sd16;
    cc.emu_coef[50] = 8'sd20;
    cc.le_w = '0;
    cc.le_w[0] = 8'sd64;
    cc.le_w[1] = 8'sd16;
    for (int g = 0; g < NGRP; g++) cc.mdfe_off[g] = OFFW'(L + K * g);
    cc.mdfe_off[3] = 7'd44;       // group 3 covers h_45..h_50
    cc.ce_main = 6'd5;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. reset configuration
    load_tables();
    measure(500, bits, errs);
    check(bits == 4 * 500, "four decisions per clock (ideal channel)");
    check(errs == 0, "ideal channel error free");

    // 2. multipath channel, exact DFE taps from the scan chain
    c = '0;
    set_channel(c);
    for (int l = 1; l <= L + B; l++) begin
      int lag;
      lag = (l <= 26) ? l : l - 26 + 44;   // group 3 moved to lags 45..50
      c.dfe_coef[l-1] = (5 + lag < EMU_TAPS) ? c.emu_coef[5 + lag] : '0;
    end
    scan_cfg(c);
    load_tables();
    n_tapmove++;
    measure(1500, bits, errs);
    $display("multipath, DFE on : %0d errors in %0d bits", errs, bits);
    check(bits == 4 * 1500, "four decisions per clock (multipath)");
    check(errs == 0, "multipath channel equalized error free");

    // 3. DFE taps off
    c.dfe_coef = '0;
    scan_cfg(c);
    load_tables();
    measure(1500, bits, errs);
    $display("multipath, DFE off: %0d errors in %0d bits", errs, bits);
    if (errs > 0) n_dfe_off_err++;

    // 4. noise with the right taps
    for (int l = 1; l <= L + B; l++) begin
      int lag;
      lag = (l <= 26) ? l : l - 26 + 44;
      c.dfe_coef[l-1] = c.emu_coef[5 + lag];
    end
    c.noise_amp = 8'd60;
    scan_cfg(c);
    load_tables();
    measure(1500, bits, errs);
    $display("multipath + noise : %0d errors in %0d bits", errs, bits);
    if (errs > 0) n_noise_err++;
    check(errs < bits / 4, "noise errors well below one half");

    // 5. estimated taps
    c.noise_amp = 8'd0;
    c.dfe_coef  = '0;
    c.use_ce    = 1'b1;
    scan_cfg(c);
    n_mode_switch++;
    @(negedge clk); tx_start = 1; @(negedge clk); tx_start = 0;
    begin
      int t;
      bit saw_busy;
      t = 0;
      saw_busy = 0;
      while (!ce_done && t < 1000) begin
        if (tx_pre) n_preamble = (n_preamble == 0) ? 1 : n_preamble;
        @(negedge clk);
        t++;
      end
      check(ce_done == 1'b1, "channel estimate completes");
      if (ce_done) n_ce_done++;
      for (int k = 0; k < 4; k++) begin
        if (lut_busy) saw_busy = 1;
        @(negedge clk);
      end
      if (saw_busy) n_autofill++;
      while (lut_busy) @(negedge clk);
    end
    for (int t = 0; t < NH; t++) begin
      coef_t e;
      e = c.emu_coef[t];
      ce_raddr = 6'(t);
      #1;
      check(ce_rdata == e, $sformatf("estimate of tap %0d: %0d vs %0d", t, ce_rdata, e));
    end
    measure(1500, bits, errs);
    $display("estimated taps    : %0d errors in %0d bits", errs, bits);
    check(errs == 0, "estimated taps error free");

    check(n_scan > 0,        "scan configuration happened");
    check(n_fill > 0,        "table fill happened");
    check(n_tapmove > 0,     "tap group moved");
    check(n_dfe_off_err > 0, "DFE off gives errors");
    check(n_noise_err > 0,   "noise gives errors");
    check(n_preamble > 0,    "preamble sent");
    check(n_ce_done > 0,     "channel estimate done");
    check(n_autofill > 0,    "automatic table reload after estimate");
    check(n_mode_switch > 0, "switch to estimated taps");
    $display("mechanisms: scan %0d fill %0d tapmove %0d dfe_off_err %0d noise_err %0d preamble %0d ce_done %0d autofill %0d mode_switch %0d",
             n_scan, n_fill, n_tapmove, n_dfe_off_err, n_noise_err, n_preamble, n_ce_done, n_autofill, n_mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
