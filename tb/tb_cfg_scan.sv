// tb_cfg_scan: checks the configuration scan chain.
//
// After reset cfg must hold the documented defaults. Random images are
// shifted in bit 0 first; cfg must not change while shifting, must equal the
// image after update, and the previous image must come out on scan_out.
module tb_cfg_scan;
  import eq60_pkg::*;

  logic clk = 0, rst_n = 0, scan_en = 0, scan_in = 0, update = 0;
  logic scan_out;
  cfg_t cfg;

  int checks = 0, failures = 0;

  cfg_scan dut (.clk, .rst_n, .scan_en, .scan_in, .scan_out, .update, .cfg);

  always #5 clk = ~clk;

  initial begin
    #(1000000);
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

  initial begin
    logic [CFG_BITS-1:0] img, prev, got, was;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cfg.emu_coef[5] == 8'sd64, "default main channel tap");
    check(cfg.le_w[0] == 8'sd64, "default LE pass-through");
    check(cfg.dfe_coef == '0, "default DFE taps zero");
    for (int g = 0; g < NGRP; g++)
      check(int'(cfg.mdfe_off[g]) == L + K * g, "default group offsets");
    check(cfg.noise_amp == '0 && cfg.use_ce == 1'b0 && cfg.ce_main == 6'd5, "default modes");
    prev = '0;
    for (int run = 0; run < 4; run++) begin
      for (int i = 0; i < CFG_BITS; i++) img[i] = 1'($urandom_range(0, 1));
      was = cfg;
      got = '0;
      scan_en = 1;
      for (int i = 0; i < CFG_BITS; i++) begin
        scan_in = img[i];
        got[i] = scan_out;
        @(negedge clk);
      end
      scan_en = 0;
      check(CFG_BITS'(cfg) == was, "cfg stable while shifting");
      check(got == prev, "previous image on scan_out");
      repeat (3) @(negedge clk);
      update = 1; @(negedge clk); update = 0;
      check(CFG_BITS'(cfg) == img, "cfg equals shifted image");
      prev = img;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
