// tb_chan_emu: checks the 72-tap DA channel emulator.
//
// With random taps and random symbols, each output must equal
//   r(n) = sum_{t=0..71} c_t * x(n-t),   x in {+1,-1},
// one clock after the block holding symbol n enters. The history after
// reset is all -1, which the reference models too. A second tap set is
// loaded on the fly to check the reload.
module tb_chan_emu;
  import eq60_pkg::*;

  localparam int NB = 300;

  logic clk = 0, rst_n = 0, fill = 0;
  coef_t [EMU_TAPS-1:0] coef;
  logic busy;
  logic [P-1:0] x;
  logic signed [P-1:0][CW+6:0] r;

  int checks = 0, failures = 0;
  int xs [NB*P + EMU_TAPS];   // xs[n + EMU_TAPS] = x(n)

  chan_emu dut (.clk, .rst_n, .fill, .coef, .busy, .x, .r);

  always #5 clk = ~clk;

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; coef = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      int fillcyc;
      for (int t = 0; t < EMU_TAPS; t++) coef[t] = coef_t'($urandom_range(0, 255));
      if (run == 2) for (int t = 0; t < EMU_TAPS; t++) coef[t] = 8'sd127;
      fill = 1; @(negedge clk); fill = 0;
      fillcyc = 0;
      while (busy) begin fillcyc++; @(negedge clk); end
      checks++;
      if (fillcyc != 64) begin failures++; $display("fill took %0d clocks", fillcyc); end
      for (int i = 0; i < NB*P + EMU_TAPS; i++) xs[i] = -1;
      // restart from an all -1 history
      x = '0;
      repeat (EMU_TAPS / P + 1) @(negedge clk);
      for (int c = 0; c < NB; c++) begin
        for (int p = 0; p < P; p++) begin
          x[p] = 1'($urandom_range(0, 1));
          xs[4*c + p + EMU_TAPS] = x[p] ? 1 : -1;
        end
        @(posedge clk); #1;
        for (int p = 0; p < P; p++) begin
          int e;
          e = 0;
          for (int t = 0; t < EMU_TAPS; t++) e += int'(coef[t]) * xs[4*c + p - t + EMU_TAPS];
          checks++;
          if (int'(signed'(r[p])) != e) begin
            failures++;
            if (failures < 10) $display("n=%0d: %0d vs %0d", 4*c+p, r[p], e);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
