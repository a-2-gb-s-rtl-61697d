// tb_le_da: checks the distributed-arithmetic linear equalizer.
//
// Random taps and random 12-bit inputs, including the most negative value;
// each output must equal floor(sum_i w_i * u(k+i-1) / 64), saturated to 16
// bits, computed here with ordinary multiplications.
module tb_le_da;
  import eq60_pkg::*;

  logic clk = 0, rst_n = 0, fill = 0;
  coef_t [A-1:0] w;
  logic busy;
  logic signed [A+P-2:0][UW-1:0] u;
  logic signed [P-1:0][ZW-1:0] z;

  int checks = 0, failures = 0;

  le_da dut (.clk, .rst_n, .fill, .w, .busy, .u, .z);

  always #5 clk = ~clk;

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u = '0; w = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 5; run++) begin
      for (int i = 0; i < A; i++) w[i] = coef_t'($urandom_range(0, 255));
      if (run == 0) for (int i = 0; i < A; i++) w[i] = -8'sd128;
      fill = 1; @(negedge clk); fill = 0;
      while (busy) @(negedge clk);
      for (int v = 0; v < 300; v++) begin
        for (int t = 0; t < A + P - 1; t++)
          u[t] = (v % 50 == 0) ? -12'sd2048 : UW'($urandom_range(0, 4095));
        #1;
        for (int p = 0; p < P; p++) begin
          int acc, e;
          acc = 0;
          for (int i = 1; i <= A; i++) acc += int'(w[i-1]) * int'(signed'(u[p + i - 1]));
          e = acc >>> FRAC;
          if (e > 32767) e = 32767;
          if (e < -32768) e = -32768;
          checks++;
          if (int'(signed'(z[p])) != e) begin
            failures++;
            if (failures < 10) $display("lane %0d: %0d vs %0d", p, z[p], e);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
