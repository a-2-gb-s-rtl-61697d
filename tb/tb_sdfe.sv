// tb_sdfe: checks the loop-unrolled sub-DFE with its slicers.
//
// For random taps, histories and LE outputs, the four decisions of a clock
// are worked out one after the other, each using the decisions before it:
//   xhat(k) = [ z(k) - sum_{l=1..8} h_l * xhat(k-l) >= 0 ].
// z is kept small so that the feedback decides most symbols.
module tb_sdfe;
  import eq60_pkg::*;

  logic clk = 0, rst_n = 0, fill = 0;
  coef_t [L-1:0] coef;
  logic busy;
  logic [L-1:0] hist;
  logic signed [P-1:0][ZW-1:0] z;
  logic [P-1:0] xhat;

  int checks = 0, failures = 0;

  sdfe dut (.clk, .rst_n, .fill, .coef, .busy, .hist, .z, .xhat);

  always #5 clk = ~clk;

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '0; z = '0; coef = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 5; run++) begin
      int fillcyc;
      for (int i = 0; i < L; i++) coef[i] = coef_t'($urandom_range(0, 255));
      fill = 1; @(negedge clk); fill = 0;
      fillcyc = 0;
      while (busy) begin fillcyc++; @(negedge clk); end
      checks++;
      if (fillcyc != 256) begin failures++; $display("fill %0d clocks", fillcyc); end
      for (int v = 0; v < 500; v++) begin
        int xs [-L:P-1];
        hist = L'($urandom_range(0, 255));
        for (int p = 0; p < P; p++) z[p] = ZW'($signed($urandom_range(0, 1200)) - 600);
        for (int i = 0; i < L; i++) xs[-1 - i] = hist[i] ? 1 : -1;
        for (int p = 0; p < P; p++) begin
          int s;
          s = 0;
          for (int l = 1; l <= L; l++) s += int'(coef[l-1]) * xs[p - l];
          xs[p] = (int'(signed'(z[p])) - s >= 0) ? 1 : -1;
        end
        #1;
        for (int p = 0; p < P; p++) begin
          checks++;
          if (xhat[p] != (xs[p] > 0)) begin
            failures++;
            if (failures < 10) $display("lane %0d wrong", p);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
