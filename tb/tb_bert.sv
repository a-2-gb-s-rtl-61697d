// tb_bert: checks the bit error rate tester.
//
// The decisions fed in are the transmitted symbols delayed by DLY = 29
// symbols with errors injected at random; the bit and error counters must
// match the testbench's own counts over enabled clocks only, and clr must
// zero them.
module tb_bert;
  import eq60_pkg::*;

  localparam int DLY = 29;
  localparam int NB  = 2000;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [P-1:0] x, xhat;
  logic [31:0] bits, errs;

  int checks = 0, failures = 0;
  bit xs [NB*P + DLY];      // xs[n + DLY] = x(n); x before the start is 0

  bert #(.DLY(DLY)) dut (.clk, .rst_n, .clr, .en, .x, .xhat, .bits, .errs);

  always #5 clk = ~clk;

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ebits, eerrs;
    x = '0; xhat = '0;
    foreach (xs[i]) xs[i] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ebits = 0; eerrs = 0;
    for (int c = 0; c < NB; c++) begin
      en  = (c % 7 != 3) && (c > 10);
      clr = (c == 1000);
      for (int p = 0; p < P; p++) begin
        int n;
        bit flip;
        n = 4*c + p;
        x[p] = 1'($urandom_range(0, 1));
        xs[n + DLY] = x[p];
        flip = ($urandom_range(0, 19) == 0);
        xhat[p] = xs[n] ^ flip;
        if (en && !clr && flip) eerrs++;
      end
      if (clr) begin ebits = 0; eerrs = 0; end
      else if (en) ebits += P;
      @(posedge clk); #1;
      checks++;
      if (int'(bits) != ebits || int'(errs) != eerrs) begin
        failures++;
        if (failures < 10) $display("clock %0d: %0d/%0d vs %0d/%0d", c, bits, errs, ebits, eerrs);
      end
      @(negedge clk);
    end
    $display("final: %0d errors in %0d bits", errs, bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
