// tb_awgn_gen: checks the noise generator.
//
// amp = 0 must give silence. For amp = 100 the lanes must have a mean near
// zero, a standard deviation near 0.58 * amp (within 10 %), no lane equal to
// another, and a sample distribution that is bell shaped (more than 60 %
// within one standard deviation, under 10 % beyond two), per lane as well
// as together, and halving amp must halve the standard deviation.
module tb_awgn_gen;
  import eq60_pkg::*;

  localparam int NS = 5000;

  logic clk = 0, rst_n = 0;
  logic [7:0] amp;
  logic signed [P-1:0][RW-1:0] n;

  int checks = 0, failures = 0;

  awgn_gen dut (.clk, .rst_n, .amp, .n);

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

  real v [NS*P];

  initial begin
    amp = 8'd0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    begin
      int nz;
      nz = 0;
      for (int c = 0; c < 200; c++) begin
        @(negedge clk);
        if (n != '0) nz++;
      end
      check(nz == 0, "amp = 0 gives no noise");
    end
    amp = 8'd100;
    repeat (2) @(negedge clk);
    begin
      real mean, var_, sd;
      int in1, out2, same;
      same = 0;
      for (int c = 0; c < NS; c++) begin
        @(negedge clk);
        for (int p = 0; p < P; p++) v[c*P + p] = real'(int'(signed'(n[p])));
        if (n[0] == n[1] && n[1] == n[2] && n[2] == n[3]) same++;
      end
      mean = 0.0;
      foreach (v[i]) mean += v[i];
      mean /= NS * P;
      var_ = 0.0;
      foreach (v[i]) var_ += (v[i] - mean) * (v[i] - mean);
      sd = $sqrt(var_ / (NS * P));
      in1 = 0; out2 = 0;
      foreach (v[i]) begin
        if ((v[i] - mean) < sd && (v[i] - mean) > -sd) in1++;
        if ((v[i] - mean) > 2.0 * sd || (v[i] - mean) < -2.0 * sd) out2++;
      end
      $display("mean %f sd %f  within 1 sd %0d  beyond 2 sd %0d of %0d", mean, sd, in1, out2, NS*P);
      check(mean < 3.0 && mean > -3.0, "mean near zero");
      check(sd > 0.9 * 58.0 && sd < 1.1 * 58.0, "standard deviation near 0.58 * amp");
      check(in1 > NS * P * 6 / 10, "bell shape: mass near the centre");
      check(out2 < NS * P / 10, "bell shape: thin tails");
      check(same < NS / 100, "lanes are independent");
      // every lane on its own
      for (int p = 0; p < P; p++) begin
        real m, q;
        m = 0.0; q = 0.0;
        for (int c = 0; c < NS; c++) m += v[c*P + p];
        m /= NS;
        for (int c = 0; c < NS; c++) q += (v[c*P + p] - m) * (v[c*P + p] - m);
        q = $sqrt(q / NS);
        check(m < 5.0 && m > -5.0, $sformatf("lane %0d mean %f", p, m));
        check(q > 0.85 * 58.0 && q < 1.15 * 58.0, $sformatf("lane %0d sd %f", p, q));
      end
    end
    // the standard deviation scales with amp
    amp = 8'd50;
    repeat (2) @(negedge clk);
    begin
      real q, m;
      m = 0.0; q = 0.0;
      for (int c = 0; c < NS; c++) begin
        @(negedge clk);
        for (int p = 0; p < P; p++) begin
          m += real'(int'(signed'(n[p])));
          q += real'(int'(signed'(n[p]))) * real'(int'(signed'(n[p])));
        end
      end
      m /= NS * P;
      q = $sqrt(q / (NS * P) - m * m);
      $display("amp 50: sd %f", q);
      check(q > 0.9 * 29.0 && q < 1.1 * 29.0, "standard deviation near 0.58 * amp at amp = 50");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
