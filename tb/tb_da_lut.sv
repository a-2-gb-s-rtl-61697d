// tb_da_lut: checks the distributed-arithmetic table in both codings.
//
// For random coefficients every word is read back through every read port
// and compared with the inner product computed here: +c_j for a set
// address bit and -c_j (bipolar) or 0 (unipolar) for a clear one. The fill
// must take exactly 2**K clocks of busy, and reads before any fill return 0.
module tb_da_lut;

  localparam int K  = 6;
  localparam int CW = 8;
  localparam int WW = CW + 3;
  localparam int NRD = 3;

  logic clk = 0, rst_n = 0, fill = 0;
  logic signed [K-1:0][CW-1:0] coef;
  logic busy_b, busy_u;
  logic [NRD-1:0][K-1:0] raddr;
  logic signed [NRD-1:0][WW-1:0] rd_b, rd_u;

  int checks = 0, failures = 0;

  da_lut #(.K(K), .CW(CW), .WW(WW), .NRD(NRD), .BIPOLAR(1'b1)) dut_b (
    .clk, .rst_n, .fill, .coef, .busy(busy_b), .raddr, .rdata(rd_b));
  da_lut #(.K(K), .CW(CW), .WW(WW), .NRD(NRD), .BIPOLAR(1'b0)) dut_u (
    .clk, .rst_n, .fill, .coef, .busy(busy_u), .raddr, .rdata(rd_u));

  always #5 clk = ~clk;

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr = '0;
    coef = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (rd_b[0] != 0 || rd_u[0] != 0) begin failures++; $display("not cleared at reset"); end
    for (int run = 0; run < 4; run++) begin
      int cyc;
      for (int j = 0; j < K; j++) coef[j] = CW'($urandom_range(0, 255));
      if (run == 0) for (int j = 0; j < K; j++) coef[j] = -8'sd128;   // extreme value
      fill = 1; @(negedge clk); fill = 0;
      cyc = 0;
      while (busy_b) begin cyc++; @(negedge clk); end
      checks++;
      if (cyc != (1 << K)) begin failures++; $display("fill took %0d clocks", cyc); end
      for (int a = 0; a < (1 << K); a++) begin
        int eb, eu;
        eb = 0; eu = 0;
        for (int j = 0; j < K; j++) begin
          int cj;
          cj = int'(signed'(coef[j]));
          eb += a[j] ? cj : -cj;
          eu += a[j] ? cj : 0;
        end
        for (int r = 0; r < NRD; r++) raddr[r] = K'((a + r * 7) % (1 << K));
        #1;
        for (int r = 0; r < NRD; r++) begin
          int ab, ebr, eur;
          ab = (a + r * 7) % (1 << K);
          ebr = 0; eur = 0;
          for (int j = 0; j < K; j++) begin
            ebr += ab[j] ? int'(signed'(coef[j])) : -int'(signed'(coef[j]));
            eur += ab[j] ? int'(signed'(coef[j])) : 0;
          end
          checks += 2;
          if (int'(signed'(rd_b[r])) != ebr) begin failures++; if (failures < 10) $display("bipolar a=%0d port %0d: %0d vs %0d", ab, r, rd_b[r], ebr); end
          if (int'(signed'(rd_u[r])) != eur) begin failures++; if (failures < 10) $display("unipolar a=%0d port %0d: %0d vs %0d", ab, r, rd_u[r], eur); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
