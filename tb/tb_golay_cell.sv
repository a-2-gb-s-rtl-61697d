// tb_golay_cell: checks single Golay correlator stages with delays that are
// smaller than, equal to, and not multiples of the four-lane width.
//
// For each stage a_out(k) = a_in(k) + W b_in(k-D) and
// b_out(k) = a_in(k) - W b_in(k-D), one clock after sample k enters; the
// delay line starts from zero after reset and again after clr.
module tb_golay_cell;
  import eq60_pkg::*;

  localparam int NB = 200;
  localparam int NC = 6;
  localparam int DS [NC] = '{1, 2, 4, 5, 11, 64};
  localparam bit NS [NC] = '{1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0};
  localparam int IW = RW;

  logic clk = 0, rst_n = 0, clr = 0;
  logic signed [P-1:0][IW-1:0] a_in, b_in;
  logic signed [NC-1:0][P-1:0][IW:0] a_out, b_out;

  int checks = 0, failures = 0;
  int as_ [NB*P];
  int bs_ [NB*P];
  int t0;   // first sample after the last clear

  for (genvar i = 0; i < NC; i++) begin : g_dut
    golay_cell #(.D(DS[i]), .NEG(NS[i]), .IW(IW)) dut (
      .clk, .rst_n, .clr, .a_in, .b_in, .a_out(a_out[i]), .b_out(b_out[i]));
  end

  always #5 clk = ~clk;

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_in = '0; b_in = '0;
    t0 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NB; c++) begin
      if (c == 120) begin
        clr = 1; @(negedge clk); clr = 0;
        t0 = 4 * c;
      end
      for (int p = 0; p < P; p++) begin
        as_[4*c + p] = $signed($urandom_range(0, 4095)) - 2048;
        bs_[4*c + p] = $signed($urandom_range(0, 4095)) - 2048;
        a_in[p] = IW'(as_[4*c + p]);
        b_in[p] = IW'(bs_[4*c + p]);
      end
      @(posedge clk); #1;
      for (int i = 0; i < NC; i++)
        for (int p = 0; p < P; p++) begin
          int k, bd, ea, eb;
          k  = 4*c + p;
          bd = (k - DS[i] >= t0) ? bs_[k - DS[i]] : 0;
          if (NS[i]) bd = -bd;
          ea = as_[k] + bd;
          eb = as_[k] - bd;
          checks++;
          if (int'(signed'(a_out[i][p])) != ea || int'(signed'(b_out[i][p])) != eb) begin
            failures++;
            if (failures < 10) $display("D=%0d k=%0d: %0d/%0d %0d/%0d", DS[i], k,
                                        a_out[i][p], ea, b_out[i][p], eb);
          end
        end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
