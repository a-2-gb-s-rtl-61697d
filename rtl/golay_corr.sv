// golay_corr: efficient Golay correlator (pulse compressor), four samples
// per clock.
//
// Seven golay_cell stages with delays D = 1, 8, 2, 4, 16, 32, 64 and weights
// W = -1, -1, -1, -1, +1, -1, -1 are cascaded, with both stage inputs fed
// by the received sample. The two outputs are the received stream filtered
// by the 128-tap impulse responses a and b that the same recursion
// generates, i.e. correlations with the time-reversed sequences Ga and Gb
// that the transmitter sends (eq60_pkg::golay_seq):
//   ca(n) = sum_{i=0..127} Ga[i] * r(n-127+i),  cb likewise with Gb,
// using 2 x 7 add/subtract per sample instead of 2 x 127. The document
// shows two correlators, CorrA and CorrB; since one pulse compressor yields
// both correlations at once, this implementation shares it. The D/W vector
// is the 128-symbol Golay pair of the IEEE 802.15.3c single-carrier mode.
//
// Timing: input block c appears at the outputs seven clocks later.
module golay_corr
  import eq60_pkg::*;
(
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 clr,
  input  logic signed [P-1:0][RW-1:0]          r,
  output logic signed [P-1:0][RW+GSTAGES-1:0]  ca,
  output logic signed [P-1:0][RW+GSTAGES-1:0]  cb
);

  localparam int OW = RW + GSTAGES;

  // stage i output, sign-extended to the final width
  logic signed [GSTAGES:0][P-1:0][OW-1:0] sa, sb;

  always_comb begin
    for (int p = 0; p < P; p++) begin
      sa[0][p] = OW'(signed'(r[p]));
      sb[0][p] = OW'(signed'(r[p]));
    end
  end

  for (genvar i = 0; i < GSTAGES; i++) begin : g_st
    localparam int IW = RW + i;
    logic signed [P-1:0][IW-1:0] ai, bi;
    logic signed [P-1:0][IW:0]   ao, bo;
    always_comb begin
      for (int p = 0; p < P; p++) begin
        ai[p] = IW'(signed'(sa[i][p]));
        bi[p] = IW'(signed'(sb[i][p]));
      end
    end
    golay_cell #(.D(int'(GDELAY[i])), .NEG(GWNEG[i]), .IW(IW)) u_cell (
      .clk, .rst_n, .clr,
      .a_in (ai), .b_in (bi), .a_out (ao), .b_out (bo)
    );
    always_comb begin
      for (int p = 0; p < P; p++) begin
        sa[i+1][p] = OW'(signed'(ao[p]));
        sb[i+1][p] = OW'(signed'(bo[p]));
      end
    end
  end

  assign ca = sa[GSTAGES];
  assign cb = sb[GSTAGES];

endmodule
