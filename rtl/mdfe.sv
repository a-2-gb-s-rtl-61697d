// mdfe: main decision-feedback equalizer, a 4-way parallel 24-tap
// distributed-arithmetic FIR over past BPSK decisions.
//
// For each of the P = 4 outputs p the filter computes
//   y[p] = sum_{g=0..3} sum_{j=1..6} h[6g+j] * xhat(n_p - off[g] - j)
// where n_p = 4c + LEAD + p is the sample the output will be subtracted from
// in clock c and xhat = +1/-1. As in the document, the 24 taps are split into
// four groups of six and each group is one 64-word LUT (da_lut) addressed by
// six decisions; the four parallel outputs read the same LUT through four
// read ports, so four multi-ported tables replace sixteen. The document's
// tap assignment h_{L+1}..h_{L+24} is the default off[g] = L + 6g.
//
// Adjustable tap allocation: a multiplexer in front of every LUT address bit
// picks the decision from the history at the group's offset off[g], so each
// group of six taps can be placed anywhere up to REACH (72) symbols back.
// Offsets are clamped to [LEAD + P - 1, REACH - 6]; the lower limit is the
// oldest-decision requirement of the single-cycle feedback loop.
//
// Interface: hist[i] is decision xhat(4c - 1 - i), i.e. bit 0 is the newest
// decision already registered. y is combinational from hist.
module mdfe
  import eq60_pkg::*;
#(
  parameter int LEAD  = A - 1,
  parameter int HN    = REACH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          fill,
  input  coef_t [B-1:0]                 coef,   // h_{L+1}..h_{L+B}
  input  logic  [NGRP-1:0][OFFW-1:0]    off,
  output logic                          busy,
  input  logic  [HN-1:0]                hist,
  output logic signed [P-1:0][CW+4:0]   y
);

  localparam int WW     = CW + 3;
  localparam int MINOFF = LEAD + P - 1;
  localparam int MAXOFF = REACH - K;

  logic [NGRP-1:0]                       gbusy;
  logic [NGRP-1:0][P-1:0][K-1:0]         addr;
  logic signed [NGRP-1:0][P-1:0][WW-1:0] word;

  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    int eff;
    always_comb begin
      eff = int'(off[g]);
      if (eff < MINOFF) eff = MINOFF;
      if (eff > MAXOFF) eff = MAXOFF;
      for (int p = 0; p < P; p++)
        for (int j = 1; j <= K; j++)
          addr[g][p][j-1] = hist[eff + j - 1 - LEAD - p];
    end

    da_lut #(.K(K), .CW(CW), .WW(WW), .NRD(P), .BIPOLAR(1'b1)) u_lut (
      .clk   (clk),
      .rst_n (rst_n),
      .fill  (fill),
      .coef  (coef[g*K +: K]),
      .busy  (gbusy[g]),
      .raddr (addr[g]),
      .rdata (word[g])
    );
  end

  always_comb begin
    for (int p = 0; p < P; p++) begin
      y[p] = '0;
      for (int g = 0; g < NGRP; g++) y[p] = y[p] + (CW+5)'(signed'(word[g][p]));
    end
  end

  assign busy = |gbusy;

endmodule
