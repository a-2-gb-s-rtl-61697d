// sdfe: sub-DFE merged with the four slicers, loop-unrolled so that each
// decision feeds back to the next symbol within the same clock.
//
// Decision k = 4c + p is xhat(k) = [ z(k) - s(k) >= 0 ] with
//   s(k) = sum_{l=1..8} h_l * xhat(k-l),   xhat = +1/-1 (bit 1 = +1).
// s(k) is one read of a 256-word DA LUT addressed by the eight previous
// decisions. For symbol p, the p decisions of the same clock are not yet
// known, so all 2**p values of them are tried: 1 + 2 + 4 + 8 = 15 LUT reads,
// each with its own subtractor and slicer, and a multiplexer chain picks
// the right slicer output once the earlier decisions of the block resolve.
// This is the structure of the document's sub-DFE; the document's figure
// also resolves the newest decision of the previous block with a
// multiplexer after the LUT, which is a retiming of the same function and
// is not reproduced: here the LUT is read directly with the registered
// history.
//
// Interface: hist[i] = xhat(4c - 1 - i); z[p] = z(4c + p); xhat[p] is
// combinational. fill/coef/busy load the LUT as in da_lut.
module sdfe
  import eq60_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        fill,
  input  coef_t [L-1:0]               coef,   // h_1..h_L
  output logic                        busy,
  input  logic        [L-1:0]         hist,
  input  logic signed [P-1:0][ZW-1:0] z,
  output logic        [P-1:0]         xhat
);

  localparam int WW  = CW + 4;
  localparam int NRD = (1 << P) - 1;   // 15 speculative reads

  logic        [NRD-1:0][L-1:0]  addr;
  logic signed [NRD-1:0][WW-1:0] word;
  logic        [NRD-1:0]         cand;

  // Address of candidate s for symbol p: bit l-1 is xhat(k-l).
  always_comb begin
    for (int p = 0; p < P; p++)
      for (int s = 0; s < (1 << p); s++)
        for (int l = 1; l <= L; l++)
          addr[(1 << p) - 1 + s][l-1] = (l <= p) ? s[l-1] : hist[l-p-1];
  end

  da_lut #(.K(L), .CW(CW), .WW(WW), .NRD(NRD), .BIPOLAR(1'b1)) u_lut (
    .clk   (clk),
    .rst_n (rst_n),
    .fill  (fill),
    .coef  (coef),
    .busy  (busy),
    .raddr (addr),
    .rdata (word)
  );

  // Speculative slicers.
  always_comb begin
    for (int p = 0; p < P; p++)
      for (int s = 0; s < (1 << p); s++)
        cand[(1 << p) - 1 + s] =
          (32'(signed'(z[p])) - 32'(signed'(word[(1 << p) - 1 + s]))) >= 0;
  end

  // Selection chain.
  always_comb begin
    logic [P-1:0] d;
    d = '0;
    for (int p = 0; p < P; p++) begin
      logic [P-1:0] sel;
      sel = '0;
      for (int l = 1; l <= p; l++) sel[l-1] = d[p-l];
      d[p] = cand[(1 << p) - 1 + int'(sel)];
    end
    xhat = d;
  end

endmodule
