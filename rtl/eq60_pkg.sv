// eq60_pkg: constants, number formats and shared types of the 60 GHz
// single-carrier BPSK equalizer test chip.
//
// The datapath handles P = 4 symbols per clock. Tap counts follow the
// equalizer split of the design: a 6-tap linear pre-cursor equalizer (A),
// an 8-tap sub-DFE (L) and a 24-tap main DFE (B) built from four 6-input
// distributed-arithmetic LUTs; the channel emulator has 72 taps in twelve
// 6-input LUTs. Word lengths are this implementation's choice: coefficients
// are 8-bit two's complement with 64 representing 1.0, received samples are
// 12-bit with the same scale. BPSK symbols are carried as one bit, 1 = +1
// and 0 = -1.
//
// Linting this package on its own reports several constants as unused;
// they are used by the modules that import it.
//
// The Golay pair used by the channel estimator is the 128-symbol pair built
// from the delay vector D = {1,8,2,4,16,32,64} and weights
// W = {-1,-1,-1,-1,+1,-1,-1}; golay_seq() returns the transmitted
// (time-reversed) sequences so that the pulse compressor built from the same
// D and W is their matched filter.
package eq60_pkg;

  localparam int P        = 4;    // symbols per clock
  localparam int A        = 6;    // linear equalizer taps
  localparam int L        = 8;    // sub-DFE taps
  localparam int B        = 24;   // main-DFE taps
  localparam int K        = 6;    // inputs per main DA LUT (64 words)
  localparam int NGRP     = B / K;  // main-DFE LUTs (4)
  localparam int EMU_TAPS = 72;   // channel emulator taps
  localparam int EMU_LUTS = EMU_TAPS / K;  // 12
  localparam int REACH    = 72;   // farthest ISI the main DFE can cancel
  localparam int OFFW     = 7;    // width of a tap-group offset

  localparam int CW       = 8;    // coefficient width
  localparam int FRAC     = 6;    // coefficient fraction bits (64 = 1.0)
  localparam int RW       = 12;   // received sample width
  localparam int UW       = 12;   // LE input width (after M-DFE subtraction)
  localparam int ZW       = 16;   // LE output width

  localparam int GN       = 128;  // Golay sequence length
  localparam int GSTAGES  = 7;
  localparam int CPLEN    = 64;   // cyclic prefix / suffix of each Golay block
  localparam int PRE_LEN  = 2 * (GN + 2 * CPLEN);  // 512 preamble symbols
  localparam int NH       = 64;   // channel estimate length

  typedef int unsigned gint_arr_t [GSTAGES];
  localparam gint_arr_t GDELAY = '{1, 8, 2, 4, 16, 32, 64};
  localparam logic [GSTAGES-1:0] GWNEG = 7'b1101111;  // bit i set: W[i] = -1 (i=0 is D=1)

  typedef logic signed [CW-1:0] coef_t;

  // Everything the scan chain configures.
  typedef struct packed {
    coef_t [EMU_TAPS-1:0]  emu_coef;   // channel emulator taps c_0..c_71 (c_5 = main tap)
    coef_t [L+B-1:0]       dfe_coef;   // h_1..h_32: [0..7] sub-DFE, [8..31] main DFE
    coef_t [A-1:0]         le_w;       // w_1..w_6, w_1 weights the current sample
    logic  [NGRP-1:0][OFFW-1:0] mdfe_off;  // decision delay in front of each main-DFE LUT
    logic  [7:0]           noise_amp;  // AWGN amplitude, 0 = off
    logic                  use_ce;     // take h_1..h_32 from the channel estimate
    logic  [5:0]           ce_main;    // CE memory index of the main tap
  } cfg_t;

  localparam int CFG_BITS = $bits(cfg_t);

  // Golay sequences as transmitted, bit i = symbol i, 1 = +1.
  function automatic logic [GN-1:0] golay_seq(input bit sel_b);
    int a [GN];
    int b [GN];
    int na [GN];
    int nb [GN];
    logic [GN-1:0] s;
    for (int n = 0; n < GN; n++) begin a[n] = 0; b[n] = 0; end
    a[0] = 1; b[0] = 1;
    for (int i = 0; i < GSTAGES; i++) begin
      for (int n = 0; n < GN; n++) begin
        int bd;
        bd = (n >= int'(GDELAY[i])) ? b[n - int'(GDELAY[i])] : 0;
        if (GWNEG[i]) bd = -bd;
        na[n] = a[n] + bd;
        nb[n] = a[n] - bd;
      end
      for (int n = 0; n < GN; n++) begin a[n] = na[n]; b[n] = nb[n]; end
    end
    for (int n = 0; n < GN; n++)
      s[n] = sel_b ? (b[GN-1-n] > 0) : (a[GN-1-n] > 0);
    return s;
  endfunction

  // Saturate a wide signed value to W bits.
  function automatic logic signed [31:0] sat(input logic signed [31:0] v, input int w);
    logic signed [31:0] hi, lo;
    hi = (32'sd1 <<< (w - 1)) - 1;
    lo = -(32'sd1 <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

endpackage
