// seq_gen: test sequence generator of the on-chip transmitter, four BPSK
// symbols per clock.
//
// Outside a frame it sends a PRBS-15 data stream (x^15 + x^14 + 1). A pulse
// on start begins a frame: a 512-symbol channel-estimation preamble made of
// two Golay blocks, [Ga tail 64 | Ga 128 | Ga head 64 | Gb tail 64 | Gb 128 |
// Gb head 64], i.e. each 128-symbol sequence with a 64-symbol cyclic prefix
// and suffix, followed by the PRBS data, which continues where it stopped.
// The cyclic extensions make the correlator see periodic sequences for
// channels up to 64 taps, so the Ga and Gb correlations add up to an exact
// impulse. The document only names the generator and says that the
// standard's channel-estimation sequences are Golay based; the preamble
// layout and the PRBS polynomial are this implementation's choices.
//
// Outputs are registered: x[p] is symbol 4c+p (1 = +1), pre marks preamble
// blocks, sof the first preamble block.
module seq_gen
  import eq60_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic [P-1:0] x,
  output logic         pre,
  output logic         sof
);

  localparam logic [GN-1:0] GA = golay_seq(1'b0);
  localparam logic [GN-1:0] GB = golay_seq(1'b1);
  localparam int NPB = PRE_LEN / P;   // preamble blocks

  typedef enum logic {S_DATA, S_PRE} state_t;
  state_t state;

  logic [14:0] prbs;            // prbs[0] is the newest bit
  logic [14:0] prbs_nx;
  logic [P-1:0] dbits;
  logic [$clog2(NPB)-1:0] blk;
  logic [P-1:0] pbits;

  // Four PRBS steps per clock.
  always_comb begin
    logic [14:0] s;
    s = prbs;
    for (int p = 0; p < P; p++) begin
      logic nb;
      nb = s[14] ^ s[13];
      dbits[p] = nb;
      s = {s[13:0], nb};
    end
    prbs_nx = s;
  end

  // Preamble symbols of block blk.
  always_comb begin
    for (int p = 0; p < P; p++) begin
      int i, j;
      logic [$clog2(GN)-1:0] k;
      i = int'(blk) * P + p;
      j = i % (2 * GN);
      k = ($clog2(GN))'((j + CPLEN) % GN);
      pbits[p] = (i < 2 * GN) ? GA[k] : GB[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_DATA;
      prbs  <= '1;
      blk   <= '0;
      x     <= '0;
      pre   <= 1'b0;
      sof   <= 1'b0;
    end else begin
      sof <= 1'b0;
      if (start) begin
        // the start clock still sends data; the preamble follows
        state <= S_PRE;
        blk   <= '0;
        x     <= dbits;
        pre   <= 1'b0;
        prbs  <= prbs_nx;
      end else if (state == S_PRE) begin
        x   <= pbits;
        pre <= 1'b1;
        sof <= (blk == '0);
        blk <= blk + 1'b1;
        if (blk == ($clog2(NPB))'(NPB - 1)) state <= S_DATA;
      end else begin
        x    <= dbits;
        pre  <= 1'b0;
        prbs <= prbs_nx;
      end
    end
  end

endmodule
