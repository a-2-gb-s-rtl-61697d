// equalizer: hybrid LE + DFE equalizer for BPSK, four symbols per clock.
//
// Signal flow (symbol k, decisions xhat = +1/-1):
//   u(n)    = sat( r(n) - sum_{g,j} h[L+6g+j] * xhat(n - off[g] - j) )  main DFE
//   z(k)    = floor( sum_{i=1..6} w_i * u(k+i-1) / 64 )                  LE
//   xhat(k) = sign( z(k) - sum_{l=1..8} h_l * xhat(k-l) )               sub-DFE
// The main-DFE output is subtracted at the LE input, as in the document, so
// the channel estimate can be used for the DFE taps without recomputation.
// The LE looks five samples ahead, so the main DFE must have finished with
// decision k-9 by the time z(k) is formed. With four symbols per clock that
// leaves exactly one clock: the loop registered-decisions -> main DFE ->
// LE -> sub-DFE/slicers -> decision register closes in a single cycle. This
// is why the document builds the filters as DA look-up tables (short
// latency) and loop-unrolls the sub-DFE. The main DFE evaluates four new
// u samples per clock, u(4c+5..4c+8); the five older samples the LE still
// needs are kept in a small history.
//
// Timing: block b of four samples presented on r at clock b is decided at
// clock b+3 and appears on xhat at clock b+4 (latency 4 clocks). xhat[p] is
// symbol 4b+p. fill reloads all DA tables from h/w (busy while loading);
// off sets the tap allocation of the main DFE (default L + 6g). clr is a
// synchronous restart of the datapath state (sample pipeline, u history,
// decision history, all decisions -1) that leaves the tables loaded; the
// restart input is this implementation's addition.
//
// The document's block diagram draws pipeline registers after the main-DFE
// subtraction and before the slicer. They are not reproduced: with the LE
// look-ahead of five samples and the first main-DFE lag at 9, the budget is
// one clock, so the decision register is the only register in the loop.
module equalizer
  import eq60_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         fill,
  input  logic                         clr,
  input  coef_t [L+B-1:0]              h,      // h_1..h_32
  input  coef_t [A-1:0]                w,      // w_1..w_6
  input  logic  [NGRP-1:0][OFFW-1:0]   off,
  output logic                         busy,
  input  logic signed [P-1:0][RW-1:0]  r,
  output logic        [P-1:0]          xhat
);

  localparam int UH      = A - 1;     // u samples kept from earlier clocks

  logic signed [P-1:0][RW-1:0]     r_d1, r_d2;
  logic        [REACH-1:0]         hist;     // hist[i] = xhat(4c-1-i)
  logic signed [UH-1:0][UW-1:0]    uh;       // uh[t] = u(4c+t)
  logic signed [P-1:0][CW+4:0]     y;
  logic signed [P-1:0][UW-1:0]     unew;     // u(4c+5+p)
  logic signed [A+P-2:0][UW-1:0]   uwin;
  logic signed [P-1:0][ZW-1:0]     z;
  logic        [P-1:0]             dec;
  logic                            busy_m, busy_l, busy_s;

  mdfe #(.LEAD(A - 1), .HN(REACH)) u_mdfe (
    .clk, .rst_n, .fill,
    .coef (h[L +: B]),
    .off  (off),
    .busy (busy_m),
    .hist (hist),
    .y    (y)
  );

  // Samples 4c+5..4c+8: lanes 1..3 of block c+1 and lane 0 of block c+2.
  always_comb begin
    for (int p = 0; p < P; p++) begin
      logic signed [31:0] rv;
      rv = (p < P - 1) ? 32'(signed'(r_d2[p+1])) : 32'(signed'(r_d1[0]));
      unew[p] = UW'(sat(rv - 32'(signed'(y[p])), UW));
    end
    for (int t = 0; t < UH; t++)       uwin[t]      = uh[t];
    for (int p = 0; p < P; p++)        uwin[UH + p] = unew[p];
  end

  le_da u_le (
    .clk, .rst_n, .fill,
    .w    (w),
    .busy (busy_l),
    .u    (uwin),
    .z    (z)
  );

  sdfe u_sdfe (
    .clk, .rst_n, .fill,
    .coef (h[0 +: L]),
    .busy (busy_s),
    .hist (hist[L-1:0]),
    .z    (z),
    .xhat (dec)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_d1 <= '0;
      r_d2 <= '0;
      hist <= '0;
      uh   <= '0;
      xhat <= '0;
    end else if (clr) begin
      r_d1 <= '0;
      r_d2 <= '0;
      hist <= '0;
      uh   <= '0;
      xhat <= '0;
    end else begin
      r_d1 <= r;
      r_d2 <= r_d1;
      hist <= {hist[REACH-P-1:0], dec[0], dec[1], dec[2], dec[3]};
      uh   <= {unew, uh[UH-1]};
      xhat <= dec;
    end
  end

  assign busy = busy_m | busy_l | busy_s;

endmodule
