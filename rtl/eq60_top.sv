// eq60_top: test chip of the 60 GHz single-carrier BPSK receiver baseband.
//
// Transmit side (for self test): seq_gen -> chan_emu (72-tap channel) ->
// + awgn_gen noise -> received samples r, saturated to RW bits.
// Receive side: r feeds the equalizer (LE + main DFE + sub-DFE, four
// decisions per clock) and the Golay channel estimator; the BERT compares
// the decisions with the transmitted symbols. Everything is set through the
// configuration scan chain (cfg_scan).
//
// DFE taps: with cfg.use_ce = 0 they come from the scan chain; with
// use_ce = 1 they are read from the channel estimate, tap h_l at CE index
// ce_main + l (sub-DFE l = 1..8, main-DFE group g tap j at l = off[g] + j,
// so the estimate follows the adjustable tap allocation). Using the channel
// estimate directly as DFE taps is what feeding the main DFE back to the LE
// input allows. The LE taps w always come from the scan chain: the document
// computes them elsewhere (MMSE or frequency-domain inversion).
//
// Table loading (equalizer memory initialisation): lut_load reloads all DA
// tables (channel emulator and equalizer) from the active configuration;
// with use_ce = 1 the equalizer tables are reloaded automatically when a
// channel estimate completes.
//
// Timing: a transmitted block leaves seq_gen at clock t, reaches the
// equalizer input at t+2 and its decisions appear at t+6. With the
// emulator's main tap at c_5, decision symbol n is transmitted symbol n-5,
// so the BERT reference delay is 6*4 + 5 = 29 symbols. tx_start sends a
// 512-symbol preamble; the estimator is started when it reaches r.
module eq60_top
  import eq60_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration scan chain
  input  logic                    scan_en,
  input  logic                    scan_in,
  output logic                    scan_out,
  input  logic                    cfg_update,
  // control
  input  logic                    tx_start,
  input  logic                    lut_load,
  input  logic                    eq_clr,
  input  logic                    bert_clr,
  input  logic                    bert_en,
  // status and results
  output logic [P-1:0]            xhat,
  output logic                    tx_pre,
  output logic                    lut_busy,
  output logic                    ce_busy,
  output logic                    ce_done,
  input  logic [$clog2(NH)-1:0]   ce_raddr,
  output coef_t                   ce_rdata,
  output logic [31:0]             bert_bits,
  output logic [31:0]             bert_errs
);

  localparam int BERT_DLY = 6 * P + (A - 1);

  cfg_t cfg;

  logic [P-1:0]                x_tx;
  logic                        sof;
  logic signed [P-1:0][CW+6:0] r_emu;
  logic signed [P-1:0][RW-1:0] noise;
  logic signed [P-1:0][RW-1:0] r_rx;
  logic                        sof_d1, sof_d2, ce_done_d;
  logic                        emu_busy, eq_busy, eq_fill;
  coef_t [NH-1:0]              h_est;
  coef_t [L+B-1:0]             h_eq;

  cfg_scan u_cfg (
    .clk, .rst_n, .scan_en, .scan_in, .scan_out,
    .update (cfg_update),
    .cfg    (cfg)
  );

  seq_gen u_seq (.clk, .rst_n, .start(tx_start), .x(x_tx), .pre(tx_pre), .sof);

  chan_emu u_emu (
    .clk, .rst_n,
    .fill (lut_load),
    .coef (cfg.emu_coef),
    .busy (emu_busy),
    .x    (x_tx),
    .r    (r_emu)
  );

  awgn_gen u_awgn (.clk, .rst_n, .amp(cfg.noise_amp), .n(noise));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_rx      <= '0;
      sof_d1    <= 1'b0;
      sof_d2    <= 1'b0;
      ce_done_d <= 1'b0;
    end else begin
      for (int p = 0; p < P; p++)
        r_rx[p] <= RW'(sat(32'(signed'(r_emu[p])) + 32'(signed'(noise[p])), RW));
      sof_d1    <= sof;
      sof_d2    <= sof_d1;
      ce_done_d <= ce_done;
    end
  end

  chan_est u_ce (
    .clk, .rst_n,
    .start (sof_d2),
    .r     (r_rx),
    .busy  (ce_busy),
    .done  (ce_done),
    .h_est (h_est),
    .raddr (ce_raddr),
    .rdata (ce_rdata)
  );

  // DFE tap source.
  always_comb begin
    int o;
    o    = 0;
    h_eq = cfg.dfe_coef;
    if (cfg.use_ce) begin
      for (int l = 1; l <= L; l++)
        h_eq[l-1] = h_est[(int'(cfg.ce_main) + l) % NH];
      for (int g = 0; g < NGRP; g++) begin
        o = int'(cfg.mdfe_off[g]);
        if (o < A + P - 2) o = A + P - 2;
        if (o > REACH - K) o = REACH - K;
        for (int j = 1; j <= K; j++)
          h_eq[L + g*K + j - 1] = h_est[(int'(cfg.ce_main) + o + j) % NH];
      end
    end
  end

  assign eq_fill = lut_load | (cfg.use_ce & ce_done & ~ce_done_d);

  equalizer u_eq (
    .clk, .rst_n,
    .fill (eq_fill),
    .clr  (eq_clr),
    .h    (h_eq),
    .w    (cfg.le_w),
    .off  (cfg.mdfe_off),
    .busy (eq_busy),
    .r    (r_rx),
    .xhat (xhat)
  );

  bert #(.DLY(BERT_DLY)) u_bert (
    .clk, .rst_n,
    .clr  (bert_clr),
    .en   (bert_en),
    .x    (x_tx),
    .xhat (xhat),
    .bits (bert_bits),
    .errs (bert_errs)
  );

  assign lut_busy = emu_busy | eq_busy;

endmodule
