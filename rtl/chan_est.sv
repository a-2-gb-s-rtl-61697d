// chan_est: channel estimator working on the Golay preamble.
//
// The received stream passes through the shared Golay pulse compressor
// (golay_corr). Because the preamble sends Ga and Gb each with a 64-symbol
// cyclic prefix and suffix, the correlation of either block with its own
// sequence is a periodic one, and the periodic autocorrelations of a Golay
// pair add up to 256 * delta. Hence, with the preamble starting at symbol 0,
//   256 * h_t = ca(191 + t) + cb(447 + t),   t = 0..63,
// where h_t is the channel tap t symbols after the preamble alignment.
//
// Control follows the document's split into a main FSM and two window
// FSMs: the main FSM counts correlator output samples from start and
// issues start_a and start_b; FSM_A writes the 64 Ga correlation samples
// into the CE memory and FSM_B adds the 64 Gb samples to them. The CE
// memory is 64 words of flip-flops. Its contents are presented rounded,
// (sum + 128) >> 8, and saturated to coefficient width on h_est (all taps)
// and rdata (addressed read). done rises when the estimate is complete and
// stays high until the next start.
//
// Timing: start must be high in the clock in which the first preamble block
// is on r; done is high PRE_LEN/4 + 7 clocks after that clock. The
// document does not describe the estimator's FSM encoding, the windows or
// the memory format: those are this implementation's choices.
module chan_est
  import eq60_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic signed [P-1:0][RW-1:0] r,
  output logic                        busy,
  output logic                        done,
  output coef_t [NH-1:0]              h_est,
  input  logic [$clog2(NH)-1:0]       raddr,
  output coef_t                       rdata
);

  localparam int CWD   = RW + GSTAGES;   // correlator output width
  localparam int MW    = CWD + 1;        // CE memory word width
  localparam int LAT   = GSTAGES;        // correlator latency in clocks
  localparam int A_BEG = CPLEN + GN - 1;            // 191
  localparam int B_BEG = 2 * GN + CPLEN + GN - 1;   // 447
  localparam int CNTW  = 10;

  logic signed [P-1:0][CWD-1:0] ca, cb;
  logic signed [MW-1:0]         mem [NH];

  golay_corr u_corr (.clk, .rst_n, .clr(1'b0), .r, .ca, .cb);

  // Main FSM: counts clocks since start; the correlator output of clock
  // cnt holds samples 4*(cnt-LAT) .. 4*(cnt-LAT)+3.
  typedef enum logic [1:0] {M_IDLE, M_RUN, M_DONE} mstate_t;
  typedef enum logic       {W_IDLE, W_ACT} wstate_t;
  mstate_t          mst;
  wstate_t          fa, fb;
  logic [CNTW-1:0]  cnt;
  logic             start_a, start_b, end_a, end_b;
  logic signed [31:0] base;                 // first sample index at the output
  logic [P-1:0]     wa, wb;                 // lane writes into the CE memory
  logic [P-1:0][$clog2(NH)-1:0] ia, ib;     // their addresses

  always_comb begin
    base    = (int'(cnt) - LAT) * P;
    // the window opens in the block holding its first sample
    start_a = (mst == M_RUN) && (base <= A_BEG) && (base + P > A_BEG);
    start_b = (mst == M_RUN) && (base <= B_BEG) && (base + P > B_BEG);
    end_a   = (base + P > A_BEG + NH - 1);
    end_b   = (base + P > B_BEG + NH - 1);
    for (int p = 0; p < P; p++) begin
      int n;
      n     = int'(base) + p;
      wa[p] = (fa == W_ACT || start_a) && n >= A_BEG && n < A_BEG + NH;
      wb[p] = (fb == W_ACT || start_b) && n >= B_BEG && n < B_BEG + NH;
      ia[p] = ($clog2(NH))'(n - A_BEG);
      ib[p] = ($clog2(NH))'(n - B_BEG);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst  <= M_IDLE;
      cnt  <= '0;
      done <= 1'b0;
    end else if (start) begin
      mst  <= M_RUN;
      cnt  <= CNTW'(1);
      done <= 1'b0;
    end else if (mst == M_RUN) begin
      cnt <= cnt + 1'b1;
      if (fb == W_ACT && end_b) begin
        mst  <= M_DONE;
        done <= 1'b1;
      end
    end
  end

  // FSM_A and FSM_B: window state and memory access.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fa <= W_IDLE;
      fb <= W_IDLE;
      for (int i = 0; i < NH; i++) mem[i] <= '0;
    end else begin
      if (start) begin
        fa <= W_IDLE;
        fb <= W_IDLE;
      end else begin
        if (start_a) fa <= W_ACT;
        else if (fa == W_ACT && end_a) fa <= W_IDLE;
        if (start_b) fb <= W_ACT;
        else if (fb == W_ACT && end_b) fb <= W_IDLE;
      end
      for (int p = 0; p < P; p++) begin
        if (wa[p]) mem[ia[p]] <= MW'(signed'(ca[p]));
        if (wb[p]) mem[ib[p]] <= mem[ib[p]] + MW'(signed'(cb[p]));
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NH; i++)
      h_est[i] = CW'(sat((32'(signed'(mem[i])) + 128) >>> 8, CW));
    rdata = h_est[raddr];
  end

  assign busy = (mst == M_RUN);

endmodule
