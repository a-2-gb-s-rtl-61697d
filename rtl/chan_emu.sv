// chan_emu: 72-tap channel emulator of the on-chip transmitter, four
// symbols per clock, built like the main DFE in distributed arithmetic.
//
//   r(n) = sum_{t=0..71} c_t * x(n-t),   x = +1/-1,
// where c_5 is taken as the main cursor, so c_0..c_4 are the pre-cursor taps
// h_{-5}..h_{-1} and c_6.. the post-cursor taps h_1.. of the channel model.
// The 72 taps are twelve groups of six, each a 64-word da_lut with four read
// ports (one per parallel output), as the document describes ("12-LUTs,
// 72 taps, 64 words"). The output has the coefficient scale (64 = 1.0).
//
// Timing: x block c at clock c gives r block c after the next edge
// (one-clock latency). fill/coef/busy load the tables as in da_lut.
module chan_emu
  import eq60_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          fill,
  input  coef_t [EMU_TAPS-1:0]          coef,
  output logic                          busy,
  input  logic        [P-1:0]           x,
  output logic signed [P-1:0][CW+6:0]   r
);

  localparam int WW = CW + 3;
  localparam int HN = EMU_TAPS;

  logic [HN-1:0]                          xh;     // xh[j] = x(4c-1-j)
  logic [HN+P-1:0]                        seq;    // seq[i] = x(4c+3-i)
  logic [EMU_LUTS-1:0]                    gbusy;
  logic [EMU_LUTS-1:0][P-1:0][K-1:0]      addr;
  logic signed [EMU_LUTS-1:0][P-1:0][WW-1:0] word;
  logic signed [P-1:0][CW+6:0]            sum;

  always_comb begin
    for (int p = 0; p < P; p++) seq[p] = x[P-1-p];
    seq[HN+P-1:P] = xh;
  end

  for (genvar g = 0; g < EMU_LUTS; g++) begin : g_lut
    always_comb begin
      for (int p = 0; p < P; p++)
        for (int j = 0; j < K; j++)
          addr[g][p][j] = seq[P - 1 - p + g*K + j];
    end

    da_lut #(.K(K), .CW(CW), .WW(WW), .NRD(P), .BIPOLAR(1'b1)) u_lut (
      .clk, .rst_n, .fill,
      .coef  (coef[g*K +: K]),
      .busy  (gbusy[g]),
      .raddr (addr[g]),
      .rdata (word[g])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xh <= '0;
      r  <= '0;
    end else begin
      xh <= seq[HN-1:0];
      r  <= sum;
    end
  end

  always_comb begin
    for (int p = 0; p < P; p++) begin
      sum[p] = '0;
      for (int g = 0; g < EMU_LUTS; g++) sum[p] = sum[p] + (CW+7)'(signed'(word[g][p]));
    end
  end

  assign busy = |gbusy;

endmodule
