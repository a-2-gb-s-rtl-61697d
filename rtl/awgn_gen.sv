// awgn_gen: noise generator of the on-chip transmitter.
//
// Each of the four lanes runs its own 32-bit xorshift generator
// (x ^= x << 13; x ^= x >> 17; x ^= x << 5), stepped once per clock. The four
// bytes of the state are added, which by the central limit theorem gives a
// bell-shaped value in 0..1020 with standard deviation about 148; it is
// centred and scaled by amp / 256, so the noise standard deviation is about
// 0.58 * amp in sample units (64 = signal amplitude 1.0). amp = 0 switches
// the noise off. The document only names the noise generator; the method is
// this implementation's choice.
//
// Output n[p] is registered and changes every clock.
module awgn_gen
  import eq60_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h1234_5678
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [7:0]                  amp,
  output logic signed [P-1:0][RW-1:0] n
);

  logic [P-1:0][31:0]          st;
  logic [P-1:0][31:0]          st_nx;
  logic signed [P-1:0][RW-1:0] n_nx;

  function automatic logic [31:0] xs32(input logic [31:0] v);
    logic [31:0] t;
    t = v ^ (v << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < P; p++) st[p] <= SEED + 32'h9E37_79B9 * 32'(p + 1);
      n <= '0;
    end else begin
      st <= st_nx;
      n  <= n_nx;
    end
  end

  always_comb begin
    for (int p = 0; p < P; p++) begin
      logic signed [31:0] g;
      st_nx[p] = xs32(st[p]);
      g = 32'(st[p][7:0]) + 32'(st[p][15:8]) + 32'(st[p][23:16]) + 32'(st[p][31:24]) - 510;
      n_nx[p] = RW'(sat((g * $signed({24'd0, amp})) >>> 8, RW));
    end
  end

endmodule
