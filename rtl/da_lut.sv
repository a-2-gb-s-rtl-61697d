// da_lut: distributed-arithmetic look-up table with NRD read ports.
//
// The table holds 2**K words. Word a is the inner product of the K tap
// coefficients with the bits of a: bit j of the address selects +coef[j]
// when set, and -coef[j] (BIPOLAR = 1, for BPSK decisions that are +1/-1)
// or 0 (BIPOLAR = 0, for one bit plane of a two's complement sample) when
// clear. A FIR over K inputs then costs one table read instead of K
// multiply-adds. As in the document, the table is made of flip-flops and
// each read port is a plain multiplexer, so the NRD parallel datapaths that
// need the same contents share one multi-ported table.
//
// Filling (the equalizer memory initialisation): a one-cycle pulse on fill
// starts a walk over all 2**K addresses, one word per clock, computed from
// coef, which must stay stable while busy is high. The fill engine is this
// implementation's choice; the document only says the tables are
// pre-computed. Reads are combinational.
module da_lut #(
  parameter int K       = 6,
  parameter int CW      = 8,
  parameter int WW      = CW + 3,   // word width, enough for K <= 8
  parameter int NRD     = 4,
  parameter bit BIPOLAR = 1'b1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         fill,
  input  logic signed [K-1:0][CW-1:0]  coef,
  output logic                         busy,
  input  logic        [NRD-1:0][K-1:0] raddr,
  output logic signed [NRD-1:0][WW-1:0] rdata
);

  localparam int NW = 1 << K;

  logic signed [WW-1:0] mem [NW];
  logic        [K-1:0]  waddr;
  logic signed [WW-1:0] wword;

  // Word for the address being filled.
  always_comb begin
    logic signed [WW-1:0] acc;
    acc = '0;
    for (int j = 0; j < K; j++) begin
      if (waddr[j])     acc = acc + WW'(signed'(coef[j]));
      else if (BIPOLAR) acc = acc - WW'(signed'(coef[j]));
    end
    wword = acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      waddr <= '0;
    end else if (fill) begin
      busy  <= 1'b1;
      waddr <= '0;
    end else if (busy) begin
      waddr <= waddr + 1'b1;
      if (waddr == K'(NW - 1)) busy <= 1'b0;
    end
  end

  // Flip-flop storage, cleared at reset so that reads before the first fill
  // return zero.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NW; i++) mem[i] <= '0;
    end else if (busy) begin
      mem[waddr] <= wword;
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) rdata[r] = mem[raddr[r]];
  end

endmodule
