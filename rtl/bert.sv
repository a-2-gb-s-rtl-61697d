// bert: bit-error-rate tester.
//
// The transmitted symbols x (four per clock, straight from the sequence
// generator) are delayed by DLY symbols and compared with the equalizer
// decisions xhat of the same clock. DLY is the end-to-end latency in symbols
// and need not be a multiple of four: the reference is taken from a symbol
// history, lane by lane. While en is high every compared symbol adds one to
// bits and every mismatch one to errs; clr zeroes both counters (counters
// saturate). The document only names the BERT and draws it with a sequence
// generator of its own; taking the transmitter's sequence instead, the
// counters and the alignment are this implementation's choices.
module bert
  import eq60_pkg::*;
#(
  parameter int DLY = 29
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [P-1:0]  x,
  input  logic [P-1:0]  xhat,
  output logic [31:0]   bits,
  output logic [31:0]   errs
);

  localparam int HN = DLY + P;

  logic [HN-1:0] xh;          // xh[i] = x(4c-1-i), symbols of earlier clocks
  logic [HN+P-1:0] seq;       // seq[i] = x(4c+3-i)
  logic [P-1:0] refb;
  logic [2:0] nerr;

  always_comb begin
    for (int p = 0; p < P; p++) seq[p] = x[P-1-p];
    seq[HN+P-1:P] = xh;
    nerr = '0;
    for (int p = 0; p < P; p++) begin
      refb[p] = seq[P - 1 - p + DLY];    // x(4c+p-DLY)
      nerr = nerr + 3'(refb[p] != xhat[p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xh   <= '0;
      bits <= '0;
      errs <= '0;
    end else begin
      xh <= seq[HN-1:0];
      if (clr) begin
        bits <= '0;
        errs <= '0;
      end else if (en) begin
        if (bits < 32'hFFFF_FFF0) bits <= bits + 32'(P);
        if (errs < 32'hFFFF_FFF0) errs <= errs + 32'(nerr);
      end
    end
  end

endmodule
