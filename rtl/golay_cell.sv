// golay_cell: one stage of the parallel Golay pulse compressor.
//
//   a_out(k) = a_in(k) + W * b_in(k - D)
//   b_out(k) = a_in(k) - W * b_in(k - D),   W = -1 if NEG else +1,
// four samples k = 4c..4c+3 per clock. The delay by D samples is done as
// the document describes for a parallel datapath: the part of D that is a
// multiple of the parallelisation factor is a block delay read from a
// circular buffer by address arithmetic (no data moves), and the remainder
// R = D mod 4 is a lane swap with a selective shift that takes the first R
// lanes from the block before. The buffer holds ceil(D/4) blocks of
// flip-flops and is cleared at reset and by clr. Outputs are registered
// (one-clock latency); each stage widens the data by one bit.
module golay_cell
  import eq60_pkg::*;
#(
  parameter int D   = 1,
  parameter bit NEG = 1'b0,
  parameter int IW  = RW
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clr,
  input  logic signed [P-1:0][IW-1:0] a_in,
  input  logic signed [P-1:0][IW-1:0] b_in,
  output logic signed [P-1:0][IW:0]   a_out,
  output logic signed [P-1:0][IW:0]   b_out
);

  localparam int Q    = D / P;
  localparam int R    = D % P;
  localparam int NBUF = Q + ((R != 0) ? 1 : 0);
  localparam int AW   = (NBUF > 1) ? $clog2(NBUF) : 1;

  logic signed [P-1:0][IW-1:0] buf_q [NBUF];
  logic [AW-1:0]               wp;     // slot of the oldest block, written this clock
  logic signed [P-1:0][IW-1:0] blk_q, blk_q1, bdel;

  // Block c-m sits at slot (wp - m) mod NBUF for 1 <= m <= NBUF.
  function automatic logic [AW-1:0] slot(input int m);
    int s;
    s = int'(wp) - m;
    if (s < 0) s = s + NBUF;
    return AW'(s);
  endfunction

  always_comb begin
    blk_q  = (Q == 0) ? b_in : buf_q[slot(Q)];
    blk_q1 = buf_q[slot(Q + 1 > NBUF ? NBUF : Q + 1)];
    for (int p = 0; p < P; p++)
      bdel[p] = (p >= R) ? blk_q[p - R] : blk_q1[p - R + P];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NBUF; i++) buf_q[i] <= '0;
      wp    <= '0;
      a_out <= '0;
      b_out <= '0;
    end else if (clr) begin
      for (int i = 0; i < NBUF; i++) buf_q[i] <= '0;
      wp    <= '0;
      a_out <= '0;
      b_out <= '0;
    end else begin
      buf_q[wp] <= b_in;
      wp        <= (int'(wp) == NBUF - 1) ? '0 : wp + 1'b1;
      for (int p = 0; p < P; p++) begin
        if (NEG) begin
          a_out[p] <= (IW+1)'(signed'(a_in[p])) - (IW+1)'(signed'(bdel[p]));
          b_out[p] <= (IW+1)'(signed'(a_in[p])) + (IW+1)'(signed'(bdel[p]));
        end else begin
          a_out[p] <= (IW+1)'(signed'(a_in[p])) + (IW+1)'(signed'(bdel[p]));
          b_out[p] <= (IW+1)'(signed'(a_in[p])) - (IW+1)'(signed'(bdel[p]));
        end
      end
    end
  end

endmodule
