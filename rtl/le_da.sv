// le_da: linear (pre-cursor) equalizer, 6 taps, 4-way parallel, built in
// distributed arithmetic.
//
// Output p of clock c is
//   z(k) = floor( sum_{i=1..6} w_i * u(k+i-1) / 64 ),   k = 4c + p,
// saturated to ZW bits: w_1 weights the sample under decision and w_2..w_6
// the five samples after it, which carry the pre-cursor ISI of symbol k.
// The document states that the LE shares the DA architecture of the main
// DFE with 64-word LUTs; its input u is a multi-bit sample, so this
// implementation reads the LUT once per bit plane: the LUT word for an
// address is the sum of the w_i whose input bit is set, bit planes are
// weighted by 2**b and the sign plane is subtracted (two's complement). All
// 4 x UW reads share one multi-ported table. The bit-plane arrangement and
// the rounding are this implementation's choices.
//
// Interface: u[t] = u(4c + t), t = 0..8, covering the four outputs plus the
// five-sample look-ahead. z is combinational. fill/coef/busy load the LUT as
// in da_lut.
module le_da
  import eq60_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         fill,
  input  coef_t [A-1:0]                w,
  output logic                         busy,
  input  logic signed [A+P-2:0][UW-1:0] u,
  output logic signed [P-1:0][ZW-1:0]  z
);

  localparam int WW  = CW + 3;
  localparam int NRD = P * UW;

  logic        [NRD-1:0][A-1:0]  addr;
  logic signed [NRD-1:0][WW-1:0] word;

  always_comb begin
    for (int p = 0; p < P; p++)
      for (int b = 0; b < UW; b++)
        for (int i = 0; i < A; i++)
          addr[p*UW + b][i] = u[p+i][b];
  end

  da_lut #(.K(A), .CW(CW), .WW(WW), .NRD(NRD), .BIPOLAR(1'b0)) u_lut (
    .clk   (clk),
    .rst_n (rst_n),
    .fill  (fill),
    .coef  (w),
    .busy  (busy),
    .raddr (addr),
    .rdata (word)
  );

  always_comb begin
    for (int p = 0; p < P; p++) begin
      logic signed [31:0] acc;
      acc = '0;
      for (int b = 0; b < UW; b++) begin
        if (b == UW - 1) acc = acc - (32'(signed'(word[p*UW + b])) <<< b);
        else             acc = acc + (32'(signed'(word[p*UW + b])) <<< b);
      end
      z[p] = ZW'(sat(acc >>> FRAC, ZW));
    end
  end

endmodule
