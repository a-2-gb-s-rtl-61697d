// cfg_scan: configuration scan chain.
//
// A CFG_BITS-long shift register is loaded serially: while scan_en is high
// each clock shifts scan_in in at the top and the bottom bit out on
// scan_out, so after CFG_BITS clocks the first bit sent sits at bit 0 of the
// cfg_t image (send bit 0 first). A one-clock pulse on update copies the
// shift register into the active configuration cfg, so the datapath never
// sees a half-shifted value; the scan chain can be read back through
// scan_out. At reset cfg holds a working default: a distortion-free channel
// (main emulator tap c_5 = 1.0), a pass-through LE (w_1 = 1.0), zero DFE
// taps, the main-DFE groups at their nominal places L + 6g, no noise and
// configured (not estimated) DFE taps. The document only names the scan
// chain; its format and defaults are this implementation's choices.
module cfg_scan
  import eq60_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  scan_en,
  input  logic  scan_in,
  output logic  scan_out,
  input  logic  update,
  output cfg_t  cfg
);

  logic [CFG_BITS-1:0] sh;

  function automatic cfg_t cfg_default();
    cfg_t c;
    c = '0;
    c.emu_coef[A-1] = coef_t'(1 << FRAC);
    c.le_w[0]       = coef_t'(1 << FRAC);
    for (int g = 0; g < NGRP; g++) c.mdfe_off[g] = OFFW'(L + K * g);
    c.ce_main       = 6'(A - 1);
    return c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh  <= '0;
      cfg <= cfg_default();
    end else begin
      if (scan_en) sh <= {scan_in, sh[CFG_BITS-1:1]};
      if (update)  cfg <= cfg_t'(sh);
    end
  end

  assign scan_out = sh[0];

endmodule
