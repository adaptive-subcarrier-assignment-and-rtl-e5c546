// dpg_log2: combinational base-2 logarithm of a positive fixed-point value, the ROM
// access of PE1.
//
// The input u is a wide_t with FW fraction bits.  A leading-one detector gives the
// integer part of log2(u); the FW bits that follow the leading one address a
// 2^FW-entry ROM holding round(2^FW * log2(1 + m/2^FW)), which is the fraction.
// The ROM is filled at elaboration by dpg_pkg::log2_frac, so no data file is needed.
// A non-positive input has no logarithm; it returns -FW, the logarithm of the
// smallest positive input (1/2^FW).  Purely combinational, no clock.
module dpg_log2
  import dpg_pkg::*;
(
  input  wide_t u,
  output fx_t   x
);

  localparam int ROMN = 1 << FW;

  logic [FW:0] rom [ROMN];
  for (genvar a = 0; a < ROMN; a++) begin : g_rom
    assign rom[a] = (FW+1)'(log2_frac(a));
  end

  int unsigned       msb;
  logic [WW-1:0]     norm;
  logic [FW-1:0]     mant;
  wide_t             xi;

  always_comb begin
    msb = 0;
    for (int i = 0; i < WW - 1; i++)
      if (u[i]) msb = i;
    // Bring the leading one to bit WW-1 so the mantissa sits just below it.
    norm = WW'(u) << (WW - 1 - msb);
    mant = norm[WW-2 -: FW];
    if (u <= 0) begin
      xi = -wide_t'(FW) <<< FW;
    end else begin
      xi = ((wide_t'(msb) - wide_t'(FW)) <<< FW) + wide_t'(rom[mant]);
    end
    x = sat(xi);
  end

endmodule
