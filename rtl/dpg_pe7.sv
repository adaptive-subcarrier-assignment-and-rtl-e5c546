// dpg_pe7: PE7, the single sigma-reduction unit, Step 10 of the DPG algorithm.
//
// The convexifying weight follows sigma(j+1) = eta * sigma(j).  The PE1s need
// 1/sigma, so this design keeps the reciprocal in the sigma register and PE7
// multiplies it by the constant 1/eta (one multiplier), held in a register loaded
// with CFG_ETA_INV.  The reset value of 1/eta is 2 (eta = 0.5).  Saturating.
// Combinational apart from the constant register.
module dpg_pe7
  import dpg_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  cfg_wr_t cfg,
  input  fx_t     sig_inv,       // 1/sigma(j)
  output fx_t     sig_inv_next   // 1/sigma(j+1)
);

  fx_t eta_inv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 eta_inv <= FX_ONE <<< 1;
    else if (cfg.we && cfg.sel == CFG_ETA_INV)  eta_inv <= fx_t'(cfg.data);
  end

  assign sig_inv_next = sat(wmul(wx(sig_inv), wx(eta_inv)));

endmodule
