// dpg_pe3: PE3 of PE array n, Step 8 of the DPG algorithm.
//
// Gradient-ascent update of the subcarrier multiplier,
//   lambda_rho_n(t+1) = lambda_rho_n(t) + beta * (sum_k rho^_{k,n} - 1),
// with one multiplier and one adder.  The step size beta is held in a register of
// the PE, loaded through the configuration bus (CFG_BETA); its reset value is 0.5,
// the typical constant step.  The result saturates to the datapath word.
// Combinational apart from the beta register.
module dpg_pe3
  import dpg_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  cfg_wr_t cfg,
  input  fx_t     lam,       // lambda_rho_n(t)
  input  fx_t     grad,      // sum_k rho^_{k,n} - 1
  output fx_t     lam_next   // lambda_rho_n(t+1)
);

  fx_t beta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              beta <= FX_ONE >>> 1;
    else if (cfg.we && cfg.sel == CFG_BETA)  beta <= fx_t'(cfg.data);
  end

  assign lam_next = sat(wx(lam) + wmul(wx(beta), wx(grad)));

endmodule
