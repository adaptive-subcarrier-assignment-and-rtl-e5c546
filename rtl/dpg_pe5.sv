// dpg_pe5: PE5, the single user-multiplier update unit, Step 6 of the DPG algorithm.
//
//   lambda_r_k(t+1) = lambda_r_k(t) + beta * (R_k - sum_n r^_{k,n})
// with one multiplier and one adder.  Like PE3 it holds its own copy of beta,
// loaded with CFG_BETA and reset to 0.5.  The result saturates to the datapath
// word.  Combinational apart from the beta register.
module dpg_pe5
  import dpg_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  cfg_wr_t cfg,
  input  fx_t     lam,       // lambda_r_k(t)
  input  fx_t     grad,      // d phi / d lambda_r_k from PE4
  output fx_t     lam_next   // lambda_r_k(t+1)
);

  fx_t beta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              beta <= FX_ONE >>> 1;
    else if (cfg.we && cfg.sel == CFG_BETA)  beta <= fx_t'(cfg.data);
  end

  assign lam_next = sat(wx(lam) + wmul(wx(beta), wx(grad)));

endmodule
