// dpg_pe1: PE1 of PE array n, Step 2 of the DPG algorithm.
//
// For the user k selected by the k counter it computes the unconstrained minimiser
// of the per-(k,n) Lagrangian term for f(c) = B(2^c - 1):
//   x     = f'^-1(lambda_r * alpha^2) = log2(lambda_r * alpha^2 / (B ln2))
//   rho~  = (-lambda_rho - lambda_r/ln2 + B/alpha^2 + lambda_r * x) / sigma
//   r~    = rho~ * x
// which solves the two stationarity conditions of the term for (r~, rho~), using
// B*2^x/alpha^2 = lambda_r/ln2.  The sign of the lambda_rho and bracket terms is
// taken from the stationarity condition, so that raising lambda_rho lowers rho~.  The datapath has six
// multipliers, three adders and one ROM, the resources the architecture gives PE1;
// sigma enters as its reciprocal so that no divider is needed.
//
// The PE keeps alpha^2_{k,n} and 1/alpha^2_{k,n} for all K users in registers,
// loaded through the configuration bus and read by the k counter.  The datapath is
// combinational: results are valid in the same cycle as k and the multipliers.
module dpg_pe1
  import dpg_pkg::*;
#(
  parameter int  K   = 32,                 // user banks
  parameter int  IDX = 0,                  // subcarrier n served by this array
  parameter fx_t CB  = fx_t'(351),         // B = N0/3 [Q^-1(Pe/4)]^2 = 5.48 (Pe=1e-4, N0=1)
  parameter fx_t CU  = fx_t'(17),          // 1/(B ln2) = 0.263
  parameter fx_t CL  = fx_t'(92)           // 1/ln2 = 1.443
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_wr_t         cfg,
  input  logic [IDXW-1:0] k,
  input  fx_t             lam_r,     // lambda^r_k(t)
  input  fx_t             lam_rho,   // lambda^rho_n(t)
  input  fx_t             sig_inv,   // 1/sigma(j)
  output fx_t             r_t,       // r~_{k,n}
  output fx_t             rho_t      // rho~_{k,n}
);

  fx_t a2  [K];
  fx_t ia2 [K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) begin
        a2[i]  <= '0;
        ia2[i] <= '0;
      end
    end else if (cfg.we && cfg.n == IDXW'(IDX) && cfg.k < IDXW'(K)) begin
      if (cfg.sel == CFG_ALPHA2)     a2[cfg.k]  <= fx_t'(cfg.data);
      if (cfg.sel == CFG_INV_ALPHA2) ia2[cfg.k] <= fx_t'(cfg.data);
    end
  end

  fx_t   a2_k, ia2_k, x;
  wide_t u, lam_over_ln2, b_over_a2, lam_x, num, rho_w, r_w;

  assign a2_k  = (k < IDXW'(K)) ? a2[k]  : '0;
  assign ia2_k = (k < IDXW'(K)) ? ia2[k] : '0;

  // f'^-1 argument (one shift after both products) and its logarithm (ROM)
  assign u = (wx(lam_r) * wx(a2_k) * wx(CU)) >>> (2 * FW);
  dpg_log2 u_log2 (.u(u), .x(x));

  always_comb begin
    lam_over_ln2 = wmul(wx(lam_r), wx(CL));
    b_over_a2    = wmul(wx(CB), wx(ia2_k));
    lam_x        = wmul(wx(lam_r), wx(x));
    num          = -wx(lam_rho) - lam_over_ln2 + b_over_a2 + lam_x;
    rho_w        = wmul(num, wx(sig_inv));
    rho_t        = sat(rho_w);
    r_w          = wmul(wx(rho_t), wx(x));
    r_t          = sat(r_w);
  end

endmodule
