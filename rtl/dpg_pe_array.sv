// dpg_pe_array: PE array n of the DPG accelerator (one per subcarrier).
//
// Each clock it handles one user k, chosen by the k counter:
//   PE1  (r~, rho~) from lambda_r_k, lambda_rho_n, 1/sigma and alpha^2_{k,n}
//   PE2  projection onto 0 <= rho <= 1, 0 <= r <= M*rho  ->  (r^, rho^)
//   PE6  running sum of rho^ over users, kept in the type-3 register
//   PE3  lambda_rho_n update, written to its type-1 register when k is the last user
// r^_{k,n} goes to the shared PE4; (r^, rho^) are written to bank k of two type-2
// register banks, which the output buffer reads through rd_k.  The whole chain is
// combinational between registers, so one user is processed per clock.
// init (Step 0) clears lambda_rho_n and the support mask.
module dpg_pe_array
  import dpg_pkg::*;
#(
  parameter int  K   = 32,
  parameter int  M   = 6,
  parameter int  IDX = 0,
  parameter fx_t CB  = fx_t'(351),
  parameter fx_t CU  = fx_t'(17),
  parameter fx_t CL  = fx_t'(92)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_wr_t         cfg,
  input  logic            init,
  input  logic            busy,
  input  logic [IDXW-1:0] k,
  input  logic            k_first,
  input  logic            k_last,
  input  logic            t_last,
  input  fx_t             lam_r,      // lambda_r_k(t)
  input  fx_t             sig_inv,    // 1/sigma(j)
  output fx_t             r_h,        // r^_{k,n}, to PE4
  output fx_t             rho_h,      // rho^_{k,n}
  output fx_t             lam_rho,    // lambda_rho_n(t)
  output prj_case_e       region,     // projection case of this cycle
  input  logic [IDXW-1:0] rd_k,
  output fx_t             rd_r,
  output fx_t             rd_rho,
  output logic            rd_sup
);

  fx_t r_t, rho_t, acc, acc_next, lam_rho_next;
  fx_t unused_r, unused_rho;

  dpg_pe1 #(.K(K), .IDX(IDX), .CB(CB), .CU(CU), .CL(CL)) u_pe1 (
    .clk, .rst_n, .cfg, .k, .lam_r, .lam_rho, .sig_inv, .r_t, .rho_t
  );

  dpg_pe2 #(.M(M)) u_pe2 (.r_t, .rho_t, .r_h, .rho_h, .region);

  dpg_reg_t3 u_r_grad (
    .clk, .rst_n, .we(busy), .first(k_first), .d(acc_next), .q(acc)
  );

  dpg_pe6 u_pe6 (.acc, .rho_h, .acc_next);

  dpg_pe3 u_pe3 (.clk, .rst_n, .cfg, .lam(lam_rho), .grad(acc_next), .lam_next(lam_rho_next));

  dpg_reg_t1 #(.INIT('0)) u_r_lam_rho (
    .clk, .rst_n, .init, .we(busy && k_last), .d(lam_rho_next), .q(lam_rho)
  );

  dpg_reg_bank #(.K(K)) u_r_rhat (
    .clk, .rst_n, .clr(init), .we(busy), .idx(k), .d(r_h), .q(unused_r),
    .rd_idx(rd_k), .rd_q(rd_r)
  );

  dpg_reg_bank #(.K(K)) u_r_rhohat (
    .clk, .rst_n, .clr(init), .we(busy), .idx(k), .d(rho_h), .q(unused_rho),
    .rd_idx(rd_k), .rd_q(rd_rho)
  );

  dpg_support_mask #(.K(K)) u_mask (
    .clk, .rst_n, .clr(init), .we(busy && t_last), .k, .rho_h, .rd_k, .rd_q(rd_sup)
  );

endmodule
