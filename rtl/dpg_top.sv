// dpg_top: Dual Projected Gradient (DPG) accelerator for the continuous relaxation
// of multiuser OFDM subcarrier assignment and bit allocation.
//
// It maximises the dual of the convexified margin-adaptive problem by constant-step
// gradient ascent on the multipliers lambda_r_k (one per user rate constraint) and
// lambda_rho_n (one per subcarrier exclusivity constraint), over a decreasing
// sequence of convexifying weights sigma.  N PE arrays, one per subcarrier, work in
// parallel and visit the users one per clock; a single PE4/PE5 pair updates the
// multiplier of the current user and a single PE7 lowers sigma.  One run takes
// users * t_max * j_max clocks after start.
//
// Interface:
//   cfg_*   write port for the constants (alpha^2, 1/alpha^2, R_k, beta, 1/eta,
//           t_max, j_max, user count); see dpg_pkg::cfg_sel_e.  Load while idle.
//   start   one-cycle pulse while idle: Step-0 initialisation, then the run.
//   busy    high while running; done high from the end of the run until the next
//           start.
//   rd_*    output buffer: with done high, rd_en/rd_k/rd_n return r^, rho^ and the
//           support-mask bit of (k, n) one clock later with rd_valid.
// All values are dpg_pkg::fx_t fixed point (FW fraction bits); t_max, j_max and the
// user count are plain integers.
module dpg_top
  import dpg_pkg::*;
#(
  parameter int  N          = 128,          // subcarriers = PE arrays
  parameter int  K          = 32,           // largest number of users (register banks)
  parameter int  M          = 6,            // largest bits per symbol (64-QAM)
  parameter fx_t CB         = fx_t'(351),   // B of f(c) = B(2^c - 1)
  parameter fx_t CU         = fx_t'(17),    // 1/(B ln2)
  parameter fx_t CL         = fx_t'(92),    // 1/ln2
  parameter int  TMAX_RESET = 1500,
  parameter int  JMAX_RESET = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_we,
  input  logic [2:0]      cfg_sel,
  input  logic [IDXW-1:0] cfg_k,
  input  logic [IDXW-1:0] cfg_n,
  input  logic [DW-1:0]   cfg_data,
  input  logic            start,
  output logic            busy,
  output logic            done,
  input  logic            rd_en,
  input  logic [IDXW-1:0] rd_k,
  input  logic [IDXW-1:0] rd_n,
  output logic            rd_valid,
  output logic [DW-1:0]   rd_r,
  output logic [DW-1:0]   rd_rho,
  output logic            rd_sup
);

  cfg_wr_t cfg;
  assign cfg = '{we: cfg_we, sel: cfg_sel_e'(cfg_sel), k: cfg_k, n: cfg_n, data: cfg_data};

  logic            init, k_first, k_last, t_last, j_last;
  logic [IDXW-1:0] k;
  logic [15:0]     t, j;

  dpg_counters #(.K(K), .TMAX_RESET(TMAX_RESET), .JMAX_RESET(JMAX_RESET)) u_ctr (
    .clk, .rst_n, .cfg, .start, .init, .busy, .done, .k, .t, .j,
    .k_first, .k_last, .t_last, .j_last
  );

  // Shared registers and PEs
  fx_t lam_r, lam_r_next, grad_r, sig_inv, sig_inv_next, unused_lam;
  fx_t r_h [N];

  dpg_reg_bank #(.K(K)) u_r_lam_r (
    .clk, .rst_n, .clr(init), .we(busy), .idx(k), .d(lam_r_next), .q(lam_r),
    .rd_idx(rd_k), .rd_q(unused_lam)
  );

  dpg_pe4 #(.N(N), .K(K)) u_pe4 (.clk, .rst_n, .cfg, .k, .r_h, .grad(grad_r));

  dpg_pe5 u_pe5 (.clk, .rst_n, .cfg, .lam(lam_r), .grad(grad_r), .lam_next(lam_r_next));

  dpg_pe7 u_pe7 (.clk, .rst_n, .cfg, .sig_inv, .sig_inv_next);

  dpg_reg_t1 #(.INIT(FX_ONE)) u_r_sigma (
    .clk, .rst_n, .init, .we(busy && k_last && t_last), .d(sig_inv_next), .q(sig_inv)
  );

  // PE arrays
  fx_t       rho_h [N];
  fx_t       lam_rho [N];
  prj_case_e region [N];
  fx_t       arr_r [N];
  fx_t       arr_rho [N];
  logic      arr_sup [N];

  for (genvar n = 0; n < N; n++) begin : g_arr
    dpg_pe_array #(.K(K), .M(M), .IDX(n), .CB(CB), .CU(CU), .CL(CL)) u_arr (
      .clk, .rst_n, .cfg, .init, .busy, .k, .k_first, .k_last, .t_last,
      .lam_r, .sig_inv, .r_h(r_h[n]), .rho_h(rho_h[n]), .lam_rho(lam_rho[n]),
      .region(region[n]), .rd_k, .rd_r(arr_r[n]), .rd_rho(arr_rho[n]), .rd_sup(arr_sup[n])
    );
  end

  fx_t rd_r_fx, rd_rho_fx;

  dpg_out_buffer #(.N(N)) u_buf (
    .clk, .rst_n, .done, .rd_en, .rd_n, .arr_r, .arr_rho, .arr_sup,
    .rd_valid, .rd_r(rd_r_fx), .rd_rho(rd_rho_fx), .rd_sup
  );

  assign rd_r   = rd_r_fx;
  assign rd_rho = rd_rho_fx;

  // Configuration is only loaded while the accelerator is idle.
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> !busy);

endmodule
