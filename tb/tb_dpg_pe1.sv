// tb_dpg_pe1: checks PE1 against the closed-form solution in floating point.
//
// Loads alpha^2 and 1/alpha^2 for several users through the configuration bus,
// then applies random multipliers and 1/sigma and compares rho~ and r~ with
//   x = log2(lambda_r alpha^2 / (B ln2)),
//   rho~ = (-lambda_rho - lambda_r/ln2 + B/alpha^2 + lambda_r x) / sigma,  r~ = rho~ x
// evaluated in real arithmetic from the same quantised inputs and constants.  The
// tolerance follows the fixed-point error budget (logarithm table and truncated
// products).  A zero multiplier exercises the no-logarithm case.
module tb_dpg_pe1;
  import dpg_pkg::*;

  localparam int K = 4;
  localparam fx_t CB = fx_t'(351), CU = fx_t'(17), CL = fx_t'(92);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_wr_t         cfg;
  logic [IDXW-1:0] k;
  fx_t lam_r, lam_rho, sig_inv, r_t, rho_t;

  dpg_pe1 #(.K(K), .IDX(3), .CB(CB), .CU(CU), .CL(CL)) dut (.*);

  int checks = 0, failures = 0;
  fx_t a2 [K], ia2 [K];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input cfg_sel_e sel, input int kk, input int nn, input fx_t v);
    @(negedge clk);
    cfg = '{we: 1'b1, sel: sel, k: IDXW'(kk), n: IDXW'(nn), data: v};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  task automatic one(input int kk, input fx_t lr, input fx_t lp, input fx_t si);
    real l, p, s, g, ig, x, dx, rho, r, tol_rho, tol_r, b, cu, cl;
    k = IDXW'(kk); lam_r = lr; lam_rho = lp; sig_inv = si;
    @(negedge clk);
    l = real'(lr) / 64; p = real'(lp) / 64; s = real'(si) / 64;
    g = real'(a2[kk]) / 64; ig = real'(ia2[kk]) / 64;
    b = real'(CB) / 64; cu = real'(CU) / 64; cl = real'(CL) / 64;
    if (l * g * cu < 1.0/64) x = -6.0;
    else x = $ln(l * g * cu) / $ln(2.0);
    rho = (-p - l * cl + b * ig + l * x) * s;
    r = rho * x;
    // x error: table rounding, mantissa truncation and the floor of u
    dx = (l * g * cu >= 1.0/64) ? 2.0/64 + 2.2 / (64.0 * l * g * cu) : 7.0;
    tol_rho = (l * dx + 4.0/64) * s + 2.0/64;
    tol_r = (rho < 0 ? -rho : rho) * dx + (x < 0 ? -x : x) * tol_rho + 2.0/64;
    if (rho > 500 || rho < -500 || r > 500 || r < -500) return;   // saturating range
    checks += 2;
    if (real'(rho_t) / 64 - rho > tol_rho || rho - real'(rho_t) / 64 > tol_rho) begin
      failures++;
      if (failures < 10) $display("FAIL rho~: k=%0d lam_r=%0d lam_rho=%0d got %f exp %f", kk, lr, lp, real'(rho_t)/64, rho);
    end
    if (real'(r_t) / 64 - r > tol_r || r - real'(r_t) / 64 > tol_r) begin
      failures++;
      if (failures < 10) $display("FAIL r~: k=%0d got %f exp %f", kk, real'(r_t)/64, r);
    end
  endtask

  initial begin
    cfg = '0; k = '0; lam_r = '0; lam_rho = '0; sig_inv = FX_ONE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < K; i++) begin
      real g;
      g = 0.1 + 0.6 * i;
      a2[i] = fx_t'(int'(g * 64 + 0.5));
      ia2[i] = fx_t'(int'(64 / g + 0.5));
      wr(CFG_ALPHA2, i, 3, a2[i]);
      wr(CFG_INV_ALPHA2, i, 3, ia2[i]);
    end
    // a write addressed to another subcarrier must not land here
    wr(CFG_ALPHA2, 0, 2, fx_t'(999));
    one(0, fx_t'(0), fx_t'(0), FX_ONE);          // no logarithm: x = -6
    one(1, fx_t'(640), fx_t'(64), FX_ONE);
    for (int i = 0; i < 3000; i++)
      one(int'($urandom_range(0, K-1)), fx_t'($urandom_range(0, 3000)),
          fx_t'($urandom_range(0, 600)) - fx_t'(300), fx_t'($urandom_range(64, 256)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
