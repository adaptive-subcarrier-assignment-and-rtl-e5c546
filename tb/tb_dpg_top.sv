// tb_dpg_top: end-to-end test of the DPG accelerator at a reduced size.
//
// Loads a random multiuser channel (alpha^2 drawn from an exponential law, i.e.
// Rayleigh fading with unit mean power), random user rates summing to 4 bits per
// subcarrier on average, runs one complete DPG solve and compares every r^, rho^
// and support bit read through the output buffer with the bit-exact model of
// tb_dpg_model_pkg.  It also checks the run length (users * t_max * j_max busy
// cycles), that the buffer refuses reads before the run ends, and counts the
// mechanisms of the algorithm: every projection case, the inner-loop wrap with
// its lambda_rho update, the sigma reduction, the type-3 reset to -1 and the
// support-mask set; a mechanism that never happens counts as a failure.
module tb_dpg_top;
  import dpg_pkg::*;
  import tb_dpg_model_pkg::*;

  localparam int N     = 16;
  localparam int K     = 4;
  localparam int USERS = 4;
  localparam int TMAX  = 100;
  localparam int JMAX  = 4;
  localparam int M     = 6;
  localparam longint CB = 351, CU = 17, CL = 92;
  localparam longint BETA = 1, ETA_INV = 80;     // 1/64 and 1.25 (eta = 0.8)
  localparam int WATCHDOG = USERS * TMAX * JMAX + 20 * N * K + 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            cfg_we = 1'b0;
  logic [2:0]      cfg_sel = '0;
  logic [IDXW-1:0] cfg_k = '0, cfg_n = '0;
  logic [DW-1:0]   cfg_data = '0;
  logic            start = 1'b0;
  logic            busy, done;
  logic            rd_en = 1'b0;
  logic [IDXW-1:0] rd_k = '0, rd_n = '0;
  logic            rd_valid, rd_sup;
  logic [DW-1:0]   rd_r, rd_rho;

  dpg_top #(.N(N), .K(K)) dut (.*);

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input cfg_sel_e sel, input int k, input int n, input longint v);
    @(negedge clk);
    cfg_we = 1'b1; cfg_sel = sel; cfg_k = IDXW'(k); cfg_n = IDXW'(n); cfg_data = DW'(v);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // Problem instance and model state
  longint a2 [K][N], ia2 [K][N], rate [K];
  longint lam_r [K], lam_rho [N], acc [N], sig_inv;
  longint rh [K][N], rhoh [K][N];
  bit     sup [K][N];
  int     region_cnt [7];
  int     n_rho_upd, n_sig_upd, n_acc_reset, n_sup_set;

  task automatic make_instance();
    int total, left;
    for (int k = 0; k < USERS; k++)
      for (int n = 0; n < N; n++) begin
        real u, g;
        u = (real'($urandom_range(1, 1000000))) / 1000001.0;
        g = -$ln(u);
        if (g < 0.05) g = 0.05;
        if (g > 6.0)  g = 6.0;
        a2[k][n]  = longint'(g * 64.0 + 0.5);
        ia2[k][n] = clamp(longint'(64.0 / g + 0.5));
      end
    total = 4 * N;
    left  = total;
    for (int k = 0; k < USERS; k++) begin
      int share;
      if (k == USERS - 1) share = left;
      else share = 2 + int'($urandom_range(0, 2 * (total / USERS) - 4));
      if (share > left - 2 * (USERS - 1 - k)) share = left - 2 * (USERS - 1 - k);
      rate[k] = longint'(share) * ONE;
      left -= share;
    end
  endtask

  task automatic run_model();
    longint r_t, rho_t, g;
    int     reg_;
    for (int k = 0; k < K; k++) lam_r[k] = 0;
    for (int n = 0; n < N; n++) begin
      lam_rho[n] = 0;
      for (int k = 0; k < K; k++) sup[k][n] = 0;
    end
    sig_inv = ONE;
    for (int j = 0; j < JMAX; j++)
      for (int t = 0; t < TMAX; t++)
        for (int k = 0; k < USERS; k++) begin
          g = rate[k];
          for (int n = 0; n < N; n++) begin
            pe1(lam_r[k], lam_rho[n], sig_inv, a2[k][n], ia2[k][n], CB, CU, CL, r_t, rho_t);
            pe2(r_t, rho_t, M, rh[k][n], rhoh[k][n], reg_);
            region_cnt[reg_]++;
            g -= rh[k][n];
            if (k == 0) begin
              acc[n] = -ONE;
              n_acc_reset++;
            end
            acc[n] = clamp(acc[n] + rhoh[k][n]);
            if (t == TMAX - 1 && rhoh[k][n] != 0) begin
              if (!sup[k][n]) n_sup_set++;
              sup[k][n] = 1;
            end
          end
          lam_r[k] = clamp(lam_r[k] + fmul(BETA, clamp(g)));
          if (k == USERS - 1) begin
            for (int n = 0; n < N; n++) lam_rho[n] = clamp(lam_rho[n] + fmul(BETA, acc[n]));
            n_rho_upd++;
            if (t == TMAX - 1) begin
              sig_inv = clamp(fmul(sig_inv, ETA_INV));
              n_sig_upd++;
            end
          end
        end
  endtask

  // RTL-side event counters
  int rtl_busy = 0, rtl_kwrap = 0, rtl_twrap = 0;
  always @(posedge clk) if (busy) begin
    rtl_busy++;
    if (dut.k_last) rtl_kwrap++;
    if (dut.k_last && dut.t_last) rtl_twrap++;
  end

  initial begin
    int start_cycle, done_cycle;
    make_instance();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < USERS; k++) begin
      cfg_write(CFG_RATE, k, 0, rate[k]);
      for (int n = 0; n < N; n++) begin
        cfg_write(CFG_ALPHA2, k, n, a2[k][n]);
        cfg_write(CFG_INV_ALPHA2, k, n, ia2[k][n]);
      end
    end
    cfg_write(CFG_BETA, 0, 0, BETA);
    cfg_write(CFG_ETA_INV, 0, 0, ETA_INV);
    cfg_write(CFG_TMAX, 0, 0, TMAX);
    cfg_write(CFG_JMAX, 0, 0, JMAX);
    cfg_write(CFG_USERS, 0, 0, USERS);

    // The buffer must refuse a read before any run has finished.
    @(negedge clk); rd_en = 1'b1; rd_k = 0; rd_n = 0;
    @(negedge clk); rd_en = 1'b0;
    check(!rd_valid, "read accepted before done");

    run_model();

    @(negedge clk); start = 1'b1;
    start_cycle = cycles;
    @(negedge clk); start = 1'b0;
    check(busy, "busy after start");
    wait (done);
    done_cycle = cycles;
    check(rtl_busy == USERS * TMAX * JMAX,
          $sformatf("busy cycles %0d, expected %0d", rtl_busy, USERS * TMAX * JMAX));
    check(done_cycle - start_cycle == USERS * TMAX * JMAX + 1,
          $sformatf("start-to-done %0d cycles", done_cycle - start_cycle));
    check(rtl_kwrap == TMAX * JMAX, $sformatf("k wraps %0d", rtl_kwrap));
    check(rtl_twrap == JMAX, $sformatf("sigma updates %0d", rtl_twrap));
    check(dut.sig_inv == DW'(sig_inv), $sformatf("final 1/sigma %0d vs %0d", dut.sig_inv, sig_inv));

    for (int k = 0; k < USERS; k++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk); rd_en = 1'b1; rd_k = IDXW'(k); rd_n = IDXW'(n);
        @(negedge clk); rd_en = 1'b0;
        check(rd_valid, "read not valid after done");
        check(fx_t'(rd_r) == fx_t'(rh[k][n]),
              $sformatf("r^[%0d][%0d] = %0d, model %0d", k, n, fx_t'(rd_r), rh[k][n]));
        check(fx_t'(rd_rho) == fx_t'(rhoh[k][n]),
              $sformatf("rho^[%0d][%0d] = %0d, model %0d", k, n, fx_t'(rd_rho), rhoh[k][n]));
        check(rd_sup == sup[k][n], $sformatf("support[%0d][%0d]", k, n));
      end
    for (int n = 0; n < N; n++)
      check(dut.lam_rho[n] == fx_t'(lam_rho[n]), $sformatf("lambda_rho[%0d]", n));

    // Report how far the relaxed solution is from meeting its constraints.
    begin
      real sr, srho, e;
      e = 0.0;
      for (int n = 0; n < N; n++) begin
        srho = 0.0;
        for (int k = 0; k < USERS; k++) srho += real'(rhoh[k][n]) / 64.0;
        e += (srho - 1.0) * (srho - 1.0);
      end
      $display("mean squared violation of sum_k rho^ = 1: %f", e / N);
      for (int k = 0; k < USERS; k++) begin
        sr = 0.0;
        for (int n = 0; n < N; n++) sr += real'(rh[k][n]) / 64.0;
        $display("user %0d: R=%0d  sum r^=%f", k, rate[k] / ONE, sr);
      end
    end

    for (int i = 0; i < 7; i++) begin
      $display("projection case %0d: %0d", i, region_cnt[i]);
      check(region_cnt[i] > 0, $sformatf("projection case %0d never happened", i));
    end
    $display("lambda_rho updates %0d, sigma updates %0d, type-3 resets %0d, support sets %0d",
             n_rho_upd, n_sig_upd, n_acc_reset, n_sup_set);
    check(n_rho_upd > 0 && n_sig_upd > 0 && n_acc_reset > 0 && n_sup_set > 0, "mechanism missing");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
