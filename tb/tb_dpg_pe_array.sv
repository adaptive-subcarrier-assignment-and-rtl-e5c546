// tb_dpg_pe_array: checks one PE array (PE1, PE2, PE6, PE3 and its registers)
// against the bit-exact model over several outer iterations.
//
// The testbench plays the part of the counters and of the shared PE5: it steps k
// over the users, supplies random lambda_r and 1/sigma values, and each cycle
// compares r^ and rho^ with the model; after every last user it compares the
// updated lambda_rho.  At the end the result banks and the support mask are read
// through the second read port.
module tb_dpg_pe_array;
  import dpg_pkg::*;
  import tb_dpg_model_pkg::*;

  localparam int K = 3, M = 6, IDX = 2, T = 40;
  localparam longint CB = 351, CU = 17, CL = 92;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  cfg_wr_t cfg;
  logic init, busy, k_first, k_last, t_last, rd_sup;
  logic [IDXW-1:0] k, rd_k;
  fx_t lam_r, sig_inv, r_h, rho_h, lam_rho, rd_r, rd_rho;
  prj_case_e region;

  dpg_pe_array #(.K(K), .M(M), .IDX(IDX)) dut (.*);

  longint a2 [K], ia2 [K], m_lam_rho, m_acc, m_r [K], m_rho [K];
  bit m_sup [K];

  task automatic wr(input cfg_sel_e sel, input int kk, input int nn, input longint v);
    @(negedge clk);
    cfg = '{we: 1'b1, sel: sel, k: IDXW'(kk), n: IDXW'(nn), data: DW'(v)};
    @(negedge clk);
    cfg = '0;
  endtask

  initial begin
    longint rt, rhot, rr, rrho; int rg;
    cfg = '0; init = 0; busy = 0; k = '0; k_first = 0; k_last = 0; t_last = 0;
    lam_r = '0; sig_inv = FX_ONE; rd_k = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < K; i++) begin
      a2[i] = 20 + 50 * i; ia2[i] = (64 * 64) / a2[i];
      wr(CFG_ALPHA2, i, IDX, a2[i]);
      wr(CFG_INV_ALPHA2, i, IDX, ia2[i]);
      wr(CFG_ALPHA2, i, IDX + 1, 7);          // another array's word
    end
    wr(CFG_BETA, 0, 0, 8);
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    m_lam_rho = 0; m_acc = -64;
    for (int i = 0; i < K; i++) m_sup[i] = 0;
    for (int t = 0; t < T; t++)
      for (int kk = 0; kk < K; kk++) begin
        busy = 1; k = IDXW'(kk); k_first = (kk == 0); k_last = (kk == K - 1);
        t_last = (t % 10 == 9);
        lam_r = fx_t'($urandom_range(0, 1500));
        sig_inv = fx_t'(64 << (t / 10));
        #1;
        pe1(lam_r, m_lam_rho, sig_inv, a2[kk], ia2[kk], CB, CU, CL, rt, rhot);
        pe2(rt, rhot, M, rr, rrho, rg);
        check(longint'(r_h) == rr && longint'(rho_h) == rrho && int'(region) == rg,
              $sformatf("t=%0d k=%0d: (%0d,%0d) model (%0d,%0d)", t, kk, r_h, rho_h, rr, rrho));
        if (kk == 0) m_acc = -64;
        m_acc = clamp(m_acc + rrho);
        m_r[kk] = rr; m_rho[kk] = rrho;
        if (t_last && rrho != 0) m_sup[kk] = 1;
        @(negedge clk);
        if (kk == K - 1) begin
          m_lam_rho = clamp(m_lam_rho + fmul(8, m_acc));
          check(longint'(lam_rho) == m_lam_rho, $sformatf("lambda_rho %0d model %0d", lam_rho, m_lam_rho));
        end
      end
    busy = 0;
    for (int i = 0; i < K; i++) begin
      rd_k = IDXW'(i);
      #1;
      check(longint'(rd_r) == m_r[i] && longint'(rd_rho) == m_rho[i], "result bank");
      check(rd_sup == m_sup[i], "support bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
