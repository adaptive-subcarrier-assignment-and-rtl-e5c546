// tb_dpg_counters: checks the CT_k / CT_t / CT_j loop counters and run control.
//
// For several loop limits loaded through the configuration bus it starts a run and
// follows it cycle by cycle against a software nest of three loops: k, t and j
// values, the first/last flags, busy for exactly users*t_max*j_max cycles, done
// afterwards, and that a start while busy is ignored.  A configuration write while
// busy must not change the limits.
module tb_dpg_counters;
  import dpg_pkg::*;

  localparam int K = 8;

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
  logic start, init, busy, done, k_first, k_last, t_last, j_last;
  logic [IDXW-1:0] k;
  logic [15:0] t, j;

  dpg_counters #(.K(K), .TMAX_RESET(3), .JMAX_RESET(2)) dut (.*);

  task automatic wr(input cfg_sel_e sel, input int v);
    @(negedge clk);
    cfg = '{we: 1'b1, sel: sel, k: '0, n: '0, data: DW'(v)};
    @(negedge clk);
    cfg = '0;
  endtask

  task automatic run(input int users, input int tm, input int jm);
    int nbusy;
    @(negedge clk);
    start = 1;
    #1 check(init, "init with start");
    @(negedge clk);
    start = 0;
    nbusy = 0;
    for (int jj = 0; jj < jm; jj++)
      for (int tt = 0; tt < tm; tt++)
        for (int kk = 0; kk < users; kk++) begin
          check(busy && !done, "busy during run");
          check(k == IDXW'(kk) && t == 16'(tt) && j == 16'(jj),
                $sformatf("counters k=%0d t=%0d j=%0d expected %0d %0d %0d", k, t, j, kk, tt, jj));
          check(k_first == (kk == 0) && k_last == (kk == users - 1) &&
                t_last == (tt == tm - 1) && j_last == (jj == jm - 1), "last flags");
          if (kk == 1 && tt == 0 && jj == 0) begin
            start = 1;                                    // ignored while busy
            cfg = '{we: 1'b1, sel: CFG_TMAX, k: '0, n: '0, data: 16'd77};
          end else begin
            start = 0;
            cfg = '0;
          end
          nbusy++;
          @(negedge clk);
        end
    start = 0;
    cfg = '0;
    check(!busy && done, "done after users*t_max*j_max cycles");
    check(nbusy == users * tm * jm, "cycle count");
    @(negedge clk);
    check(!busy && done, "done holds");
  endtask

  initial begin
    cfg = '0; start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(K, 3, 2);                      // reset values
    wr(CFG_USERS, 3); wr(CFG_TMAX, 4); wr(CFG_JMAX, 5);
    run(3, 4, 5);
    wr(CFG_USERS, 1); wr(CFG_TMAX, 1); wr(CFG_JMAX, 1);
    run(1, 1, 1);
    wr(CFG_USERS, 50);                 // clamps to K
    wr(CFG_TMAX, 2); wr(CFG_JMAX, 1);
    run(K, 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
