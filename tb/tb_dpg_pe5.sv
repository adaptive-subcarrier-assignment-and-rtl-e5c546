// tb_dpg_pe5: checks the user multiplier update lambda + beta*grad of PE5.
//
// Checks the reset step size 0.5, then loads other step sizes through the
// configuration bus and compares random updates with an integer reference
// (product floored to 6 fraction bits, sum clamped to 16 bits), including
// saturation at both ends.
module tb_dpg_pe5;
  import dpg_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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
  fx_t lam, grad, lam_next;

  dpg_pe5 dut (.*);

  function automatic longint ref_upd(longint l, longint b, longint g);
    longint v;
    v = l + ((b * g) >>> 6);
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  initial begin
    longint beta;
    cfg = '0; lam = '0; grad = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    beta = 32;
    for (int s = 0; s < 4; s++) begin
      if (s > 0) begin
        beta = (s == 1) ? 1 : (s == 2) ? 7 : 200;
        @(negedge clk);
        cfg = '{we: 1'b1, sel: CFG_BETA, k: '0, n: '0, data: DW'(beta)};
        @(negedge clk);
        cfg = '0;
        // a write to another register leaves beta alone
        cfg = '{we: 1'b1, sel: CFG_RATE, k: '0, n: '0, data: 16'h1234};
        @(negedge clk);
        cfg = '0;
      end
      for (int i = 0; i < 500; i++) begin
        lam  = fx_t'($urandom);
        grad = fx_t'($urandom);
        if (i % 3 == 0) lam = fx_t'(int'($urandom_range(0, 2000)) - 1000);
        if (i % 3 == 0) grad = fx_t'(int'($urandom_range(0, 2000)) - 1000);
        #1;
        check(longint'(lam_next) == ref_upd(lam, beta, grad),
              $sformatf("beta=%0d lam=%0d grad=%0d -> %0d", beta, lam, grad, lam_next));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
