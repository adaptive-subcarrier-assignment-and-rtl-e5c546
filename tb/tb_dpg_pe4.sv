// tb_dpg_pe4: checks the rate gradient R_k - sum_n r^_{k,n} of PE4.  Rates of all
// users are loaded through the configuration bus; for random r^ vectors and every
// k the output must equal the exact integer sum clamped to 16 bits, including
// sums that overflow the word.
module tb_dpg_pe4;
  import dpg_pkg::*;

  localparam int N = 13;
  localparam int K = 5;

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
  logic [IDXW-1:0] k;
  fx_t r_h [N];
  fx_t grad;
  longint rate [K];

  dpg_pe4 #(.N(N), .K(K)) dut (.*);

  initial begin
    longint e;
    cfg = '0; k = '0;
    for (int n = 0; n < N; n++) r_h[n] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < K; i++) begin
      rate[i] = (i == K - 1) ? -30000 : longint'($urandom_range(0, 200 * 64));
      @(negedge clk);
      cfg = '{we: 1'b1, sel: CFG_RATE, k: IDXW'(i), n: '0, data: DW'(rate[i])};
      @(negedge clk);
      cfg = '0;
    end
    for (int i = 0; i < 2000; i++) begin
      k = IDXW'($urandom_range(0, K - 1));
      for (int n = 0; n < N; n++)
        r_h[n] = (i % 4 == 0) ? fx_t'($urandom_range(0, 32767)) : fx_t'($urandom_range(0, 384));
      #1;
      e = rate[k];
      for (int n = 0; n < N; n++) e -= r_h[n];
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
      check(longint'(grad) == e, $sformatf("k=%0d grad %0d expected %0d", k, grad, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
