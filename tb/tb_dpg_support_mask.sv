// tb_dpg_support_mask: checks the sticky support mask: a bit is set only on an edge
// with we high and a non-zero rho^, stays set, and clr clears all bits.
module tb_dpg_support_mask;
  import dpg_pkg::*;

  localparam int K = 5;

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

  logic clr, we, rd_q;
  logic [IDXW-1:0] k, rd_k;
  fx_t rho_h;
  bit model [K];

  dpg_support_mask #(.K(K)) dut (.*);

  initial begin
    clr = 0; we = 0; k = '0; rd_k = '0; rho_h = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 99) == 0);
      we = ($urandom_range(0, 3) == 0);
      k = IDXW'($urandom_range(0, K - 1));
      rho_h = ($urandom_range(0, 3) == 0) ? fx_t'($urandom_range(1, 64)) : '0;
      rd_k = IDXW'($urandom_range(0, K));
      #1;
      check(rd_q == ((rd_k < K) ? model[rd_k] : 1'b0), "mask bit");
      @(posedge clk);
      if (clr) for (int b = 0; b < K; b++) model[b] = 0;
      else if (we && rho_h != 0) model[k] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
