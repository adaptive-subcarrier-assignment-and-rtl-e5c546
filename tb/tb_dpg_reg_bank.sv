// tb_dpg_reg_bank: checks the type-2 K-bank register: bank idx is written when we
// is high and shown on q, the second read port reads any bank independently, clr
// returns all banks to INIT, and out-of-range indices neither write nor read.
module tb_dpg_reg_bank;
  import dpg_pkg::*;

  localparam int K = 6;

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

  logic clr, we;
  logic [IDXW-1:0] idx, rd_idx;
  fx_t d, q, rd_q;
  longint model [K];

  dpg_reg_bank #(.K(K), .INIT(fx_t'(-3))) dut (.*);

  initial begin
    clr = 0; we = 0; idx = '0; rd_idx = '0; d = '0;
    for (int i = 0; i < K; i++) model[i] = -3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 49) == 0);
      we = $urandom_range(0, 1);
      idx = IDXW'($urandom_range(0, K));      // K is out of range
      rd_idx = IDXW'($urandom_range(0, K));
      d = fx_t'($urandom);
      #1;
      check(longint'(q) == ((idx < K) ? model[idx] : -3), "q before the edge");
      check(longint'(rd_q) == ((rd_idx < K) ? model[rd_idx] : -3), "second read port");
      @(posedge clk);
      if (clr) for (int b = 0; b < K; b++) model[b] = -3;
      else if (we && idx < K) model[idx] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
