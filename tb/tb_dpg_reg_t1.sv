// tb_dpg_reg_t1: checks the type-1 register: reset and init load INIT, init wins
// over a simultaneous write, and the word changes only on edges with we high.
// Random enables are compared with a software copy of the register.
module tb_dpg_reg_t1;
  import dpg_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  logic init, we;
  fx_t d, q;
  longint model;

  dpg_reg_t1 #(.INIT(fx_t'(64))) dut (.*);

  initial begin
    init = 0; we = 0; d = '0;
    repeat (2) @(posedge clk);
    check(q == fx_t'(64), "reset value");
    rst_n = 1;
    model = 64;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      init = ($urandom_range(0, 9) == 0);
      we = $urandom_range(0, 1);
      d = fx_t'($urandom);
      @(posedge clk);
      if (init) model = 64; else if (we) model = d;
      #1;
      check(longint'(q) == model, $sformatf("q=%0d expected %0d", q, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
