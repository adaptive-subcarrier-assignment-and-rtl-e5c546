// tb_dpg_reg_t3: checks the type-3 register: it reads -1 while first is high and
// after reset, and otherwise returns the word last written with we high.
module tb_dpg_reg_t3;
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

  logic we, first;
  fx_t d, q;
  longint model;

  dpg_reg_t3 dut (.*);

  initial begin
    we = 0; first = 0; d = '0;
    repeat (2) @(posedge clk);
    #1 check(q == -FX_ONE, "reset value");
    rst_n = 1;
    model = -64;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      first = ($urandom_range(0, 3) == 0);
      d = fx_t'($urandom);
      #1;
      check(longint'(q) == (first ? -64 : model), $sformatf("q=%0d", q));
      @(posedge clk);
      if (we) model = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
