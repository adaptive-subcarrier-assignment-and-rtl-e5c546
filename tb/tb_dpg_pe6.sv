// tb_dpg_pe6: checks the rho^ accumulator adder of PE6 against an integer sum
// clamped to 16 bits, for random operands and at the saturation limits.
module tb_dpg_pe6;
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

  fx_t acc, rho_h, acc_next;
  dpg_pe6 dut (.*);

  initial begin
    longint v;
    for (int i = 0; i < 2000; i++) begin
      acc = fx_t'($urandom); rho_h = fx_t'($urandom_range(0, 64));
      if (i == 0) begin acc = FX_MAX; rho_h = fx_t'(5); end
      if (i % 2 == 1) acc = fx_t'(int'($urandom_range(0, 400)) - 200);
      #1;
      v = longint'(acc) + longint'(rho_h);
      if (v > 32767) v = 32767;
      check(longint'(acc_next) == v, $sformatf("%0d + %0d -> %0d", acc, rho_h, acc_next));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
