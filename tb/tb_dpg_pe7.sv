// tb_dpg_pe7: checks the 1/sigma growth of PE7.  With the reset constant 1/eta = 2
// a chain of levels must give 1, 2, 4, ... until saturation; with a loaded
// constant, random operands are compared with the floored product.
module tb_dpg_pe7;
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
  fx_t sig_inv, sig_inv_next;
  dpg_pe7 dut (.*);

  initial begin
    longint v, e;
    cfg = '0; sig_inv = FX_ONE;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    v = 64;
    for (int j = 0; j < 12; j++) begin
      sig_inv = fx_t'(v);
      #1;
      e = v * 2; if (e > 32767) e = 32767;
      check(longint'(sig_inv_next) == e, $sformatf("level %0d: %0d -> %0d", j, v, sig_inv_next));
      v = e;
    end
    @(negedge clk);
    cfg = '{we: 1'b1, sel: CFG_ETA_INV, k: '0, n: '0, data: 16'd80};
    @(negedge clk);
    cfg = '0;
    for (int i = 0; i < 1000; i++) begin
      sig_inv = fx_t'($urandom_range(0, 32767));
      #1;
      e = (longint'(sig_inv) * 80) >>> 6; if (e > 32767) e = 32767;
      check(longint'(sig_inv_next) == e, $sformatf("%0d -> %0d", sig_inv, sig_inv_next));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
