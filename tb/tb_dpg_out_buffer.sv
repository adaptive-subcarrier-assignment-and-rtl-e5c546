// tb_dpg_out_buffer: checks the output buffer: requests while not done return
// rd_valid low and do not change the data; requests while done return the word of
// the selected array on the next clock.
module tb_dpg_out_buffer;
  import dpg_pkg::*;

  localparam int N = 7;

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

  logic done, rd_en, rd_valid, rd_sup;
  logic [IDXW-1:0] rd_n;
  fx_t arr_r [N], arr_rho [N];
  logic arr_sup [N];
  fx_t rd_r, rd_rho;

  dpg_out_buffer #(.N(N)) dut (.*);

  initial begin
    fx_t last_r, last_rho;
    done = 0; rd_en = 0; rd_n = '0;
    for (int n = 0; n < N; n++) begin
      arr_r[n] = fx_t'(100 + n); arr_rho[n] = fx_t'(-n); arr_sup[n] = n[0];
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    last_r = '0; last_rho = '0;
    for (int i = 0; i < 2000; i++) begin
      bit req, hit; int sel;
      @(negedge clk);
      done = ($urandom_range(0, 2) != 0);
      req = $urandom_range(0, 1);
      sel = $urandom_range(0, N);
      rd_en = req; rd_n = IDXW'(sel);
      for (int n = 0; n < N; n++) begin
        arr_r[n] = fx_t'($urandom); arr_rho[n] = fx_t'($urandom); arr_sup[n] = $urandom_range(0, 1);
      end
      hit = req && done && sel < N;
      if (hit) begin
        last_r = arr_r[sel]; last_rho = arr_rho[sel];
      end
      @(posedge clk);
      #1;
      check(rd_valid == hit, "rd_valid");
      check(rd_r == last_r && rd_rho == last_rho, "data");
      if (hit) check(rd_sup == arr_sup[sel], "support bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
