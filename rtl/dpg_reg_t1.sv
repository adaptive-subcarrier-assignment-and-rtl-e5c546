// dpg_reg_t1: type-1 register of the DPG architecture (lambda_rho_n and sigma).
//
// A single word written at the clock edge when its write enable is active; the
// enable comes from the loop counters (k = K for lambda_rho_n, k = K and t = t_max
// for sigma).  init loads the Step-0 value INIT when a run starts and takes
// priority over we.  Asynchronous active-low reset to INIT.
module dpg_reg_t1
  import dpg_pkg::*;
#(
  parameter fx_t INIT = '0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic we,
  input  fx_t  d,
  output fx_t  q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= INIT;
    else if (init) q <= INIT;
    else if (we)   q <= d;
  end

endmodule
