// dpg_reg_t3: type-3 register of the DPG architecture, R(d phi / d lambda_rho_n).
//
// Holds the partial sum sum_{l<=k} rho^_{l,n} - 1.  It is written at every clock
// edge while we is high.  Its output reads as -1 while first is high (k = 1), so
// the accumulation restarts at every outer iteration without a separate clear
// cycle (Step 1).  Asynchronous active-low reset to -1.
module dpg_reg_t3
  import dpg_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic we,
  input  logic first,
  input  fx_t  d,
  output fx_t  q
);

  localparam fx_t MINUS_ONE = -FX_ONE;

  fx_t r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  r <= MINUS_ONE;
    else if (we) r <= d;
  end

  assign q = first ? MINUS_ONE : r;

endmodule
