// dpg_reg_bank: type-2 K-bank register of the DPG architecture.
//
// Holds one word per user (lambda_r_k, r^_{k,n} or rho^_{k,n}).  While the
// algorithm runs it is always written: bank k, chosen by the k counter, takes d at
// each clock edge when we is high, and the same bank is presented on q.  A second,
// independent read port (rd_idx/rd_q) serves the output buffer.  clr returns every
// bank to INIT in one cycle (Step 0).  Asynchronous active-low reset to INIT.
module dpg_reg_bank
  import dpg_pkg::*;
#(
  parameter int  K    = 32,
  parameter fx_t INIT = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            we,
  input  logic [IDXW-1:0] idx,
  input  fx_t             d,
  output fx_t             q,
  input  logic [IDXW-1:0] rd_idx,
  output fx_t             rd_q
);

  fx_t bank [K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) bank[i] <= INIT;
    end else if (clr) begin
      for (int i = 0; i < K; i++) bank[i] <= INIT;
    end else if (we && idx < IDXW'(K)) begin
      bank[idx] <= d;
    end
  end

  assign q    = (idx    < IDXW'(K)) ? bank[idx]    : INIT;
  assign rd_q = (rd_idx < IDXW'(K)) ? bank[rd_idx] : INIT;

endmodule
