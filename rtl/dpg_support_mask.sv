// dpg_support_mask: per-subcarrier record of which users ever received a non-zero
// rho^ at the end of a sigma level.
//
// A (k, n) pair whose continuous rho^ stays 0 at every sigma level is excluded
// from the candidate subcarrier assignments; the pairs with a set bit are the
// candidates, and the number of set bits of subcarrier n is the count of
// assignment choices left for it.  Bit k is set at the clock edge of the last
// outer iteration (t = t_max) of each level, when rho^_{k,n} of that iteration is
// non-zero.  clr (start of a run) clears all bits.  The mask itself is this
// design's addition: it lets the host read the candidate set instead of every
// intermediate solution.  rd_k selects the bit presented on rd_q.
module dpg_support_mask
  import dpg_pkg::*;
#(
  parameter int K = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            we,
  input  logic [IDXW-1:0] k,
  input  fx_t             rho_h,
  input  logic [IDXW-1:0] rd_k,
  output logic            rd_q
);

  logic [K-1:0] mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  mask <= '0;
    else if (clr)                                mask <= '0;
    else if (we && k < IDXW'(K) && rho_h != '0)  mask[k] <= 1'b1;
  end

  assign rd_q = (rd_k < IDXW'(K)) ? mask[rd_k] : 1'b0;

endmodule
