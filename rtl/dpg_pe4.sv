// dpg_pe4: PE4, the single rate-gradient unit, Step 4 of the DPG algorithm.
//
//   d phi / d lambda_r_k = R_k - sum_{n=1..N} r^_{k,n}
// The N+1 terms (R_k and the negated r^ of every PE array) are summed by a
// balanced adder tree of ceil(log2(N+1)) levels at full width; only the result is
// saturated to the datapath word.  The requested rates R_k of all K users are held
// in registers of the PE (CFG_RATE), read with the k counter.  Combinational
// apart from the rate registers.
module dpg_pe4
  import dpg_pkg::*;
#(
  parameter int N = 128,                    // subcarriers (PE arrays)
  parameter int K = 32                      // user banks
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_wr_t         cfg,
  input  logic [IDXW-1:0] k,
  input  fx_t             r_h [N],          // r^_{k,n} from PE2 of every array
  output fx_t             grad
);

  localparam int LEAVES = N + 1;
  localparam int LVL    = $clog2(LEAVES);
  localparam int W      = 1 << LVL;
  localparam int AW     = DW + LVL + 1;

  fx_t rate [K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) rate[i] <= '0;
    end else if (cfg.we && cfg.sel == CFG_RATE && cfg.k < IDXW'(K)) begin
      rate[cfg.k] <= fx_t'(cfg.data);
    end
  end

  // Level 0 holds the leaves; level l+1 sums pairs of level l.  Each level is its
  // own array inside a generate block, so every node is a separate net.
  for (genvar l = 0; l <= LVL; l++) begin : g_lvl
    localparam int CNT = W >> l;
    logic signed [AW-1:0] node [CNT];
    for (genvar i = 0; i < CNT; i++) begin : g_node
      if (l == 0) begin : g_leaf
        if (i == 0) begin : g_rate
          assign node[i] = (k < IDXW'(K)) ? AW'(rate[k]) : '0;
        end else if (i <= N) begin : g_r
          assign node[i] = -AW'(r_h[i-1]);
        end else begin : g_pad
          assign node[i] = '0;
        end
      end else begin : g_add
        assign node[i] = g_lvl[l-1].node[2*i] + g_lvl[l-1].node[2*i+1];
      end
    end
  end

  assign grad = sat(wide_t'(g_lvl[LVL].node[0]));

endmodule
