// dpg_out_buffer: output buffer of the DPG accelerator.
//
// The buffer is activated when the run has stopped (done): a read request
// (rd_en, with rd_n chosen here and rd_k already applied to the banks of every PE
// array) returns r^_{k,n}, rho^_{k,n} and the support-mask bit of (k, n) on the
// next clock with rd_valid high.  A request while the accelerator is not done
// returns rd_valid low and leaves the data outputs unchanged.  Registered outputs,
// asynchronous active-low reset.
module dpg_out_buffer
  import dpg_pkg::*;
#(
  parameter int N = 128
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            done,
  input  logic            rd_en,
  input  logic [IDXW-1:0] rd_n,
  input  fx_t             arr_r   [N],
  input  fx_t             arr_rho [N],
  input  logic            arr_sup [N],
  output logic            rd_valid,
  output fx_t             rd_r,
  output fx_t             rd_rho,
  output logic            rd_sup
);

  logic hit;
  assign hit = rd_en && done && (rd_n < IDXW'(N));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_r     <= '0;
      rd_rho   <= '0;
      rd_sup   <= 1'b0;
    end else begin
      rd_valid <= hit;
      if (hit) begin
        rd_r   <= arr_r[rd_n];
        rd_rho <= arr_rho[rd_n];
        rd_sup <= arr_sup[rd_n];
      end
    end
  end

endmodule
