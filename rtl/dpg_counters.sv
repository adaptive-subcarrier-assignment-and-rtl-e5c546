// dpg_counters: the three loop counters CT_k, CT_t, CT_j and the run control of the
// DPG accelerator.
//
// CT_k circulates over the active users and advances every clock; CT_t advances
// when CT_k wraps and circulates over t_max outer iterations; CT_j advances when
// CT_t wraps and the run ends after j_max sigma levels.  One run therefore takes
// users * t_max * j_max clocks.  Counters are 0-based here (k = 0 is the first
// user).  The loop limits are registers loaded through the configuration bus
// (CFG_USERS, CFG_TMAX, CFG_JMAX); a limit of 0 counts as 1.
//
// start, accepted only while idle, raises init for one cycle (Step 0: the
// multiplier and sigma registers are loaded with their initial values) and the
// counters run from the next cycle.  busy is high during the users*t_max*j_max
// running cycles; done rises on the clock edge that ends the last one and stays
// high until the next start.  Asynchronous active-low reset.
module dpg_counters
  import dpg_pkg::*;
#(
  parameter int K          = 32,      // user banks, reset value of the user count
  parameter int TMAX_RESET = 1500,    // reset value of t_max
  parameter int JMAX_RESET = 12       // reset value of j_max
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_wr_t         cfg,
  input  logic            start,
  output logic            init,
  output logic            busy,
  output logic            done,
  output logic [IDXW-1:0] k,
  output logic [15:0]     t,
  output logic [15:0]     j,
  output logic            k_first,
  output logic            k_last,
  output logic            t_last,
  output logic            j_last
);

  logic [IDXW-1:0] users;
  logic [15:0]     tmax, jmax;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      users <= IDXW'(K);
      tmax  <= 16'(TMAX_RESET);
      jmax  <= 16'(JMAX_RESET);
    end else if (cfg.we && !busy) begin
      case (cfg.sel)
        CFG_USERS: users <= (cfg.data > 16'(K)) ? IDXW'(K) : IDXW'(cfg.data);
        CFG_TMAX:  tmax  <= cfg.data;
        CFG_JMAX:  jmax  <= cfg.data;
        default: ;
      endcase
    end
  end

  logic [IDXW-1:0] k_end;
  logic [15:0]     t_end, j_end;

  assign k_end   = (users == '0) ? '0 : users - 1'b1;
  assign t_end   = (tmax  == '0) ? '0 : tmax  - 1'b1;
  assign j_end   = (jmax  == '0) ? '0 : jmax  - 1'b1;
  assign k_first = (k == '0);
  assign k_last  = (k == k_end);
  assign t_last  = (t == t_end);
  assign j_last  = (j == j_end);
  assign init    = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      k    <= '0;
      t    <= '0;
      j    <= '0;
    end else if (init) begin
      busy <= 1'b1;
      done <= 1'b0;
      k    <= '0;
      t    <= '0;
      j    <= '0;
    end else if (busy) begin
      if (!k_last) begin
        k <= k + 1'b1;
      end else begin
        k <= '0;
        if (!t_last) begin
          t <= t + 1'b1;
        end else begin
          t <= '0;
          if (!j_last) begin
            j <= j + 1'b1;
          end else begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // The user counter never passes the active user count while running.
  a_k_range: assert property (@(posedge clk) disable iff (!rst_n) busy |-> k <= k_end);
  // A run never reports done while busy.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) !(busy && done));

endmodule
