// dpg_pkg: shared number format, configuration bus and arithmetic helpers of the
// Dual Projected Gradient (DPG) accelerator.
//
// Every datapath value is a 16-bit two's-complement fixed-point number with FW
// fraction bits (fx_t).  The 16-bit word follows the 16x16-bit multipliers the
// architecture is costed with; the split into 10 integer and 6 fraction bits is this
// design's choice, made so that the dual variables of realistic problems (tens to
// a few hundred) stay in range while rho keeps a resolution of 1/64.
// Products are formed at full width in wide_t, shifted right by FW (rounding toward
// minus infinity) and saturated only where a value is written back to fx_t.
//
// The configuration bus (cfg_wr_t) is a single write port that is broadcast to all
// PEs; each PE keeps its own copy of the constants it needs, as the architecture
// embeds constant registers in the PE that uses them.  The k and n fields are
// IDXW bits whatever K and N are, so arrays smaller than 2^IDXW are indexed by a
// wider value (Verilator's WIDTHTRUNC); every such access is range-checked first.
// Assertions use rst_n in disable iff, which Verilator notes as SYNCASYNCNET; the
// flops themselves are reset asynchronously only.
package dpg_pkg;

  localparam int DW = 16;               // datapath word
  localparam int FW = 6;                // fraction bits
  localparam int WW = 64;               // width of intermediate results
  localparam int IDXW = 8;              // width of the k / n fields of the config bus

  typedef logic signed [DW-1:0] fx_t;
  typedef logic signed [WW-1:0] wide_t;

  localparam fx_t FX_ONE = fx_t'(1 << FW);
  localparam fx_t FX_MAX = fx_t'({1'b0, {(DW-1){1'b1}}});
  localparam fx_t FX_MIN = fx_t'({1'b1, {(DW-1){1'b0}}});

  // Configuration registers reachable through the write port.
  typedef enum logic [2:0] {
    CFG_ALPHA2     = 3'd0,   // alpha^2_{k,n}          (PE1 of array n, bank k)
    CFG_INV_ALPHA2 = 3'd1,   // 1/alpha^2_{k,n}        (PE1 of array n, bank k)
    CFG_RATE       = 3'd2,   // R_k, integer bits/symbol in fx format (PE4, bank k)
    CFG_BETA       = 3'd3,   // step size beta          (PE3 of every array, PE5)
    CFG_ETA_INV    = 3'd4,   // 1/eta, growth of 1/sigma (PE7)
    CFG_TMAX       = 3'd5,   // t_max, unsigned integer  (counters)
    CFG_JMAX       = 3'd6,   // j_max, unsigned integer  (counters)
    CFG_USERS      = 3'd7    // number of active users K (counters)
  } cfg_sel_e;

  typedef struct packed {
    logic            we;
    cfg_sel_e        sel;
    logic [IDXW-1:0] k;      // user index, 0-based
    logic [IDXW-1:0] n;      // subcarrier index, 0-based
    logic [DW-1:0]   data;
  } cfg_wr_t;

  // Region of the (r, rho) plane a projection fell in.
  typedef enum logic [2:0] {
    PRJ_INSIDE = 3'd0,   // already feasible
    PRJ_VTX_M1 = 3'd1,   // vertex (M, 1)
    PRJ_DIAG   = 3'd2,   // edge r = M rho
    PRJ_LEFT   = 3'd3,   // edge r = 0
    PRJ_TOP    = 3'd4,   // edge rho = 1
    PRJ_VTX_01 = 3'd5,   // vertex (0, 1)
    PRJ_VTX_00 = 3'd6    // vertex (0, 0)
  } prj_case_e;

  // Saturate a wide value to the datapath word.
  function automatic fx_t sat(input wide_t v);
    if (v > wide_t'(FX_MAX)) return FX_MAX;
    if (v < wide_t'(FX_MIN)) return FX_MIN;
    return fx_t'(v);
  endfunction

  // Fixed-point product of two wide operands, FW fraction bits kept.
  function automatic wide_t wmul(input wide_t a, input wide_t b);
    wide_t p;
    p = a * b;
    return p >>> FW;
  endfunction

  // Sign-extend a datapath word.
  function automatic wide_t wx(input fx_t a);
    return wide_t'(a);
  endfunction

  // Fractional part of log2(1 + a/2^FW), scaled by 2^FW and rounded to nearest.
  // Computed with integers only (repeated squaring), so it can fill a ROM at
  // elaboration time: y holds 1+a/2^FW with P fraction bits; each squaring that
  // reaches 2 yields a 1 bit of the logarithm.
  function automatic int unsigned log2_frac(input int unsigned a);
    localparam int P = 30;
    longint unsigned y;
    int unsigned bits;
    y = (longint'(1) << P) + (longint'(a) << (P - FW));
    bits = 0;
    for (int i = 0; i < FW + 1; i++) begin
      y = (y * y) >> P;
      bits = bits << 1;
      if (y >= (longint'(2) << P)) begin
        bits = bits | 1;
        y = y >> 1;
      end
    end
    return (bits + 1) >> 1;
  endfunction

endpackage
