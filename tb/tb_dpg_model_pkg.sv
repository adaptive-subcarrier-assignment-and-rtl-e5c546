// tb_dpg_model_pkg: bit-exact software model of the DPG accelerator, written
// separately from the RTL for the testbenches.
//
// Numbers are handled as plain integers (longint) in units of 2^-6; products are
// floored after the shift and results clamped to 16 bits, which is the arithmetic
// the RTL documents.  The logarithm table is derived here from $ln rather than from
// the integer routine the RTL uses.  run_dpg() runs the complete triple loop of
// the algorithm on arrays held by the caller.
package tb_dpg_model_pkg;

  localparam int     F    = 6;
  localparam longint ONE  = 64;
  localparam longint VMAX = 32767;
  localparam longint VMIN = -32768;

  function automatic longint clamp(input longint v);
    return (v > VMAX) ? VMAX : (v < VMIN) ? VMIN : v;
  endfunction

  function automatic longint fmul(input longint a, input longint b);
    return (a * b) >>> F;
  endfunction

  function automatic longint log2_fx(input longint u);
    longint p, mant, frac;
    if (u <= 0) return -F * ONE;
    p = 0;
    while ((longint'(1) << (p + 1)) <= u) p++;
    mant = (p >= F) ? ((u >> (p - F)) & (ONE - 1)) : ((u << (F - p)) & (ONE - 1));
    frac = longint'($floor(64.0 * ($ln(1.0 + real'(mant) / 64.0) / $ln(2.0)) + 0.5));
    return clamp((p - F) * ONE + frac);
  endfunction

  // Step 2 for one (k, n).
  task automatic pe1(input longint lam_r, lam_rho, sig_inv, a2, ia2,
                     input longint cb, cu, cl,
                     output longint r_t, rho_t);
    longint u, x, num;
    u     = (lam_r * a2 * cu) >>> (2 * F);
    x     = log2_fx(u);
    num   = -lam_rho - fmul(lam_r, cl) + fmul(cb, ia2) + fmul(lam_r, x);
    rho_t = clamp(fmul(num, sig_inv));
    r_t   = clamp(fmul(rho_t, x));
  endtask

  // Step 3 for one (k, n); region numbering follows dpg_pkg::prj_case_e.
  task automatic pe2(input longint r, rho, input int m,
                     output longint r_h, rho_h, output int region);
    longint s, lim, crec, d;
    s    = m * r + rho;
    lim  = (m * m + 1) * ONE;
    crec = ((longint'(1) << 16) + (m * m + 1) / 2) / (m * m + 1);
    if (rho >= 0 && rho <= ONE && r >= 0 && r <= m * rho) begin
      region = 0; r_h = r; rho_h = rho;
    end else if (rho >= 0 && rho <= ONE && r < 0) begin
      region = 3; r_h = 0; rho_h = rho;
    end else if (rho > ONE && r >= 0 && r <= m * ONE) begin
      region = 4; r_h = r; rho_h = ONE;
    end else if (rho > ONE && r < 0) begin
      region = 5; r_h = 0; rho_h = ONE;
    end else if (rho < 0 && s < 0) begin
      region = 6; r_h = 0; rho_h = 0;
    end else if (s > lim) begin
      region = 1; r_h = m * ONE; rho_h = ONE;
    end else begin
      region = 2;
      d = (s * crec + (longint'(1) << 15)) >>> 16;
      rho_h = clamp(d);
      r_h = clamp((m * s * crec + (longint'(1) << 15)) >>> 16);
    end
  endtask

endpackage
