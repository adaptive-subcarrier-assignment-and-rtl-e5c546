// dpg_pe2: PE2 of PE array n, Step 3 of the DPG algorithm.
//
// Projects the unconstrained point (r~, rho~) onto the feasible set of one
// user/subcarrier pair, the triangle 0 <= rho <= 1, 0 <= r <= M*rho, whose corners
// are (0,0), (0,1) and (M,1).  The Euclidean projection has seven regions: inside
// (unchanged), the three edges and the three corners.  With s = M*r~ + rho~:
//   inside   0<=rho~<=1, 0<=r~<=M*rho~   -> (r~, rho~)
//   left     0<=rho~<=1, r~<0            -> (0, rho~)
//   top      rho~>1, 0<=r~<=M            -> (r~, 1)
//   (0,1)    rho~>1, r~<0                -> (0, 1)
//   (0,0)    rho~<0, s<0                 -> (0, 0)
//   (M,1)    r~>M, s>M^2+1               -> (M, 1)
//   diagonal otherwise (r~>M*rho~, 0<=s<=M^2+1) -> (M*s, s)/(M^2+1)
// The division by M^2+1 is a multiplication by a 16-fraction-bit reciprocal;
// r^ and rho^ of the diagonal case are each rounded to nearest, so r^ may exceed
// M*rho^ by less than M/2 LSB.
// Combinational; region reports which case applied.
module dpg_pe2
  import dpg_pkg::*;
#(
  parameter int M = 6                       // largest number of bits per symbol
) (
  input  fx_t       r_t,
  input  fx_t       rho_t,
  output fx_t       r_h,
  output fx_t       rho_h,
  output prj_case_e region
);

  localparam int    RSH  = 16;
  localparam wide_t CREC = wide_t'(((1 << RSH) + (M*M + 1) / 2) / (M*M + 1));
  localparam wide_t ONE  = wide_t'(FX_ONE);
  localparam wide_t MONE = wide_t'(M) * ONE;
  localparam wide_t SMAX = wide_t'(M*M + 1) * ONE;

  wide_t r, rho, mrho, s, dg_rho, dg_r;

  always_comb begin
    r      = wx(r_t);
    rho    = wx(rho_t);
    mrho   = wide_t'(M) * rho;
    s      = wide_t'(M) * r + rho;
    dg_rho = (s * CREC + (wide_t'(1) <<< (RSH - 1))) >>> RSH;
    dg_r   = (wide_t'(M) * s * CREC + (wide_t'(1) <<< (RSH - 1))) >>> RSH;
    if (rho >= 0 && rho <= ONE && r >= 0 && r <= mrho) begin
      region = PRJ_INSIDE; r_h = r_t;             rho_h = rho_t;
    end else if (rho >= 0 && rho <= ONE && r < 0) begin
      region = PRJ_LEFT;   r_h = '0;              rho_h = rho_t;
    end else if (rho > ONE && r >= 0 && r <= MONE) begin
      region = PRJ_TOP;    r_h = r_t;             rho_h = FX_ONE;
    end else if (rho > ONE && r < 0) begin
      region = PRJ_VTX_01; r_h = '0;              rho_h = FX_ONE;
    end else if (rho < 0 && s < 0) begin
      region = PRJ_VTX_00; r_h = '0;              rho_h = '0;
    end else if (s > SMAX) begin
      region = PRJ_VTX_M1; r_h = fx_t'(MONE);     rho_h = FX_ONE;
    end else begin
      region = PRJ_DIAG;   r_h = sat(dg_r);   rho_h = sat(dg_rho);
    end
  end

endmodule
