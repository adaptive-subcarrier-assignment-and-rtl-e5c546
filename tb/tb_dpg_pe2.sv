// tb_dpg_pe2: checks the PE2 projection against a geometric reference.
//
// For random and hand-placed points (r~, rho~) it computes, in floating point, the
// nearest point of the triangle with corners (0,0), (0,1) and (M,1) by taking the
// closest of the point itself (when inside) and its clamped projections onto the
// three edges.  The RTL result must lie within 1 LSB of it, must be feasible up to
// the rounding of the diagonal case (r^ <= M*rho^ + M/2 LSB), and
// the reported region must agree with where the reference point lies.  Every one
// of the seven regions must be exercised.
module tb_dpg_pe2;
  import dpg_pkg::*;

  localparam int M = 6;

  fx_t r_t, rho_t, r_h, rho_h;
  prj_case_e region;

  dpg_pe2 #(.M(M)) dut (.*);

  int checks = 0, failures = 0;
  int hits [7];
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic seg(input real px, py, ax, ay, bx, by, inout real bestx, besty, bestd);
    real dx, dy, l, qx, qy, d;
    dx = bx - ax; dy = by - ay;
    l = ((px - ax) * dx + (py - ay) * dy) / (dx * dx + dy * dy);
    if (l < 0.0) l = 0.0;
    if (l > 1.0) l = 1.0;
    qx = ax + l * dx; qy = ay + l * dy;
    d = (px - qx) * (px - qx) + (py - qy) * (py - qy);
    if (d < bestd) begin bestd = d; bestx = qx; besty = qy; end
  endtask

  task automatic one(input fx_t r, input fx_t rho);
    real px, py, bx, by, bd, er, erho;
    r_t = r; rho_t = rho;
    #1;
    px = real'(r) / 64.0; py = real'(rho) / 64.0;
    bd = 1.0e30;
    if (py >= 0.0 && py <= 1.0 && px >= 0.0 && px <= M * py) begin
      bx = px; by = py; bd = 0.0;
    end else begin
      seg(px, py, 0.0, 0.0, 0.0, 1.0, bx, by, bd);
      seg(px, py, 0.0, 1.0, real'(M), 1.0, bx, by, bd);
      seg(px, py, 0.0, 0.0, real'(M), 1.0, bx, by, bd);
    end
    er = real'(r_h) / 64.0 - bx;
    erho = real'(rho_h) / 64.0 - by;
    checks++;
    if (er > 1.0/64 || er < -1.0/64 || erho > 1.0/64 || erho < -1.0/64) begin
      failures++;
      if (failures < 10) $display("FAIL: (%0d,%0d) -> (%0d,%0d), expected (%f,%f)",
                                  r, rho, r_h, rho_h, bx * 64, by * 64);
    end
    checks++;
    if (rho_h < 0 || rho_h > FX_ONE || r_h < 0 || 2 * r_h > 2 * M * rho_h + M) begin
      failures++;
      $display("FAIL: infeasible result (%0d,%0d)", r_h, rho_h);
    end
    // region against the location of the reference point
    checks++;
    case (region)
      PRJ_INSIDE: if (!(bd == 0.0)) failures++;
      PRJ_VTX_M1: if (!(bx == real'(M) && by == 1.0)) failures++;
      PRJ_VTX_01: if (!(bx == 0.0 && by == 1.0)) failures++;
      PRJ_VTX_00: if (!(bx == 0.0 && by == 0.0)) failures++;
      PRJ_LEFT:   if (!(bx == 0.0)) failures++;
      PRJ_TOP:    if (!(by == 1.0)) failures++;
      PRJ_DIAG:   if (!(bx - M * by < 1e-9 && bx - M * by > -1e-9)) failures++;
      default:    failures++;
    endcase
    hits[region]++;
  endtask

  initial begin
    // one point per region
    one(fx_t'(100), fx_t'(40));     // inside
    one(fx_t'(-50), fx_t'(30));     // left edge
    one(fx_t'(200), fx_t'(100));    // top edge
    one(fx_t'(-20), fx_t'(90));     // corner (0,1)
    one(fx_t'(-20), fx_t'(-30));    // corner (0,0)
    one(fx_t'(500), fx_t'(90));     // corner (M,1)
    one(fx_t'(200), fx_t'(10));     // diagonal
    one(fx_t'(10), fx_t'(-20));     // diagonal from below the axis
    for (int i = 0; i < 20000; i++)
      one(fx_t'($urandom_range(0, 1400)) - fx_t'(500), fx_t'($urandom_range(0, 300)) - fx_t'(100));
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (hits[i] == 0) begin failures++; $display("FAIL: region %0d never hit", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
