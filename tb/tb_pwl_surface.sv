// tb_pwl_surface: every index of both tables against an independent model.
// The model computes the control surface in real numbers from the breakpoint
// coordinates in units of the universe of discourse (UoD = +/-100):
// symmetrical: uo = d, saturated at +/-100; asymmetrical: segments through
// (0,0), BP1 (20,20), BP2 (60,40), (100,100), then saturated, odd-symmetric.
// With four codes per unit the table output must be within half a code of
// 4*model(d/4), and the reported region must match. Spot checks of points
// printed on the surface plot are also made, and the mode input is toggled
// with d held.
module tb_pwl_surface;
  import siflc_pkg::*;

  logic signed [9:0] d;
  surface_e mode;
  logic signed [9:0] uo;
  pwl_region_e region;
  int checks = 0, failures = 0;

  pwl_surface dut (.d_i(d), .mode_i(mode), .uo_o(uo), .region_o(region));

  function automatic real seg(real x, real x0, real y0, real x1, real y1);
    return y0 + (x - x0) * (y1 - y0) / (x1 - x0);
  endfunction

  function automatic real model(surface_e m, real du, output pwl_region_e r);
    real a, u;
    a = (du < 0.0) ? -du : du;
    if (m == SURF_SYM) begin
      if (a >= 100.0)     begin u = 100.0; r = REG_SAT;   end
      else if (a >= 50.0) begin u = a;     r = REG_OUTER; end
      else                begin u = a;     r = REG_INNER; end
    end else begin
      if (a >= 100.0)     begin u = 100.0;                         r = REG_SAT;   end
      else if (a >= 60.0) begin u = seg(a, 60.0, 40.0, 100.0, 100.0); r = REG_OUTER; end
      else if (a >= 20.0) begin u = seg(a, 20.0, 20.0, 60.0, 40.0);   r = REG_MID;   end
      else                begin u = a;                             r = REG_INNER; end
    end
    return (du < 0.0) ? -u : u;
  endfunction

  task automatic check_point(surface_e m, int dcode, int ucode);
    mode = m; d = 10'(dcode); #1;
    checks++;
    if (int'(uo) != ucode) begin
      failures++;
      $display("FAIL point mode %0d d=%0d uo=%0d expected %0d", m, dcode, uo, ucode);
    end
  endtask

  initial begin
    for (int m = 0; m < 2; m++)
      for (int i = -512; i < 512; i++) begin
        real ref_u, err;
        pwl_region_e ref_r;
        mode = surface_e'(m);
        d = 10'(i);
        #1;
        ref_u = 4.0 * model(mode, real'(i) / 4.0, ref_r);
        err = real'(uo) - ref_u;
        checks++;
        if (err > 0.5 || err < -0.5 || region != ref_r) begin
          failures++;
          if (failures < 10)
            $display("FAIL mode %0d d=%0d uo=%0d model %0.2f region %0d/%0d", m, i, uo, ref_u, region, ref_r);
        end
      end
    // points read off the surfaces (units times four)
    check_point(SURF_SYM, 4*60, 4*60);
    check_point(SURF_SYM, -4*100, -4*100);
    check_point(SURF_SYM, 4*120, 4*100);
    check_point(SURF_ASYM, 4*20, 4*20);     // BP1
    check_point(SURF_ASYM, 4*60, 4*40);     // BP2
    check_point(SURF_ASYM, -4*60, -4*40);
    check_point(SURF_ASYM, 4*40, 4*30);     // middle of the half-slope segment
    check_point(SURF_ASYM, 4*100, 4*100);   // UoD edge
    check_point(SURF_ASYM, -511, -4*100);   // saturated
    // mode switch with d held
    d = 10'(4*40);
    mode = SURF_SYM;  #1; checks++; if (uo != 10'(160)) failures++;
    mode = SURF_ASYM; #1; checks++; if (uo != 10'(120)) failures++;
    mode = SURF_SYM;  #1; checks++; if (uo != 10'(160)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
