// tb_signed_distance: the signed distance against a real-number model.
// With lambda = 0.75 and unit input gains the coefficients are
// KE = 256*0.75/1.25 = 153.6 -> 154 and KDE = 256/1.25 = 204.8 -> 205; the
// output must be floor((KE*e + KDE*de)/256) clipped to +/-511, and must lie
// within one code plus the coefficient rounding error of (de + lambda*e)/sqrt(1+lambda^2).
// Points on the main diagonal de = -lambda*e must give d near zero.
module tb_signed_distance;
  localparam real LAMBDA = 0.75;
  localparam logic signed [15:0] KE  = 16'sd154;
  localparam logic signed [15:0] KDE = 16'sd205;

  logic signed [12:0] e;
  logic signed [13:0] de;
  logic signed [9:0]  d;
  logic clip;
  int checks = 0, failures = 0;

  signed_distance #(.E_W(13), .DE_W(14), .KE(KE), .KDE(KDE), .OUT_W(10)) dut (
    .e_i(e), .de_i(de), .d_o(d), .clip_o(clip)
  );

  task automatic check(int ev, int dev);
    int  acc, expd;
    bit  expclip;
    real ideal, tol;
    e  = 13'(ev);
    de = 14'(dev);
    #1;
    acc = 154 * ev + 205 * dev;
    expd = (acc >= 0) ? acc / 256 : -((-acc + 255) / 256);   // floor division
    expclip = 1'b0;
    if (expd > 511)  begin expd = 511;  expclip = 1'b1; end
    if (expd < -511) begin expd = -511; expclip = 1'b1; end
    ideal = (real'(dev) + LAMBDA * real'(ev)) / $sqrt(1.0 + LAMBDA * LAMBDA);
    // one code of floor rounding plus the coefficient rounding error
    tol = 1.0 + 0.002 * real'((ev < 0 ? -ev : ev) + (dev < 0 ? -dev : dev));
    checks++;
    if (int'(d) != expd || clip != expclip ||
        (!expclip && ((real'(d) - ideal > tol) || (ideal - real'(d) > tol)))) begin
      failures++;
      if (failures < 10)
        $display("FAIL e=%0d de=%0d d=%0d expected %0d (ideal %0.2f) clip %0b", ev, dev, d, expd, ideal, clip);
    end
  endtask

  initial begin
    check(0, 0);
    check(100, 0);      // pure error
    check(0, 100);      // pure change of error
    check(-100, 0);
    check(400, -300);   // on the main diagonal
    check(-400, 300);
    check(4095, 8191);  // extreme corners: clipped
    check(-4096, -8192);
    for (int n = 0; n < 20000; n++)
      check($urandom_range(1200) - 600, $urandom_range(1200) - 600);
    for (int n = 0; n < 5000; n++)
      check($urandom_range(8191) - 4096, $urandom_range(16383) - 8192);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
