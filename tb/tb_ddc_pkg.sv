// tb_ddc_pkg: checks the constant tables of ddc_pkg against their definitions.
//
// For every coefficient set: tap count, linear-phase symmetry h[k] = h[N-1-k],
// unity DC gain (taps sum to 2^15). For the two half-bands: centre tap 0.5
// and every second tap away from the centre exactly 0. For the RRC: peak at
// the centre and the frequency response, evaluated here with real arithmetic,
// at about -3 dB at half the chip rate (1.92 MHz at 15.36 MSPS) and at least
// 60 dB down beyond 2.8 MHz. For the CORDIC table: every entry equals
// round(atan(2^-i) / 2pi * 2^ANGLE_W) to within one LSB.
// Prints "TB_RESULT checks=N failures=M".
module tb_ddc_pkg;
  import ddc_pkg::*;

  localparam real PI = 3.141592653589793;

  int checks = 0, failures = 0;

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // |H(f)| in dB of a set at sample rate fs.
  function automatic real mag_db(coef_set_e set, real f, real fs);
    real re, im;
    re = 0.0;
    im = 0.0;
    for (int k = 0; k < stage_taps(set); k++) begin
      re += real'(stage_coef(set, k)) * $cos(2.0 * PI * f * k / fs);
      im -= real'(stage_coef(set, k)) * $sin(2.0 * PI * f * k / fs);
    end
    return 10.0 * $log10((re * re + im * im) / (32768.0 * 32768.0) + 1.0e-30);
  endfunction

  initial begin
    static coef_set_e sets[3] = '{CS_HB1, CS_HB2, CS_RRC};
    static int want_taps[3] = '{11, 27, 61};
    foreach (sets[s]) begin
      int n, sum;
      n = stage_taps(sets[s]);
      expect_true(n == want_taps[s], $sformatf("set %0d tap count %0d", s, n));
      sum = 0;
      for (int k = 0; k < n; k++) begin
        sum += int'(stage_coef(sets[s], k));
        expect_true(stage_coef(sets[s], k) == stage_coef(sets[s], n - 1 - k),
                    $sformatf("set %0d tap %0d not symmetric", s, k));
      end
      expect_true(sum == 32768, $sformatf("set %0d DC gain %0d/32768", s, sum));
      if (sets[s] != CS_RRC) begin
        expect_true(stage_coef(sets[s], (n - 1) / 2) == 16384, $sformatf("set %0d centre tap", s));
        for (int k = 0; k < n; k++)
          if (k != (n - 1) / 2 && ((k - (n - 1) / 2) % 2) == 0)
            expect_true(stage_coef(sets[s], k) == 0, $sformatf("set %0d tap %0d not zero", s, k));
      end
    end
    // RRC shape
    for (int k = 0; k < RRC_TAPS; k++)
      expect_true(stage_coef(CS_RRC, k) <= stage_coef(CS_RRC, 30), $sformatf("RRC tap %0d above centre", k));
    begin
      real h;
      h = mag_db(CS_RRC, 1.92e6, 15.36e6);
      expect_true(h < -2.5 && h > -4.5, $sformatf("RRC at 1.92 MHz: %f dB", h));
      for (int i = 0; i <= 48; i++) begin
        h = mag_db(CS_RRC, 2.8e6 + i * 0.1e6, 15.36e6);
        expect_true(h < -60.0, $sformatf("RRC at %f MHz: %f dB", 2.8 + i * 0.1, h));
      end
      h = mag_db(CS_HB1, 28.38e6, 61.44e6);
      expect_true(h < -80.0, $sformatf("HB1 stop band %f dB", h));
      h = mag_db(CS_HB2, 13.02e6, 30.72e6);
      expect_true(h < -80.0, $sformatf("HB2 stop band %f dB", h));
    end
    // CORDIC arctangents
    for (int i = 0; i < CORDIC_N; i++) begin
      real a;
      a = $atan(2.0 ** (-i)) / (2.0 * PI) * (2.0 ** ANGLE_W);
      expect_true(real'(CORDIC_ATAN[i]) - a <= 1.0 && a - real'(CORDIC_ATAN[i]) <= 1.0, $sformatf("atan entry %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_ddc_pkg
