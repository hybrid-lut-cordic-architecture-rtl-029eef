// tb_lut_correction: sweeps the whole supported angle range through the LUT
// path. In the sine region (85.5..90 deg) the LUT value must equal
// floor(sin * 1024) clipped to 0x3FF, computed here with real arithmetic.
// In the cosine region (below 4.5 deg) it must match the published interval
// table (given here in degrees of 90 - theta) and stay within 1.5 LSB of
// the true cosine (the published table sits up to 1.1 LSB low).
module tb_lut_correction;
  import trig_pkg::*;
  import tb_trig_ref_pkg::*;

  angle_t theta;
  data_t  sin_lut, cos_lut;
  int checks = 0, failures = 0;
  int exp_s, exp_c;
  real deg, err;

  lut_correction dut (.theta(theta), .sin_lut(sin_lut), .cos_lut(cos_lut));

  initial begin
    for (int t = 0; t <= 720; t++) begin
      theta = angle_t'(t);
      #1;
      deg = real'(t) / 8.0;
      if (t >= 684) begin
        exp_s = int'($floor(sin_true(t) * 1024.0));
        if (exp_s > 1023) exp_s = 1023;
        checks++;
        if (int'(sin_lut) != exp_s) begin
          failures++;
          $display("FAIL sin_lut(%0.3f) = %h expected %h", deg, sin_lut, exp_s);
        end
      end
      if (t < 36) begin
        if      (deg >  4.3)  exp_c = 'h3FC;   // 4.375
        else if (deg >= 3.5)  exp_c = 'h3FD;   // 3.5 .. 4.25
        else if (deg >= 2.375) exp_c = 'h3FE;  // 2.375 .. 3.375
        else                  exp_c = 'h3FF;   // 0 .. 2.25
        checks++;
        if (int'(cos_lut) != exp_c) begin
          failures++;
          $display("FAIL cos_lut(%0.3f) = %h expected %h", deg, cos_lut, exp_c);
        end
        err = real'(cos_lut) / 1024.0 - cos_true(t);
        checks++;
        if (err > 1.5 / 1024.0 || err < -1.5 / 1024.0) begin
          failures++;
          $display("FAIL cos_lut(%0.3f) error %f", deg, err);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
