// tb_threshold_select: drives random path values for every angle 0..720 and
// checks that sine follows the LUT exactly from 85.5 deg up and cosine
// exactly below 4.5 deg, including both boundary angles.
module tb_threshold_select;
  import trig_pkg::*;

  angle_t theta;
  data_t  cs, cc, ls, lc, sine, cosine;
  logic   sfl, cfl;
  int checks = 0, failures = 0;
  bit use_s, use_c;

  threshold_select dut (
    .theta(theta), .cordic_sin(cs), .cordic_cos(cc), .lut_sin(ls), .lut_cos(lc),
    .sine(sine), .cosine(cosine), .sin_from_lut(sfl), .cos_from_lut(cfl)
  );

  initial begin
    for (int t = 0; t <= 720; t++) begin
      theta = angle_t'(t);
      cs = data_t'($urandom); cc = data_t'($urandom);
      ls = data_t'($urandom); lc = data_t'($urandom);
      #1;
      use_s = (real'(t) / 8.0 >= 85.5);
      use_c = (real'(t) / 8.0 <  4.5);
      checks++;
      if (sine !== (use_s ? ls : cs) || sfl !== use_s) begin
        failures++;
        $display("FAIL sine select at %0d", t);
      end
      checks++;
      if (cosine !== (use_c ? lc : cc) || cfl !== use_c) begin
        failures++;
        $display("FAIL cosine select at %0d", t);
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
