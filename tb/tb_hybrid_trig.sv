// tb_hybrid_trig: end-to-end test of the hybrid sine/cosine unit at its
// default parameters. Every angle code 0..720 (0..90 deg in 0.125 deg steps)
// is applied for one 9-cycle frame. Checks:
//  - outputs from the LUT path are correct in the same cycle as the angle;
//  - CORDIC-path outputs match an independent model when valid rises, which
//    must happen exactly nine clocks after the angle is sampled;
//  - the published example results (85.375, 85.5, 4.375 and 4.5 deg);
//  - accuracy over the quadrant: max abs error below 0.0099 and mean squared
//    error below 6.0e-6 for both functions, and at least a 97% MSE drop
//    against the CORDIC alone (reference model without the LUT path).
// It counts how often each mechanism was exercised (sine LUT, cosine LUT,
// both CORDIC start branches, result strobe) and fails if one never was.
module tb_hybrid_trig;
  import trig_pkg::*;
  import tb_trig_ref_pkg::*;

  logic   clk = 1'b0, rst = 1'b1;
  angle_t theta = '0;
  data_t  sine, cosine;
  logic   valid;
  int checks = 0, failures = 0;
  int cycles;
  int ex, ey, exp_s, exp_c;
  int n_sin_lut = 0, n_cos_lut = 0, n_upper = 0, n_lower = 0, n_valid = 0, n_both_cordic = 0;
  real es, ec, max_s = 0, max_c = 0, mse_s = 0, mse_c = 0, mse_s_cordic = 0, mse_c_cordic = 0;
  int n_pts = 0;

  hybrid_trig dut (.clk(clk), .rst(rst), .theta(theta), .sine(sine), .cosine(cosine), .valid(valid));

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  function automatic int sin_lut_ref(input int t);
    int v = int'($floor(sin_true(t) * 1024.0));
    return (v > 1023) ? 1023 : v;
  endfunction

  function automatic int cos_lut_ref(input int t);   // table by 90 - theta
    if (t == 35) return 'h3FC;
    if (t >= 28) return 'h3FD;
    if (t >= 19) return 'h3FE;
    return 'h3FF;
  endfunction

  task automatic run_angle(input int t, output int rs, output int rc);
    bit s_lut, c_lut;
    s_lut = (t >= 684);
    c_lut = (t < 36);
    theta = angle_t'(t);
    #1;
    // LUT results are available before any clock edge
    if (s_lut) begin
      checks++;
      if (int'(sine) != sin_lut_ref(t)) fail($sformatf("same-cycle sine LUT at %0d: %h", t, sine));
    end
    if (c_lut) begin
      checks++;
      if (int'(cosine) != cos_lut_ref(t)) fail($sformatf("same-cycle cosine LUT at %0d: %h", t, cosine));
    end
    for (int k = 1; k <= 9; k++) begin
      @(posedge clk);
      #1;
      checks++;
      if (valid !== (k == 9)) fail($sformatf("valid=%b after edge %0d for angle %0d", valid, k, t));
    end
    ref_cordic(t, 8, ex, ey);
    exp_s = s_lut ? sin_lut_ref(t) : ey;
    exp_c = c_lut ? cos_lut_ref(t) : ex;
    checks++;
    if (int'(sine) != exp_s || int'(cosine) != exp_c)
      fail($sformatf("angle %0d: sine %h cosine %h expected %h %h", t, sine, cosine, exp_s, exp_c));
    rs = int'(sine);
    rc = int'(cosine);
    if (s_lut) n_sin_lut++;
    if (c_lut) n_cos_lut++;
    if (!s_lut && !c_lut) n_both_cordic++;
    if (t >= 360) n_upper++; else n_lower++;
    if (valid) n_valid++;
    // CORDIC alone (model), for the comparison
    es = real'(ey) / 1024.0 - sin_true(t);
    ec = real'(ex) / 1024.0 - cos_true(t);
    mse_s_cordic += es * es;
    mse_c_cordic += ec * ec;
  endtask

  task automatic expect_pub(input int t, input int s, input int c);
    int rs, rc;
    run_angle(t, rs, rc);
    checks++;
    if (rs != s || rc != c) fail($sformatf("published example %h: got %h/%h expected %h/%h", t, rs, rc, s, c));
  endtask

  initial begin
    int rs, rc;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t <= 720; t++) begin
      run_angle(t, rs, rc);
      es = real'(rs) / 1024.0 - sin_true(t);
      ec = real'(rc) / 1024.0 - cos_true(t);
      mse_s += es * es;
      mse_c += ec * ec;
      if (es < 0) es = -es;
      if (ec < 0) ec = -ec;
      if (es > max_s) max_s = es;
      if (ec > max_c) max_c = ec;
      n_pts++;
    end
    mse_s /= n_pts; mse_c /= n_pts; mse_s_cordic /= n_pts; mse_c_cordic /= n_pts;
    $display("hybrid : sine max %f mse %e | cosine max %f mse %e", max_s, mse_s, max_c, mse_c);
    $display("CORDIC : sine mse %e | cosine mse %e", mse_s_cordic, mse_c_cordic);
    checks++; if (max_s > 0.0099) fail("sine max error");
    checks++; if (max_c > 0.0099) fail("cosine max error");
    checks++; if (mse_s > 6.0e-6) fail("sine MSE");
    checks++; if (mse_c > 6.0e-6) fail("cosine MSE");
    checks++; if (mse_s > 0.03 * mse_s_cordic) fail("sine MSE reduction below 97%");
    checks++; if (mse_c > 0.03 * mse_c_cordic) fail("cosine MSE reduction below 97%");
    // published examples
    expect_pub('h2ab, 'h3fa, 'h055);   // 85.375 deg: both CORDIC
    expect_pub('h2ac, 'h3fc, 'h055);   // 85.5 deg: sine LUT
    expect_pub('h023, 'h045, 'h3fc);   // 4.375 deg: cosine LUT
    expect_pub('h024, 'h055, 'h3fa);   // 4.5 deg: both CORDIC
    $display("mechanisms: sine LUT %0d, cosine LUT %0d, both CORDIC %0d, upper start %0d, lower start %0d, valid %0d",
             n_sin_lut, n_cos_lut, n_both_cordic, n_upper, n_lower, n_valid);
    checks++; if (n_sin_lut == 0) fail("sine LUT path never used");
    checks++; if (n_cos_lut == 0) fail("cosine LUT path never used");
    checks++; if (n_both_cordic == 0) fail("CORDIC path never used");
    checks++; if (n_upper == 0) fail("upper CORDIC start never used");
    checks++; if (n_lower == 0) fail("lower CORDIC start never used");
    checks++; if (n_valid == 0) fail("valid never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cycles = 0;
    forever begin
      @(posedge clk);
      cycles++;
      if (cycles > 20000) begin
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
