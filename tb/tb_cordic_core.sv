// tb_cordic_core: runs every angle 0..90 deg (codes 0..720) through the
// iterative CORDIC, one 9-cycle frame each, and compares the X and Y
// registers after every iteration with an independent integer model. It
// also checks the traces printed for 85.375 deg and 4.375 deg, the done
// flag (high exactly once per frame, nine clocks after sampling) and that
// the final results stay within 0.085 of the true sine and cosine.
module tb_cordic_core;
  import trig_pkg::*;
  import tb_trig_ref_pkg::*;

  logic   clk = 1'b0, rst = 1'b1;
  angle_t theta = '0;
  data_t  x_cos, y_sin;
  iter_t  iter;
  logic   done;
  int checks = 0, failures = 0;
  int ex, ey, cycles;
  real e, emax;

  cordic_core dut (.clk(clk), .rst(rst), .theta(theta), .x_cos(x_cos), .y_sin(y_sin),
                   .iter(iter), .done(done));

  always #5 clk = ~clk;

  // Published trace values after iterations 0..8.
  localparam logic [9:0] COS_2AB [9] = '{10'h137, 10'h04e, 10'h0cc, 10'h08e, 10'h06f,
                                         10'h060, 10'h059, 10'h056, 10'h055};
  localparam logic [9:0] SIN_2AB [9] = '{10'h3a5, 10'h3f2, 10'h3e9, 10'h3f5, 10'h3f9,
                                         10'h3fa, 10'h3fa, 10'h3fa, 10'h3fa};
  localparam logic [9:0] SIN_023 [9] = '{10'h137, 10'h04e, 10'h3d0, 10'h00f, 10'h02c,
                                         10'h03a, 10'h041, 10'h044, 10'h045};

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Runs one frame for angle t; the core must be at iteration 0.
  task automatic run_frame(input int t);
    checks++;
    if (iter != '0) fail($sformatf("frame for %0d does not start at iteration 0", t));
    theta = angle_t'(t);
    for (int n = 0; n < 9; n++) begin
      @(posedge clk);
      #1;
      ref_cordic(t, n, ex, ey);
      checks++;
      if (int'(x_cos) != ex || int'(y_sin) != ey)
        fail($sformatf("theta %0d iter %0d: x=%h y=%h expected x=%h y=%h", t, n, x_cos, y_sin, ex, ey));
      if (t == 'h2ab) begin
        checks++;
        if (x_cos !== COS_2AB[n] || y_sin !== SIN_2AB[n]) fail($sformatf("trace 2ab iter %0d", n));
      end
      if (t == 'h023) begin
        checks++;
        if (y_sin !== SIN_023[n]) fail($sformatf("trace 023 iter %0d", n));
      end
      checks++;
      if (done !== (n == 8)) fail($sformatf("done=%b after edge %0d", done, n + 1));
      theta = angle_t'($urandom_range(720));   // must not disturb the frame
    end
    e = real'(y_sin) / 1024.0 - sin_true(t); if (e < 0) e = -e; if (e > emax) emax = e;
    e = real'(x_cos) / 1024.0 - cos_true(t); if (e < 0) e = -e; if (e > emax) emax = e;
  endtask

  initial begin
    emax = 0.0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    checks++;
    if (done !== 1'b0) fail("done high straight after reset");
    for (int t = 0; t <= 720; t++) run_frame(t);
    run_frame('h2ab);
    run_frame('h023);
    // reset in mid-frame restarts at iteration 0
    theta = angle_t'(100);
    repeat (4) @(posedge clk);
    #1 rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    checks++;
    if (iter != '0 || done !== 1'b0) fail("reset did not restart the core");
    run_frame(500);
    checks++;
    if (emax > 0.085) fail($sformatf("max CORDIC error %f", emax));
    $display("CORDIC-only max abs error %f", emax);
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
