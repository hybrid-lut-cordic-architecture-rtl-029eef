// tb_alpha_rom: checks every entry of the rotation-constant table against the
// published binary codes, and that each constant of iterations 1..8 lies
// within 0.2 degree of atan(2^-(n+1)), the arctangent it stands for.
module tb_alpha_rom;
  import trig_pkg::*;

  iter_t iter;
  logic  upper;
  zang_t alpha;
  int checks = 0, failures = 0;
  real diff;

  alpha_rom dut (.iter(iter), .upper(upper), .alpha(alpha));

  // Published 10-bit codes for iterations 1..8.
  localparam logic [9:0] CODES [1:8] = '{10'b0001110000, 10'b0000111001, 10'b0000011101,
                                         10'b0000001110, 10'b0000000110, 10'b0000000100,
                                         10'b0000000010, 10'b0000000001};

  task automatic check(input logic [9:0] exp, input string what);
    checks++;
    if (alpha !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, alpha, exp);
    end
  endtask

  initial begin
    iter = '0; upper = 1'b1; #1 check(10'b1000111101, "alpha0 upper");
    upper = 1'b0;            #1 check(10'b1101101100, "alpha0 lower");
    for (int n = 1; n <= 8; n++) begin
      for (int u = 0; u < 2; u++) begin
        iter = iter_t'(n); upper = u[0];
        #1 check(CODES[n], $sformatf("alpha%0d", n));
        // within 0.2 deg of atan(2^-(n+1))
        checks++;
        diff = real'(alpha) / 8.0 - $atan(1.0 / real'(1 << (n + 1))) * 180.0 / 3.14159265;
        if (diff > 0.2 || diff < -0.2) begin
          failures++;
          $display("FAIL alpha%0d far from atan", n);
        end
      end
    end
    for (int n = 9; n < 16; n++) begin
      iter = iter_t'(n); #1 check('0, "out of range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
