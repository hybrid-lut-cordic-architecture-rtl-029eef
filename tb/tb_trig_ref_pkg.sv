// tb_trig_ref_pkg: reference models used by the testbenches.
//
// ref_cordic re-computes the 9-iteration fixed-point CORDIC with plain
// integer arithmetic (explicit modulo-1024 wrap, floor division for shifts),
// written independently of the RTL. The *_true functions give the exact
// sine and cosine of an angle code (0.125 deg per LSB).
package tb_trig_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // Rotation constants in 0.125-degree units, iterations 1..8.
  function automatic int alpha_ref(input int n);
    case (n)
      1: return 112;  2: return 57;  3: return 29;  4: return 14;
      5: return 6;    6: return 4;   7: return 2;   8: return 1;
      default: return 0;
    endcase
  endfunction

  // Returns the X (cos) and Y (sin) register values after iteration `last`
  // (0..8) for input angle code t.
  task automatic ref_cordic(input int t, input int last, output int x, output int y);
    int z, nx, ny, p;
    if (t >= 360) begin x = 311; y = 933; z = t - 573; end
    else          begin x = 933; y = 311; z = t - 148; end
    for (int n = 1; n <= last; n++) begin
      p  = 1 << (n + 1);
      if (z >= 0) begin nx = x - y / p; ny = y + x / p; z = z - alpha_ref(n); end
      else        begin nx = x + y / p; ny = y - x / p; z = z + alpha_ref(n); end
      x = ((nx % 1024) + 1024) % 1024;
      y = ((ny % 1024) + 1024) % 1024;
    end
  endtask

  function automatic real sin_true(input int t);
    return $sin(real'(t) / 8.0 * PI / 180.0);
  endfunction

  function automatic real cos_true(input int t);
    return $cos(real'(t) / 8.0 * PI / 180.0);
  endfunction

endpackage
