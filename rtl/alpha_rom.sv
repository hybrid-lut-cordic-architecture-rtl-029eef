// alpha_rom: rotation-constant table of the 9-iteration CORDIC.
//
// A small combinational ROM indexed by the iteration number. It returns the
// micro-rotation angle alpha_n in the signed 0.125-degree format of the
// angle accumulator. Iteration 0 has two constants chosen by the first-stage
// comparator: 71.625 deg when theta >= 45 deg and -18.5 deg below that.
// Iterations 1..8 use 14, 7.125, 3.625, 1.75, 0.75, 0.5, 0.25 and 0.125 deg.
// These are the design's published constants: they are near, but not equal
// to, the rounded arctangents atan(2^-(n+1)); they were picked so that the
// residual error of the 10-bit datapath collects near 0 and 90 degrees.
// Indices above 8 return 0.
//
// Interface: iter (0..8), upper (theta >= 45 deg) -> alpha. No clock.
module alpha_rom
  import trig_pkg::*;
(
  input  iter_t iter,
  input  logic  upper,
  output zang_t alpha
);

  always_comb begin
    if (iter == '0)
      alpha = upper ? ALPHA0_UPPER : ALPHA0_LOWER;
    else if (iter < iter_t'(N_ITER))
      alpha = ALPHA_TAB[iter];
    else
      alpha = '0;
  end

endmodule
