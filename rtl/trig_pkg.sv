// trig_pkg: types and constants shared by the hybrid LUT/CORDIC sine-cosine unit.
//
// Number formats (both 10 bits wide):
//   angle  : unsigned, 7 integer + 3 fraction bits, 0.125 degree per LSB, valid 0..720 (0..90 deg)
//   result : unsigned, 10 fraction bits, 2^-10 per LSB, 0 .. 1023/1024
// The CORDIC angle accumulator uses the same 0.125-degree LSB but is signed (zang_t).
//
// The rotation constants, the threshold and the correction-group breakpoints
// below are the design's published numbers. The gain-compensated start value
// CORDIC_K (0.6073 * 1024, rounded) and the two preload vectors derived from it
// are worked out here; they reproduce the published simulation traces exactly.
package trig_pkg;

  localparam int unsigned ANGLE_W = 10;
  localparam int unsigned DATA_W  = 10;
  localparam int unsigned N_ITER  = 9;          // iterations 0..8, one per clock
  localparam int unsigned ITER_W  = 4;

  typedef logic        [ANGLE_W-1:0] angle_t;   // input angle, 0.125 deg / LSB
  typedef logic signed [ANGLE_W-1:0] zang_t;    // residual angle, signed
  typedef logic        [DATA_W-1:0]  data_t;    // sine / cosine, 2^-10 / LSB
  typedef logic        [ITER_W-1:0]  iter_t;

  // Angle landmarks in 0.125-degree units.
  localparam angle_t ANG_45 = angle_t'(360);
  localparam angle_t ANG_90 = angle_t'(720);

  // Switching threshold th = 85.5 deg: sine from the LUT for theta >= th,
  // cosine from the LUT for theta < 90 - th = 4.5 deg.
  localparam angle_t TH_DEFAULT = angle_t'(684);

  // Rotation constants alpha_n, 0.125 deg / LSB. alpha_0 has two values:
  // 71.625 deg (theta >= 45) and -18.5 deg (theta < 45).
  localparam zang_t ALPHA0_UPPER = zang_t'(573);    // 10'b1000111101
  localparam zang_t ALPHA0_LOWER = zang_t'(-148);   // 10'b1101101100
  localparam zang_t ALPHA_TAB [1:N_ITER-1] = '{
    zang_t'(112),   // 14     deg
    zang_t'(57),    //  7.125 deg
    zang_t'(29),    //  3.625 deg
    zang_t'(14),    //  1.75  deg
    zang_t'(6),     //  0.75  deg
    zang_t'(4),     //  0.5   deg
    zang_t'(2),     //  0.25  deg
    zang_t'(1)      //  0.125 deg
  };

  // Iteration 0 replaces the two classic first micro-rotations (45 deg and
  // +/-26.6 deg, shifts 0 and 1) applied to the gain-compensated vector (K, 0):
  // the result is (K - K/2, K + K/2) for theta >= 45 and the swapped pair
  // otherwise. Later iterations n use the shift n + 1.
  localparam data_t CORDIC_K    = data_t'(622);               // 0.6073 * 1024
  localparam data_t PRE_SMALL   = CORDIC_K - (CORDIC_K >> 1); // 311
  localparam data_t PRE_LARGE   = CORDIC_K + (CORDIC_K >> 1); // 933

  // Correction groups (Table of precomputed values). Group g supplies the two
  // LSBs g below an all-ones upper byte, i.e. 0x3FC + g.
  // Sine groups by theta: 684 | 685..691 | 692..699 | 700..720
  localparam angle_t SIN_G1 = angle_t'(685);   // 85.625 deg
  localparam angle_t SIN_G2 = angle_t'(692);   // 86.5   deg
  localparam angle_t SIN_G3 = angle_t'(700);   // 87.5   deg
  // Cosine groups by theta: 35 | 28..34 | 19..27 | 0..18
  localparam angle_t COS_G1 = angle_t'(34);    // 4.25  deg
  localparam angle_t COS_G2 = angle_t'(27);    // 3.375 deg
  localparam angle_t COS_G3 = angle_t'(18);    // 2.25  deg

  localparam logic [DATA_W-3:0] LUT_HIGH = '1;  // upper 8 bits of every LUT value

endpackage
