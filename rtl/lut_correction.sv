// lut_correction: combinational LUT path of the hybrid unit.
//
// Comparators sort the input angle into one of four groups for the sine
// and, independently, for the cosine; each group index addresses a copy of
// the 4 x 2-bit correction ROM, and the ROM output is placed under an
// all-ones upper byte to give the 10-bit LUT value 0x3FC..0x3FF.
//   sine  : 85.5 | 85.625..86.375 | 86.5..87.375 | 87.5..90  deg -> groups 0..3
//   cosine: 4.375 | 3.5..4.25     | 2.375..3.375 | 0..2.25   deg -> groups 0..3
// The values are meaningful only where the threshold switch selects them
// (sine for theta >= 85.5 deg, cosine for theta < 4.5 deg); elsewhere they
// are don't-care. The group boundaries follow the published table; using
// two ROM copies, one per function, is this design's choice.
//
// Interface: theta -> sin_lut, cos_lut, in the same cycle (no clock).
module lut_correction
  import trig_pkg::*;
(
  input  angle_t theta,
  output data_t  sin_lut,
  output data_t  cos_lut
);

  logic [1:0] sin_grp, cos_grp;
  logic [1:0] sin_lsb, cos_lsb;

  always_comb begin
    if      (theta >= SIN_G3) sin_grp = 2'd3;
    else if (theta >= SIN_G2) sin_grp = 2'd2;
    else if (theta >= SIN_G1) sin_grp = 2'd1;
    else                      sin_grp = 2'd0;
  end

  always_comb begin
    if      (theta <= COS_G3) cos_grp = 2'd3;
    else if (theta <= COS_G2) cos_grp = 2'd2;
    else if (theta <= COS_G1) cos_grp = 2'd1;
    else                      cos_grp = 2'd0;
  end

  lut_rom u_rom_sin (.addr(sin_grp), .data(sin_lsb));
  lut_rom u_rom_cos (.addr(cos_grp), .data(cos_lsb));

  assign sin_lut = {LUT_HIGH, sin_lsb};
  assign cos_lut = {LUT_HIGH, cos_lsb};

endmodule
