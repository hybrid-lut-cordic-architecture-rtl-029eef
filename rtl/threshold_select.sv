// threshold_select: comparator-based switch between the LUT and CORDIC paths.
//
// Sine comes from the LUT when theta >= TH (85.5 deg by default) and from
// the CORDIC otherwise. Cosine comes from the LUT when theta < 90 deg - TH
// (4.5 deg) and from the CORDIC otherwise. At theta exactly 85.5 deg the
// sine uses the LUT and at exactly 4.5 deg the cosine uses the CORDIC, as in
// the published simulation traces. The switch acts on the live input angle,
// so a LUT result appears in the same cycle as its angle.
//
// Interface: all combinational. sin_from_lut / cos_from_lut tell which path
// drives each output.
module threshold_select
  import trig_pkg::*;
#(
  parameter angle_t TH = TH_DEFAULT
) (
  input  angle_t theta,
  input  data_t  cordic_sin,
  input  data_t  cordic_cos,
  input  data_t  lut_sin,
  input  data_t  lut_cos,
  output data_t  sine,
  output data_t  cosine,
  output logic   sin_from_lut,
  output logic   cos_from_lut
);

  assign sin_from_lut = (theta >= TH);
  assign cos_from_lut = (theta < (ANG_90 - TH));

  assign sine   = sin_from_lut ? lut_sin : cordic_sin;
  assign cosine = cos_from_lut ? lut_cos : cordic_cos;

endmodule
