// hybrid_trig: hybrid LUT/CORDIC sine and cosine unit (top level).
//
// Computes sin(theta) and cos(theta) for a first-quadrant angle with 10-bit
// input (0.125 deg per LSB, 0..90 deg) and 10-bit outputs (2^-10 per LSB).
// A small iterative CORDIC (cordic_core) handles most of the range in nine
// clocks. Its worst errors sit close to 90 deg for sine and close to 0 deg
// for cosine, so there a tiny correction LUT (lut_correction) supplies the
// value instead, combinationally, and a threshold switch (threshold_select)
// picks the path: sine from the LUT for theta >= 85.5 deg, cosine from the
// LUT for theta < 4.5 deg.
//
// Timing: the CORDIC runs continuously in 9-cycle frames and samples theta
// at the edge that ends iteration 0. Hold theta for a whole frame. A CORDIC
// result is final nine clocks after sampling and is marked by valid (one
// cycle per frame); a LUT-path output follows theta in the same cycle.
// Between valid pulses the CORDIC-driven outputs show intermediate values.
// Inputs above 720 (90 deg) are outside the supported range. The valid flag
// and the synchronous reset are this implementation's additions to the
// published interface of one angle input and two result outputs.
module hybrid_trig
  import trig_pkg::*;
#(
  parameter angle_t TH = TH_DEFAULT
) (
  input  logic   clk,
  input  logic   rst,
  input  angle_t theta,
  output data_t  sine,
  output data_t  cosine,
  output logic   valid
);

  data_t cordic_sin, cordic_cos;
  data_t lut_sin, lut_cos;

  cordic_core u_cordic (
    .clk   (clk),
    .rst   (rst),
    .theta (theta),
    .x_cos (cordic_cos),
    .y_sin (cordic_sin),
    .iter  (),
    .done  (valid)
  );

  lut_correction u_lut (
    .theta   (theta),
    .sin_lut (lut_sin),
    .cos_lut (lut_cos)
  );

  threshold_select #(.TH(TH)) u_sel (
    .theta        (theta),
    .cordic_sin   (cordic_sin),
    .cordic_cos   (cordic_cos),
    .lut_sin      (lut_sin),
    .lut_cos      (lut_cos),
    .sine         (sine),
    .cosine       (cosine),
    .sin_from_lut (),
    .cos_from_lut ()
  );

  // The unit is defined for 0..90 deg only.
  a_theta_range: assert property (@(posedge clk) disable iff (rst) theta <= ANG_90)
    else $error("theta %0d is above 90 deg", theta);

endmodule
