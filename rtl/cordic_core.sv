// cordic_core: iterative 10-bit rotation-mode CORDIC for sine and cosine.
//
// One micro-rotation per clock, nine iterations per result, free running:
// an iteration counter steps 0,1,..,8 and wraps. In iteration 0 the core
// samples theta, compares it with 45 deg and loads a pre-rotated, gain-
// compensated vector: (X,Y) = (311,933), which points at 71.6 deg, when
// theta >= 45, otherwise the swapped pair (933,311) at 18.4 deg. At the same
// time Z = theta - d0*alpha0 (alpha0 = 71.625 or -18.5 deg, d0 = +1 / -1).
// Iteration n = 1..8 then applies
//     X <- X - d*(Y >> (n+1))   Y <- Y + d*(X >> (n+1))   Z <- Z - d*alpha_n
// with d = +1 when Z >= 0 and -1 when Z < 0. After iteration 8, X holds
// cos(theta) and Y holds sin(theta) in 2^-10 units.
//
// The X and Y registers are 10-bit unsigned: shifts are logical and sums
// wrap modulo 2^10, so a transient negative value is read as a large positive
// one by the next shift. This is what makes the core reproduce the published
// traces bit for bit (for example theta = 4.375 deg gives Y = 0x045); it
// limits accuracy at a few low angles, which the design accepts.
// The shift schedule n+1, the tie rule d = +1 at Z = 0, the start vector and
// the free-running counter are derived from the published traces; reset
// behaviour and the done flag are this implementation's choice.
//
// Interface: theta is sampled at the clock edge that ends iteration 0
// (iter == 0). x_cos / y_sin are the X / Y registers themselves and show the
// intermediate values while a computation runs. done is high during the one
// cycle (iter == 0) in which they hold a finished result; the result of a
// theta sampled at edge k is final after edge k+8 (nine clocks).
module cordic_core
  import trig_pkg::*;
(
  input  logic   clk,
  input  logic   rst,      // synchronous, active high
  input  angle_t theta,
  output data_t  x_cos,
  output data_t  y_sin,
  output iter_t  iter,
  output logic   done
);

  data_t x_q, y_q;
  zang_t z_q;
  iter_t iter_q;
  logic  primed_q;         // a full computation has completed since reset

  zang_t alpha;
  logic  upper;            // theta >= 45 deg
  logic  d_pos;            // d = +1
  data_t x_sh, y_sh;
  int unsigned shamt;

  assign upper = (theta >= ANG_45);
  assign d_pos = ~z_q[ANGLE_W-1];
  assign shamt = int'(iter_q) + 1;
  assign x_sh  = x_q >> shamt;
  assign y_sh  = y_q >> shamt;

  alpha_rom u_alpha (
    .iter  (iter_q),
    .upper (upper),
    .alpha (alpha)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      x_q      <= '0;
      y_q      <= '0;
      z_q      <= '0;
      iter_q   <= '0;
      primed_q <= 1'b0;
    end else if (iter_q == '0) begin
      x_q    <= upper ? PRE_SMALL : PRE_LARGE;
      y_q    <= upper ? PRE_LARGE : PRE_SMALL;
      // Z1 = theta - d0*alpha0 with d0 = +1 (upper) or -1 (lower)
      z_q    <= upper ? zang_t'(theta) - alpha : zang_t'(theta) + alpha;
      iter_q <= iter_t'(1);
    end else begin
      if (d_pos) begin
        x_q <= x_q - y_sh;
        y_q <= y_q + x_sh;
        z_q <= z_q - alpha;
      end else begin
        x_q <= x_q + y_sh;
        y_q <= y_q - x_sh;
        z_q <= z_q + alpha;
      end
      if (iter_q == iter_t'(N_ITER - 1)) begin
        iter_q   <= '0;
        primed_q <= 1'b1;
      end else begin
        iter_q <= iter_q + 1'b1;
      end
    end
  end

  assign x_cos = x_q;
  assign y_sin = y_q;
  assign iter  = iter_q;
  assign done  = primed_q && (iter_q == '0);

  // The counter never leaves 0..8.
  a_iter_range: assert property (@(posedge clk) disable iff (rst) iter_q < iter_t'(N_ITER));

endmodule
