// pol_rotation - polarization rotation of the waveplate model.
//
// Applies the real rotation matrix of one waveplate (phase shift delta = 0) to
// the pair of polarizations, separately on I and Q and on both lanes:
//   X' =  cos(theta) X + sin(theta) Y
//   Y' = -sin(theta) X + cos(theta) Y
// cos/sin come from a rot_rom with 14 fraction bits; products are rounded to
// the sample format and saturated. The matrix follows the waveplate equation;
// rounding and saturation are this design's choice.
//
// Timing: latency 1 clock, one pair of lanes per clock; 'out_valid' follows
// 'in_valid'.
module pol_rotation
  import pmd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  cs_t    cs,
  input  lanes_t x_in,
  input  lanes_t y_in,
  input  logic   in_valid,
  output lanes_t x_out,
  output lanes_t y_out,
  output logic   out_valid
);
  function automatic sample_t rot(input sample_t a, input sample_t b,
                                  input coef_t ca, input coef_t cb);
    return rnd_sat(64'(a) * 64'(ca) + 64'(b) * 64'(cb), ROT_F);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_out     <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      for (int l = 0; l < LANES; l++) begin
        x_out[l].i <= rot(x_in[l].i, y_in[l].i, cs.c, cs.s);
        x_out[l].q <= rot(x_in[l].q, y_in[l].q, cs.c, cs.s);
        y_out[l].i <= rot(x_in[l].i, y_in[l].i, -cs.s, cs.c);
        y_out[l].q <= rot(x_in[l].q, y_in[l].q, -cs.s, cs.c);
      end
    end
  end
endmodule
