// theta_gen - time-varying rotation angle of a variable PMD section.
//
// Every 'period' clocks the angle jumps to a new pseudo-random whole-degree
// value, uniform over theta_min..theta_max:
//   theta = theta_min + (r * (theta_max - theta_min + 1)) >> 16
// with r the low 16 bits of a 32-bit xorshift generator. 'period' = 0 selects
// the fixed angle 'theta_fixed' instead. The period in clocks is the clock rate
// divided by the update frequency (30 MHz / 1 Hz = 30,000,000). Random angles
// in a range at a set update frequency follow the system description; the
// generator and the formula are this design's choice.
//
// Timing: 'theta' is registered; 'update' pulses for one clock with each new
// random angle.
module theta_gen
  import pmd_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] period,        // clocks between updates, 0 = fixed angle
  input  angle_t      theta_min,
  input  angle_t      theta_max,
  input  angle_t      theta_fixed,
  output angle_t      theta,
  output logic        update
);
  logic [31:0] cnt, r, rn;

  always_comb begin
    rn = r;
    rn = rn ^ (rn << 13);
    rn = rn ^ (rn >> 17);
    rn = rn ^ (rn << 5);
  end

  logic [ANG_W:0]    span;
  logic [ANG_W+16:0] scaled;
  always_comb begin
    span   = {1'b0, theta_max} - {1'b0, theta_min} + 1'b1;
    scaled = (ANG_W+17)'(rn[15:0]) * (ANG_W+17)'(span);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= '0;
      r      <= SEED;
      theta  <= theta_fixed;
      update <= 1'b0;
    end else begin
      update <= 1'b0;
      if (period == 0) begin
        cnt   <= '0;
        theta <= theta_fixed;
      end else if (cnt >= period - 1) begin
        cnt    <= '0;
        r      <= rn;
        theta  <= theta_min + angle_t'(scaled[ANG_W+16:16]);
        update <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
