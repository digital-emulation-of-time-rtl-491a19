// pmd_section - one fiber section (waveplate) of the digital PMD emulator.
//
// A rotation by theta (angle ROM + pol_rotation) is followed by two
// fractional-delay FIR filters, one per polarization. A single lagrange_coef
// unit turns the fractional-delay input d = tau/2 (in samples) into coefficient
// set 1 (delay D0 + d) for the X filter and set 2 (delay D0 - d) for the Y
// filter, so the section adds a differential group delay tau = 2d between the
// polarizations on top of a common delay D0. The rotation-then-delay order and
// the ROM / Lagrange / two-FIR structure follow the emulator's block diagram.
//
// Timing: data latency 2 clocks (rotation and FIR registers) plus the common
// delay D0 samples (1 clock for D0 = 2). A new 'theta' reaches the data 2
// clocks later (ROM read, rotation register); a new 'd' changes the taps 1
// clock later.
module pmd_section
  import pmd_pkg::*;
#(
  parameter int NTAPS = 5
) (
  input  logic   clk,
  input  logic   rst_n,
  input  angle_t theta,       // rotation angle, whole degrees
  input  coef_t  d,           // tau/2 in samples, 14 fraction bits
  input  lanes_t x_in,
  input  lanes_t y_in,
  input  logic   in_valid,
  output lanes_t x_out,
  output lanes_t y_out,
  output logic   out_valid
);
  cs_t               cs;
  lanes_t            xr, yr;
  logic              rv;
  coef_t [NTAPS-1:0] h1, h2;
  logic              v1, v2;

  rot_rom u_rom (.clk, .angle(theta), .cs);

  pol_rotation u_rot (
    .clk, .rst_n, .cs, .x_in, .y_in, .in_valid,
    .x_out(xr), .y_out(yr), .out_valid(rv)
  );

  lagrange_coef #(.NTAPS(NTAPS)) u_lag (.clk, .d, .h1, .h2);

  frac_delay_fir #(.NTAPS(NTAPS)) u_fir1 (
    .clk, .rst_n, .h(h1), .in(xr), .in_valid(rv), .out(x_out), .out_valid(v1)
  );
  frac_delay_fir #(.NTAPS(NTAPS)) u_fir2 (
    .clk, .rst_n, .h(h2), .in(yr), .in_valid(rv), .out(y_out), .out_valid(v2)
  );

  assign out_valid = v1 & v2;
endmodule
