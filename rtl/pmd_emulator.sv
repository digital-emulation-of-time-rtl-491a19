// pmd_emulator - digital emulator of time-varying polarization-mode dispersion.
//
// The waveplate model in the time domain: K sections (pmd_section), each a
// rotation followed by a differential group delay made with Lagrange
// fractional-delay FIRs, and a final rotation with its own angle ROM that
// completes the model. The sections marked in VAR_MASK (by default the first,
// the centre one, index K/2, and the last) take their angle from a theta_gen
// that picks a new random angle every theta_period[k] clocks; the others, and
// the variable ones while their period is 0, use theta_fixed[k]. K = 10 and the
// first/centre/last variable sections follow the real-time configuration of the
// document; the centre index and per-section inputs are this design's choice.
// For a fixed section, theta_now[k] just repeats theta_fixed[k] and
// theta_update[k] is tied to 0. In the default configuration these outputs
// (7 sections x 10 bits) carry no logic. They are kept so that every section
// has the same observation ports whatever VAR_MASK is.
//
// Timing: two lanes per polarization per clock in and out. Data latency
// K*3 + 1 clocks with all delays at D0 (the common delay of the FIRs
// included); 'out_valid' follows 'in_valid' through the chain.
module pmd_emulator
  import pmd_pkg::*;
#(
  parameter int         K        = 10,
  parameter int         NTAPS    = 5,
  parameter logic [K-1:0] VAR_MASK = K'((1 << 0) | (1 << (K / 2)) | (1 << (K - 1)))
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  lanes_t               x_in,
  input  lanes_t               y_in,
  input  logic                 in_valid,
  input  angle_t [K-1:0]       theta_fixed,    // fixed angle of each section
  input  angle_t               theta_final,    // angle of the final rotation
  input  coef_t  [K-1:0]       frac_delay,     // tau_k/2 in samples, 14 fraction bits
  input  logic   [K-1:0][31:0] theta_period,   // update period of variable sections, 0 = fixed
  input  angle_t               theta_min,      // range of random angles
  input  angle_t               theta_max,
  output lanes_t               x_out,
  output lanes_t               y_out,
  output logic                 out_valid,
  output angle_t [K-1:0]       theta_now,      // angle each section uses
  output logic   [K-1:0]       theta_update    // one-clock pulse on a random update
);
  lanes_t xs [K+1];
  lanes_t ys [K+1];
  logic   vs [K+1];

  assign xs[0] = x_in;
  assign ys[0] = y_in;
  assign vs[0] = in_valid;

  for (genvar k = 0; k < K; k++) begin : g_sec
    if (VAR_MASK[k]) begin : g_var
      theta_gen #(.SEED(32'h2545_F491 ^ (32'(k + 1) * 32'h9E37_79B9))) u_tg (
        .clk, .rst_n,
        .period(theta_period[k]), .theta_min, .theta_max,
        .theta_fixed(theta_fixed[k]),
        .theta(theta_now[k]), .update(theta_update[k])
      );
    end else begin : g_fix
      assign theta_now[k]    = theta_fixed[k];
      assign theta_update[k] = 1'b0;
    end

    pmd_section #(.NTAPS(NTAPS)) u_sec (
      .clk, .rst_n,
      .theta(theta_now[k]), .d(frac_delay[k]),
      .x_in(xs[k]), .y_in(ys[k]), .in_valid(vs[k]),
      .x_out(xs[k+1]), .y_out(ys[k+1]), .out_valid(vs[k+1])
    );
  end

  cs_t cs_fin;
  rot_rom u_rom_fin (.clk, .angle(theta_final), .cs(cs_fin));
  pol_rotation u_rot_fin (
    .clk, .rst_n, .cs(cs_fin), .x_in(xs[K]), .y_in(ys[K]), .in_valid(vs[K]),
    .x_out, .y_out, .out_valid
  );
endmodule
