// cma_equalizer - 2x2 butterfly constant-modulus-algorithm equalizer with
// two-to-one downsampling.
//
// Input: both polarizations at two samples per symbol (two lanes per clock).
// Each output polarization is the sum of two NTAPS-tap complex FIRs over the
// T/2-spaced windows of both inputs:
//   yx = sum_k wxx[k] ux[k] + wxy[k] uy[k],   yy = sum_k wyx[k] ux[k] + wyy[k] uy[k]
// with u[k] = x[2n-k] (the window ends on the newest lane-0 sample, so the
// centre tap k = (NTAPS-1)/2 sits on an odd sample, where the pulse shaper puts
// the symbol peaks). One symbol per polarization leaves per clock and every
// tap is updated on the same clock with the CMA rule
//   w += MU * (R2 - |y|^2) * y * conj(u)
// which drives |y|^2 towards the constant modulus R2 and so undoes the
// polarization rotations and group delays of the channel. Taps start as the
// identity on the centre tap.
//
// The 11 taps, the step size 0.0002 and the downsampling role follow the
// real-time system description. The butterfly structure, T/2 tap spacing,
// same-cycle tap update, initial taps and all word lengths are this design's
// choices. Tap registers: 32 bits with 28 fraction bits; the filter uses them
// rounded down to 14 fraction bits. MU is in units of 2^-24 (3355 = 0.0002).
//
// Timing: output registered; a symbol whose peak sample is x[2n-5] (lane 1,
// 3 clocks before) leaves 4 clocks after that sample entered.
module cma_equalizer
  import pmd_pkg::*;
#(
  parameter int NTAPS = 11,
  parameter int MU    = 3355,      // step size * 2^24
  parameter int R2    = 4096       // constant modulus |y|^2, 13 fraction bits
) (
  input  logic   clk,
  input  logic   rst_n,
  input  lanes_t x_in,
  input  lanes_t y_in,
  input  logic   in_valid,
  output cplx_t  x_out,
  output cplx_t  y_out,
  output logic   out_valid
);
  localparam int TF = 28;                    // tap fraction bits
  localparam int CT = (NTAPS - 1) / 2;       // centre tap

  typedef logic signed [31:0] tap_t;
  typedef logic signed [63:0] w64_t;
  typedef struct packed { tap_t i; tap_t q; } ctap_t;

  // taps: [output pol][input pol][k]
  ctap_t w [2][2][NTAPS];
  cplx_t hx [NTAPS-1];                       // x[2n-1] ... x[2n-NTAPS+1]
  cplx_t hy [NTAPS-1];
  cplx_t u  [2][NTAPS];                      // u[p][k] = pol p sample x[2n-k]

  always_comb begin
    u[0][0] = x_in[0];
    u[1][0] = y_in[0];
    for (int k = 1; k < NTAPS; k++) begin
      u[0][k] = hx[k-1];
      u[1][k] = hy[k-1];
    end
  end

  // Filter outputs
  cplx_t y [2];
  always_comb begin
    for (int o = 0; o < 2; o++) begin
      w64_t ai, aq, wi, wq;
      ai = '0;
      aq = '0;
      for (int p = 0; p < 2; p++)
        for (int k = 0; k < NTAPS; k++) begin
          wi = 64'(w[o][p][k].i) >>> (TF - 14);
          wq = 64'(w[o][p][k].q) >>> (TF - 14);
          ai += wi * 64'(u[p][k].i) - wq * 64'(u[p][k].q);
          aq += wi * 64'(u[p][k].q) + wq * 64'(u[p][k].i);
        end
      y[o].i = rnd_sat(ai, 14);
      y[o].q = rnd_sat(aq, 14);
    end
  end

  // CMA error times output: ey = (R2 - |y|^2) * y, 13 fraction bits
  w64_t eyi [2];
  w64_t eyq [2];
  always_comb begin
    for (int o = 0; o < 2; o++) begin
      w64_t m2, e;
      m2 = (64'(y[o].i) * 64'(y[o].i) + 64'(y[o].q) * 64'(y[o].q)) >>> SF;
      e  = 64'(R2) - m2;
      eyi[o] = (e * 64'(y[o].i)) >>> SF;
      eyq[o] = (e * 64'(y[o].q)) >>> SF;
    end
  end

  // tap update: MU * ey * conj(u); 26 + 24 - 28 = 22 bits of shift
  function automatic ctap_t upd(input ctap_t wv, input w64_t ei, input w64_t eq, input cplx_t uv);
    w64_t pi, pq;
    ctap_t r;
    pi = ei * 64'(uv.i) + eq * 64'(uv.q);
    pq = eq * 64'(uv.i) - ei * 64'(uv.q);
    r.i = wv.i + tap_t'((pi * 64'(MU)) >>> 22);
    r.q = wv.q + tap_t'((pq * 64'(MU)) >>> 22);
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int o = 0; o < 2; o++)
        for (int p = 0; p < 2; p++)
          for (int k = 0; k < NTAPS; k++) begin
            w[o][p][k].i <= (o == p && k == CT) ? (tap_t'(1) <<< TF) : '0;
            w[o][p][k].q <= '0;
          end
      for (int k = 0; k < NTAPS - 1; k++) begin
        hx[k] <= '0;
        hy[k] <= '0;
      end
      x_out     <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        hx[0] <= x_in[1];
        hy[0] <= y_in[1];
        hx[1] <= x_in[0];
        hy[1] <= y_in[0];
        for (int k = 2; k < NTAPS - 1; k++) begin
          hx[k] <= hx[k-2];
          hy[k] <= hy[k-2];
        end
        x_out <= y[0];
        y_out <= y[1];
        for (int o = 0; o < 2; o++)
          for (int p = 0; p < 2; p++)
            for (int k = 0; k < NTAPS; k++)
              w[o][p][k] <= upd(w[o][p][k], eyi[o], eyq[o], u[p][k]);
      end
    end
  end
endmodule
