// lagrange_coef - Lagrange interpolation unit of one PMD section.
//
// From the fractional delay input d (half the section's differential group
// delay, in sample periods T/2, 14 fraction bits) it computes two coefficient
// sets of an order NTAPS-1 Lagrange fractional-delay FIR:
//   set 1 for delay D = D0 + d,  set 2 for delay D = D0 - d,  D0 = (NTAPS-1)/2
//   h[k] = prod_{i != k} (D - i) / (k - i)
// The bulk delay D0 lets the second polarization be delayed by -d and still be
// causal; the two filters differ in delay by 2d = tau. Each product is
// rounded to 14 fraction bits after every multiply, then multiplied by a
// 20-fraction-bit reciprocal of the constant denominator. The two coefficient
// sets and the Lagrange method follow the emulator description; the order
// (4, five taps), D0 and the arithmetic are this design's choices. |d| <= 1.
//
// Timing: combinational from 'd', one output register (latency 1).
module lagrange_coef
  import pmd_pkg::*;
#(
  parameter int NTAPS = 5
) (
  input  logic                   clk,
  input  coef_t                  d,
  output coef_t [NTAPS-1:0]      h1,
  output coef_t [NTAPS-1:0]      h2
);
  localparam int D0 = (NTAPS - 1) / 2;
  localparam int RS = 20;                  // reciprocal fraction bits

  typedef logic signed [47:0] w_t;

  // round(2^RS / prod_{i != k} (k - i))
  function automatic w_t recip(input int k);
    longint den;
    den = 1;
    for (int i = 0; i < NTAPS; i++)
      if (i != k) den = den * (longint'(k) - longint'(i));
    return w_t'($rtoi($floor(real'(longint'(1) << RS) / real'(den) + 0.5)));
  endfunction

  typedef w_t recip_t [NTAPS];
  function automatic recip_t recips();
    recip_t r;
    for (int k = 0; k < NTAPS; k++) r[k] = recip(k);
    return r;
  endfunction
  localparam recip_t RECIP = recips();

  function automatic coef_t tap(input w_t dd, input int k);
    w_t p, r;
    p = w_t'(1) <<< LAG_F;
    for (int i = 0; i < NTAPS; i++)
      if (i != k) p = (p * (dd - (w_t'(i) <<< LAG_F)) + (w_t'(1) <<< (LAG_F - 1))) >>> LAG_F;
    r = (p * RECIP[k] + (w_t'(1) <<< (RS - 1))) >>> RS;
    return coef_t'(r[CW-1:0]);   // |h| < 2 for |d| <= 1, fits 16 bits
  endfunction

  w_t dp, dm;
  always_comb begin
    dp = (w_t'(D0) <<< LAG_F) + w_t'(d);
    dm = (w_t'(D0) <<< LAG_F) - w_t'(d);
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NTAPS; k++) begin
      h1[k] <= tap(dp, k);
      h2[k] <= tap(dm, k);
    end
  end
endmodule
