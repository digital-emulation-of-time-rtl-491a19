// frac_delay_fir - fractional-delay FIR for one polarization, two samples per
// clock.
//
// Computes y[m] = sum_k h[k] x[m-k] on the complex two-lane stream (lane 0 =
// x[2n], lane 1 = x[2n+1]) with run-time coefficients h from lagrange_coef.
// It keeps the last NTAPS-1 input samples; I and Q use the same taps. With
// Lagrange taps for delay D the output is the input delayed by D samples. The
// direct-form structure and rounding are this design's choices; the document
// specifies FIR filters with Lagrange interpolation coefficients.
//
// Timing: output registered, one clock after the inputs; the filter's own
// delay D (about 2 samples = 1 clock for D0 = 2) comes on top.
module frac_delay_fir
  import pmd_pkg::*;
#(
  parameter int NTAPS = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  coef_t [NTAPS-1:0] h,
  input  lanes_t            in,
  input  logic              in_valid,
  output lanes_t            out,
  output logic              out_valid
);
  cplx_t hist [NTAPS-1];           // hist[0] = x[2n-1], hist[1] = x[2n-2], ...
  cplx_t w    [NTAPS+1];           // w[j] = x[2n+1-j]

  always_comb begin
    w[0] = in[1];
    w[1] = in[0];
    for (int j = 2; j <= NTAPS; j++) w[j] = hist[j-2];
  end

  function automatic cplx_t dot(input int off);
    logic signed [63:0] ai, aq;
    cplx_t r;
    ai = '0;
    aq = '0;
    for (int k = 0; k < NTAPS; k++) begin
      ai += 64'(w[k+off].i) * 64'(h[k]);
      aq += 64'(w[k+off].q) * 64'(h[k]);
    end
    r.i = rnd_sat(ai, LAG_F);
    r.q = rnd_sat(aq, LAG_F);
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < NTAPS - 1; j++) hist[j] <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int j = 0; j < NTAPS - 1; j++) hist[j] <= w[j];
        out[1] <= dot(0);
        out[0] <= dot(1);
      end
    end
  end
endmodule
