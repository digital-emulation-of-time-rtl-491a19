// rrc_downsampler - matched root-raised-cosine filter and decimation by two
// for one polarization.
//
// Takes the two-lane T/2 stream (lane 0 = x[2n], lane 1 = x[2n+1]) and
// computes one output per clock,
//   z[n] = sum_{k=0}^{50} h[k] x[2n-k],
// with the same 51 RRC taps as the pulse shaper. The taps are symmetric, so
// mirrored samples are added before the multiply (26 multipliers). Together
// with the pulse shaper the pulse is a raised cosine whose peak (tap 25 of each
// filter, 50 samples in all) falls on an even sample, which this filter keeps.
// The matched-filter-and-decimate receive path follows the verification system
// of the document; the direct symmetric form is this design's choice.
//
// Timing: registered output, one symbol per clock; the centre tap sees
// x[2n-25], which entered 13 clocks earlier on lane 1, and the result leaves
// one clock later.
module rrc_downsampler
  import pmd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  lanes_t in,
  input  logic   in_valid,
  output cplx_t  out,
  output logic   out_valid
);
  localparam int N = RRC_TAPS;
  localparam int C = (N - 1) / 2;
  localparam rrc_taps_t H = rrc_taps();

  cplx_t hist [N-1];          // x[2n-1] ... x[2n-N+1]
  cplx_t u    [N];            // u[k] = x[2n-k]

  always_comb begin
    u[0] = in[0];
    for (int k = 1; k < N; k++) u[k] = hist[k-1];
  end

  cplx_t z;
  always_comb begin
    logic signed [63:0] ai, aq;
    ai = 64'(u[C].i) * 64'(H[C]);
    aq = 64'(u[C].q) * 64'(H[C]);
    for (int k = 0; k < C; k++) begin
      ai += (64'(u[k].i) + 64'(u[N-1-k].i)) * 64'(H[k]);
      aq += (64'(u[k].q) + 64'(u[N-1-k].q)) * 64'(H[k]);
    end
    z.i = rnd_sat(ai, RRC_F);
    z.q = rnd_sat(aq, RRC_F);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N - 1; k++) hist[k] <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        hist[0] <= in[1];
        hist[1] <= in[0];
        for (int k = 2; k < N - 1; k++) hist[k] <= hist[k-2];
        out <= z;
      end
    end
  end
endmodule
