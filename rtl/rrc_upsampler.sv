// rrc_upsampler - root-raised-cosine pulse shaping of one polarization with
// two-times oversampling, in two parallel lanes.
//
// The filter has 51 taps at T/2 spacing and roll-off 0.1 (pmd_pkg::rrc_taps).
// Upsampling by two with zero insertion means even output samples only see the
// even taps and odd outputs only the odd taps, so the filter splits into two
// polyphase branches that both run at the symbol rate: lane 0 = branch of the
// even taps, giving y[2n]; lane 1 = branch of the odd taps, giving y[2n+1].
// Each branch is a symmetric transposed FIR (rrc_phase_fir) for I and for Q.
// The 51-tap/0.1/two-lane/symmetric-transposed structure follows the system
// description; the polyphase split, unit-energy tap scaling and word lengths
// are this design's choices.
//
// Timing: one symbol in per clock, two samples out per clock. The outputs are
// registered: out[0], out[1] hold y[2n], y[2n+1] one clock after symbol a[n]
// was presented, where y[m] = sum_k h[k] u[m-k] and u is the zero-stuffed
// symbol stream. A symbol's pulse peak (tap 25) therefore appears on lane 1,
// 12 clocks after the clock edge that samples the symbol.
module rrc_upsampler
  import pmd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  cplx_t  sym,
  input  logic   in_valid,
  output lanes_t out,
  output logic   out_valid
);
  for (genvar ph = 0; ph < LANES; ph++) begin : g_phase
    rrc_phase_fir #(.PHASE(ph)) u_i (.clk, .rst_n, .en(in_valid), .x(sym.i), .y(out[ph].i));
    rrc_phase_fir #(.PHASE(ph)) u_q (.clk, .rst_n, .en(in_valid), .x(sym.q), .y(out[ph].q));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
