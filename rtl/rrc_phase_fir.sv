// rrc_phase_fir - one polyphase branch of the RRC pulse-shaping filter as a
// symmetric transposed-form FIR on a real input.
//
// Branch PHASE uses the taps h[2j+PHASE] of the 51-tap RRC filter (26 taps for
// phase 0, 25 for phase 1). Both branches are symmetric in themselves. In the
// transposed form every tap multiplies the same input sample, so a tap pair
// c[j] = c[L-1-j] shares one product: only ceil(L/2) multipliers are built.
// The partial sums travel down a register chain:
//   s[j] <= p[j] + s[j+1]   (s[L] = 0),   acc <= p[0] + s[1]
// so acc(n+1) = sum_j c[j] x(n-j). The output is acc rounded back to the
// sample format and saturated.
//
// Timing: the chain advances on clocks with 'en' high; 'y' is registered and
// holds sum_j c[j] x(n-j) one clock after x(n) was presented.
module rrc_phase_fir
  import pmd_pkg::*;
#(
  parameter int PHASE = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t x,
  output sample_t y
);
  localparam int L    = (RRC_TAPS - PHASE + 1) / 2;   // taps in this branch
  localparam int HALF = (L + 1) / 2;                  // distinct products
  localparam int AW   = SW + CW + 6;                  // accumulator width
  localparam rrc_taps_t H = rrc_taps();

  typedef logic signed [AW-1:0] acc_t;

  acc_t p [HALF];
  acc_t s [1:L];          // s[L] is the constant 0 end of the chain

  always_comb begin
    for (int j = 0; j < HALF; j++)
      p[j] = acc_t'(x) * acc_t'(H[2*j+PHASE]);
  end

  // product used by tap j (shared with its mirror tap)
  function automatic acc_t prod(input int j);
    return (j < HALF) ? p[j] : p[L-1-j];
  endfunction

  acc_t acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 1; j <= L; j++) s[j] <= '0;
      acc <= '0;
    end else if (en) begin
      for (int j = 1; j < L; j++) s[j] <= prod(j) + s[j+1];
      s[L] <= '0;
      acc  <= prod(0) + s[1];
    end
  end

  assign y = rnd_sat(64'(acc), RRC_F);
endmodule
