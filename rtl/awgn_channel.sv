// awgn_channel - adds white Gaussian noise to the two-lane samples of one
// polarization.
//
// Four independent gauss_gen instances (lane 0/1 x I/Q) give unit-free noise
// g of standard deviation 512; each is scaled as n = round(g * sigma / 512), so
// the noise standard deviation equals the 'sigma' input in sample LSBs
// (2^-13). The noisy sample is saturated to 16 bits. sigma = 0 passes the
// signal unchanged (one register of delay). The noise generator itself is this
// design's choice; the document specifies only AWGN added after pulse shaping.
//
// Timing: latency 1 clock; 'out_valid' follows 'in_valid'.
module awgn_channel
  import pmd_pkg::*;
#(
  parameter logic [63:0] SEED = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  lanes_t      in,
  input  logic        in_valid,
  input  logic [15:0] sigma,      // noise standard deviation in sample LSBs
  output lanes_t      out,
  output logic        out_valid
);
  logic signed [12:0] g [LANES][2];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    for (genvar c = 0; c < 2; c++) begin : g_comp
      gauss_gen #(
        .SEED_A(SEED ^ (64'(4 * l + 2 * c + 1) * 64'h0000_0001_0000_0193)),
        .SEED_B(~SEED ^ (64'(4 * l + 2 * c + 2) * 64'h0100_0000_01B3_0000))
      ) u_g (.clk, .rst_n, .g(g[l][c]));
    end
  end

  function automatic sample_t add_noise(input sample_t x, input logic signed [12:0] gv,
                                        input logic [15:0] sg);
    logic signed [63:0] n;
    n = (64'(gv) * $signed({48'd0, sg}) + 64'sd256) >>> 9;
    return sat(64'(x) + n);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      for (int l = 0; l < LANES; l++) begin
        out[l].i <= add_noise(in[l].i, g[l][0], sigma);
        out[l].q <= add_noise(in[l].q, g[l][1], sigma);
      end
    end
  end
endmodule
