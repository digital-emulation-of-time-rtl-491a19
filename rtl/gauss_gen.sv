// gauss_gen - approximately Gaussian random numbers by the central-limit
// method.
//
// Two 64-bit xorshift generators (x ^= x<<13; x ^= x>>7; x ^= x<<17) step every
// clock. Twelve of their bytes are summed and centred:
//   g = 2*sum(b_k) - 12*255,   b_k uniform on 0..255
// which has mean 0 and standard deviation 512 (12 * (256^2-1)/12 * 4 ~ 512^2)
// and lies in -3060..3060. The generator type and the central-limit method are
// this design's choice; the document only asks for additive white Gaussian
// noise.
//
// Timing: 'g' is registered and changes every clock after reset.
module gauss_gen #(
  parameter logic [63:0] SEED_A = 64'h0123_4567_89AB_CDEF,   // non-zero
  parameter logic [63:0] SEED_B = 64'hFEDC_BA98_7654_3210    // non-zero
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic signed [12:0] g
);
  logic [63:0] a, b;

  function automatic logic [63:0] xs64(input logic [63:0] v);
    logic [63:0] t;
    t = v ^ (v << 13);
    t = t ^ (t >> 7);
    t = t ^ (t << 17);
    return t;
  endfunction

  logic [11:0] sum;
  always_comb begin
    sum = '0;
    for (int k = 0; k < 6; k++) begin
      sum = sum + 12'(a[8*k +: 8]);
      sum = sum + 12'(b[8*k +: 8]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a <= SEED_A;
      b <= SEED_B;
      g <= '0;
    end else begin
      a <= xs64(a);
      b <= xs64(b);
      g <= 13'sd2 * $signed({1'b0, sum}) - 13'sd3060;
    end
  end
endmodule
