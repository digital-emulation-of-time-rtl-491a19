// tb_awgn_channel - with sigma = 0 the samples must pass unchanged one clock
// later. With sigma = 800 LSB the noise (output minus input) must have a mean
// near 0, a standard deviation within 4 % of 800, a fourth moment near the
// Gaussian 3*sigma^4, and the four noise streams must be uncorrelated.
module tb_awgn_channel;
  import pmd_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  lanes_t in = '0, out;
  logic [15:0] sigma = 0;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  awgn_channel dut (.clk, .rst_n, .in, .in_valid, .sigma, .out, .out_valid);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lanes_t prev;
    real s1 [4], s2 [4], s4 [4], c01, c02, c23;
    int n;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    in_valid <= 1;
    for (int t = 0; t < 200; t++) begin
      for (int l = 0; l < 2; l++) begin
        in[l].i <= sample_t'(int'($urandom_range(0, 20000)) - 10000);
        in[l].q <= sample_t'(int'($urandom_range(0, 20000)) - 10000);
      end
      @(posedge clk); #1;
      prev = in;
      if (t > 0) check(out == prev, "sigma 0 passes the samples");
      check(out_valid, "valid");
    end
    sigma <= 16'd800;
    for (int k = 0; k < 4; k++) begin s1[k] = 0; s2[k] = 0; s4[k] = 0; end
    c01 = 0; c02 = 0; c23 = 0;
    n = 0;
    @(posedge clk);
    for (int t = 0; t < 40000; t++) begin
      real v [4];
      for (int l = 0; l < 2; l++) begin
        in[l].i <= sample_t'(int'($urandom_range(0, 8000)) - 4000);
        in[l].q <= sample_t'(int'($urandom_range(0, 8000)) - 4000);
      end
      @(posedge clk); #1;
      if (t > 1) begin
        // 'in' still holds the samples the edge took in
        v[0] = $itor(out[0].i) - $itor(in[0].i);
        v[1] = $itor(out[0].q) - $itor(in[0].q);
        v[2] = $itor(out[1].i) - $itor(in[1].i);
        v[3] = $itor(out[1].q) - $itor(in[1].q);
        for (int k = 0; k < 4; k++) begin
          s1[k] += v[k]; s2[k] += v[k] * v[k]; s4[k] += v[k] * v[k] * v[k] * v[k];
        end
        c01 += v[0] * v[1]; c02 += v[0] * v[2]; c23 += v[2] * v[3];
        n++;
      end
    end
    for (int k = 0; k < 4; k++) begin
      real m, sd, kurt;
      m = s1[k] / n;
      sd = $sqrt(s2[k] / n - m * m);
      kurt = (s4[k] / n) / ((s2[k] / n) * (s2[k] / n));
      $display("stream %0d: mean %f sd %f kurtosis %f", k, m, sd, kurt);
      check(m > -20.0 && m < 20.0, "mean near 0");
      check(sd > 768.0 && sd < 832.0, "standard deviation = sigma");
      check(kurt > 2.6 && kurt < 3.2, "Gaussian-like fourth moment");
    end
    check(c01 / n < 0.05 * 640000 && c01 / n > -0.05 * 640000, "lane0 I/Q uncorrelated");
    check(c02 / n < 0.05 * 640000 && c02 / n > -0.05 * 640000, "lane0/lane1 uncorrelated");
    check(c23 / n < 0.05 * 640000 && c23 / n > -0.05 * 640000, "lane1 I/Q uncorrelated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
