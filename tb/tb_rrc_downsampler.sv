// tb_rrc_downsampler - (1) random two-lane input: every output must equal the
// real convolution z[n] = sum_k h[k] x[2n-k] with the tb's own RRC taps within
// 3 LSB. (2) QPSK symbols pulse-shaped in the tb (ideal real RRC at T/2): the
// output 25 clocks after a symbol must be that symbol (raised-cosine peak)
// within 2 % of its amplitude.
module tb_rrc_downsampler;
  import pmd_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  lanes_t in = '0;
  cplx_t out;
  logic out_valid;
  int checks = 0, failures = 0;
  real h [51];
  real xi [$], xq [$];

  always #5 clk = ~clk;
  rrc_downsampler dut (.clk, .rst_n, .in, .in_valid, .out, .out_valid);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real rrc(input real t);
    real b, pi;
    b = 0.1; pi = 3.14159265358979;
    if (t == 0.0) return 1.0 - b + 4.0 * b / pi;
    if (t == 2.5 || t == -2.5)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * b)) + (1.0 - 2.0 / pi) * $cos(pi / (4.0 * b)));
    return ($sin(pi * t * (1.0 - b)) + 4.0 * b * t * $cos(pi * t * (1.0 + b))) /
           (pi * t * (1.0 - 16.0 * b * b * t * t));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e;
    int sa [$], sb [$];
    e = 0.0;
    for (int k = 0; k < 51; k++) begin h[k] = rrc((k - 25) / 2.0); e += h[k] * h[k]; end
    for (int k = 0; k < 51; k++) h[k] = h[k] / $sqrt(e);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // (1) random samples
    for (int t = 0; t < 2000; t++) begin
      real zi, zq;
      for (int l = 0; l < 2; l++) begin
        int a, b;
        a = int'($urandom_range(0, 8000)) - 4000; b = int'($urandom_range(0, 8000)) - 4000;
        xi.push_back(a); xq.push_back(b);
        in[l].i <= sample_t'(a); in[l].q <= sample_t'(b);
      end
      in_valid <= 1;
      @(posedge clk); #1;
      check(out_valid, "valid");
      zi = 0; zq = 0;
      for (int k = 0; k < 51; k++) if (2 * t - k >= 0) begin zi += h[k] * xi[2 * t - k]; zq += h[k] * xq[2 * t - k]; end
      check($itor(out.i) - zi <= 3.0 && zi - $itor(out.i) <= 3.0, $sformatf("t=%0d I %0d want %f", t, out.i, zi));
      check($itor(out.q) - zq <= 3.0 && zq - $itor(out.q) <= 3.0, $sformatf("t=%0d Q %0d want %f", t, out.q, zq));
    end
    // (2) ideal pulse-shaped QPSK; sample m of the shaped stream = sum_n a[n] h[m - 2n]
    for (int n = 0; n < 1200; n++) begin
      sa.push_back(($urandom_range(0, 1) != 0) ? 4096 : -4096);
      sb.push_back(($urandom_range(0, 1) != 0) ? 4096 : -4096);
    end
    for (int t = 0; t < 1100; t++) begin
      for (int l = 0; l < 2; l++) begin
        real vi, vq;
        int m;
        m = 2 * t + l;
        vi = 0; vq = 0;
        for (int k = 0; k < 51; k++)
          if ((m - k) % 2 == 0 && m - k >= 0) begin vi += h[k] * sa[(m - k) / 2]; vq += h[k] * sb[(m - k) / 2]; end
        in[l].i <= sample_t'($rtoi(vi)); in[l].q <= sample_t'($rtoi(vq));
      end
      @(posedge clk); #1;
      if (t > 60) begin
        check(out.i > 0 == sa[t - 25] > 0 && out.q > 0 == sb[t - 25] > 0, "symbol recovered");
        check($itor(out.i) / sa[t - 25] > 0.98 && $itor(out.i) / sa[t - 25] < 1.02, $sformatf("I amplitude %0d vs %0d", out.i, sa[t - 25]));
        check($itor(out.q) / sb[t - 25] > 0.98 && $itor(out.q) / sb[t - 25] < 1.02, "Q amplitude");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
