// tb_rrc_upsampler - drives random complex symbols and compares both lanes
// with a real-valued convolution by the tb's own root-raised-cosine taps
// (51 taps, roll-off 0.1, T/2 spacing, unit energy), within 4 LSB. A single
// impulse checks the position of the pulse peak: lane 1, 12 clocks after
// the edge that samples the symbol.
module tb_rrc_upsampler;
  import pmd_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  cplx_t sym = '0;
  lanes_t out;
  logic out_valid;
  int checks = 0, failures = 0;
  real h [51];
  real si [$], sq [$];

  always #5 clk = ~clk;
  rrc_upsampler dut (.clk, .rst_n, .sym, .in_valid, .out, .out_valid);

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

  // expected lane value: sum_j h[2j+ph] s[t-j]
  function automatic real expect_lane(input int t, input int ph, input bit q);
    real acc;
    acc = 0.0;
    for (int j = 0; 2 * j + ph < 51; j++)
      if (t - j >= 0) acc += h[2 * j + ph] * (q ? sq[t - j] : si[t - j]);
    return acc;
  endfunction

  initial begin
    real e, worst;
    int peak_t;
    e = 0.0;
    for (int k = 0; k < 51; k++) begin h[k] = rrc((k - 25) / 2.0); e += h[k] * h[k]; end
    for (int k = 0; k < 51; k++) h[k] = h[k] / $sqrt(e);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // impulse on I
    worst = 0.0;
    peak_t = -1;
    for (int t = 0; t < 30; t++) begin
      sym.i <= (t == 0) ? 16'sd8192 : 16'sd0;
      sym.q <= 0;
      in_valid <= 1;
      @(posedge clk); #1;
      check(out_valid == 1, "valid");
      if ($itor(out[1].i) > worst) begin worst = $itor(out[1].i); peak_t = t; end
      if ($itor(out[0].i) > worst) begin worst = $itor(out[0].i); peak_t = 100 + t; end
    end
    check(peak_t == 12, $sformatf("pulse peak at %0d, want lane 1 at 12", peak_t));
    // flush, then random symbols
    sym <= '0;
    repeat (30) @(posedge clk);
    worst = 0.0;
    for (int t = 0; t < 3000; t++) begin
      int a, b;
      a = (t % 3 == 0) ? int'($urandom_range(0, 16383)) - 8192 : (($urandom_range(0, 1) != 0) ? 4096 : -4096);
      b = (t % 3 == 0) ? int'($urandom_range(0, 16383)) - 8192 : (($urandom_range(0, 1) != 0) ? 4096 : -4096);
      si.push_back($itor(a)); sq.push_back($itor(b));
      sym.i <= sample_t'(a); sym.q <= sample_t'(b);
      @(posedge clk); #1;
      for (int ph = 0; ph < 2; ph++) begin
        real ei, eq, di, dq;
        ei = expect_lane(t, ph, 0); eq = expect_lane(t, ph, 1);
        di = $itor(out[ph].i) - ei; dq = $itor(out[ph].q) - eq;
        if (di < 0) di = -di;
        if (dq < 0) dq = -dq;
        if (di > worst) worst = di;
        if (dq > worst) worst = dq;
        check(di <= 4.0 && dq <= 4.0, $sformatf("t=%0d lane %0d got %0d,%0d want %f,%f", t, ph, out[ph].i, out[ph].q, ei, eq));
      end
    end
    $display("largest deviation %f LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
