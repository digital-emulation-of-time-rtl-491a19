// tb_frac_delay_fir - random taps and random two-lane complex input; every
// output must equal the real convolution y[m] = sum_k h[k] x[m-k] within 1 LSB
// at the clock the newest sample enters. Taps (0,0,1,0,0) must give the input
// delayed by exactly two samples.
module tb_frac_delay_fir;
  import pmd_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  coef_t [4:0] h = '0;
  lanes_t in = '0, out;
  logic out_valid;
  int checks = 0, failures = 0;
  int xi [$], xq [$];

  always #5 clk = ~clk;
  frac_delay_fir #(.NTAPS(5)) dut (.clk, .rst_n, .h, .in, .in_valid, .out, .out_valid);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real conv(input int m, input bit q);
    real a;
    a = 0.0;
    for (int k = 0; k < 5; k++)
      if (m - k >= 0) a += $itor(h[k]) / 16384.0 * $itor(q ? xq[m - k] : xi[m - k]);
    return a;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 5; k++) h[k] <= coef_t'(int'($urandom_range(0, 32000)) - 16000);
    for (int t = 0; t < 3000; t++) begin
      if (t == 1500)
        for (int k = 0; k < 5; k++) h[k] <= coef_t'(int'($urandom_range(0, 32000)) - 16000);
      for (int l = 0; l < 2; l++) begin
        int a, b;
        a = int'($urandom_range(0, 12000)) - 6000;
        b = int'($urandom_range(0, 12000)) - 6000;
        xi.push_back(a); xq.push_back(b);
        in[l].i <= sample_t'(a); in[l].q <= sample_t'(b);
      end
      in_valid <= 1;
      @(posedge clk); #1;
      check(out_valid, "valid");
      if (t > 2 && t != 1500) for (int l = 0; l < 2; l++) begin
        real ei, eq;
        ei = conv(2 * t + l, 0); eq = conv(2 * t + l, 1);
        check($itor(out[l].i) - ei <= 1.0 && ei - $itor(out[l].i) <= 1.0, $sformatf("t=%0d lane %0d I", t, l));
        check($itor(out[l].q) - eq <= 1.0 && eq - $itor(out[l].q) <= 1.0, $sformatf("t=%0d lane %0d Q", t, l));
      end
    end
    // pure delay of two samples = one clock
    h <= {16'sd0, 16'sd0, 16'sd16384, 16'sd0, 16'sd0};
    @(posedge clk);
    for (int t = 0; t < 50; t++) begin
      lanes_t prev;
      prev = in;
      for (int l = 0; l < 2; l++) begin
        in[l].i <= sample_t'(int'($urandom_range(0, 12000)) - 6000);
        in[l].q <= sample_t'(int'($urandom_range(0, 12000)) - 6000);
      end
      @(posedge clk); #1;
      if (t > 0) check(out == prev, "taps (0,0,1,0,0) delay by two samples");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
