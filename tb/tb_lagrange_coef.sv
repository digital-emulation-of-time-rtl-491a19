// tb_lagrange_coef - sweeps the fractional delay d over -1..1 and compares
// both coefficient sets with the Lagrange formula for D = 2 + d and D = 2 - d
// evaluated in real arithmetic (within 3 LSB of 2^-14). Also checks that the
// taps sum to 1, that d = 0 gives the pure delay (0,0,1,0,0) and the one-clock
// latency.
module tb_lagrange_coef;
  import pmd_pkg::*;
  logic clk = 0;
  coef_t d = 0;
  coef_t [4:0] h1, h2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  lagrange_coef #(.NTAPS(5)) dut (.clk, .d, .h1, .h2);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real lag(input real dd, input int k);
    real p;
    p = 1.0;
    for (int i = 0; i < 5; i++) if (i != k) p = p * (dd - i) / (k - i);
    return p;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = -16384; n <= 16384; n += 97) begin
      real dr;
      int s1, s2;
      d <= coef_t'(n);
      @(posedge clk); #1;
      dr = n / 16384.0;
      s1 = 0; s2 = 0;
      for (int k = 0; k < 5; k++) begin
        real e1, e2;
        e1 = lag(2.0 + dr, k) * 16384.0;
        e2 = lag(2.0 - dr, k) * 16384.0;
        check($itor(h1[k]) - e1 <= 3.0 && e1 - $itor(h1[k]) <= 3.0, $sformatf("d=%0d h1[%0d]=%0d want %f", n, k, h1[k], e1));
        check($itor(h2[k]) - e2 <= 3.0 && e2 - $itor(h2[k]) <= 3.0, $sformatf("d=%0d h2[%0d]=%0d want %f", n, k, h2[k], e2));
        s1 += int'(h1[k]); s2 += int'(h2[k]);
      end
      check(s1 >= 16384 - 6 && s1 <= 16384 + 6, "set 1 sums to 1");
      check(s2 >= 16384 - 6 && s2 <= 16384 + 6, "set 2 sums to 1");
    end
    d <= 0;
    @(posedge clk); #1;
    check(h1 == {16'sd0, 16'sd0, 16'sd16384, 16'sd0, 16'sd0}, "d=0 set 1 is a pure 2-sample delay");
    check(h2 == {16'sd0, 16'sd0, 16'sd16384, 16'sd0, 16'sd0}, "d=0 set 2 is a pure 2-sample delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
