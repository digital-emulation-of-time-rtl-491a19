// tb_pmd_section - sinusoidal test of one waveplate section. The four real
// input streams (X I/Q, Y I/Q) are sinusoids; the tb follows them as phasors
// through the ideal model (rotation by theta, then delay D0 + d on X and
// D0 - d on Y) and compares every output sample within 6 LSB. Runs several
// (theta, d) pairs, including d = 0 and theta = 0, and checks that d = 0,
// theta = 0 gives the input back exactly, two clocks plus two samples later.
module tb_pmd_section;
  import pmd_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  angle_t theta = 0;
  coef_t d = 0;
  lanes_t x_in = '0, y_in = '0, x_out, y_out;
  logic out_valid;
  int checks = 0, failures = 0;
  localparam real W = 2.0 * 3.14159265358979 * 0.03;   // rad per sample
  localparam real A = 6000.0;
  localparam real PI = 3.14159265358979;

  always #5 clk = ~clk;
  pmd_section #(.NTAPS(5)) dut (.clk, .rst_n, .theta, .d, .x_in, .y_in, .in_valid, .x_out, .y_out, .out_valid);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // input phases of X.i, X.q, Y.i, Y.q
  function automatic real ph(input int c);
    return 0.9 * c;
  endfunction

  function automatic real src(input int c, input real m);
    return A * $cos(W * m + ph(c));
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int  tht [5] = '{0, 10, 30, 45, 13};
    static real dd  [5] = '{0.0, 0.3, -0.45, 0.6, 0.06};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int cfg = 0; cfg < 5; cfg++) begin
      real c, s, dv, worst;
      theta <= angle_t'(tht[cfg]);
      d <= coef_t'($rtoi($floor(dd[cfg] * 16384.0 + 0.5)));
      dv = $rtoi($floor(dd[cfg] * 16384.0 + 0.5)) / 16384.0;
      c = $cos(tht[cfg] * PI / 180.0); s = $sin(tht[cfg] * PI / 180.0);
      worst = 0.0;
      for (int t = 0; t < 400; t++) begin
        for (int l = 0; l < 2; l++) begin
          x_in[l].i <= sample_t'($rtoi($floor(src(0, 2 * t + l) + 0.5)));
          x_in[l].q <= sample_t'($rtoi($floor(src(1, 2 * t + l) + 0.5)));
          y_in[l].i <= sample_t'($rtoi($floor(src(2, 2 * t + l) + 0.5)));
          y_in[l].q <= sample_t'($rtoi($floor(src(3, 2 * t + l) + 0.5)));
        end
        in_valid <= 1;
        @(posedge clk); #1;
        if (t > 10) for (int l = 0; l < 2; l++) begin
          real mx, my, e [4];
          mx = 2 * (t - 2) + l - dv;     // X: delay D0 + d
          my = 2 * (t - 2) + l + dv;     // Y: delay D0 - d
          e[0] = $itor(x_out[l].i) - ( c * src(0, mx) + s * src(2, mx));
          e[1] = $itor(x_out[l].q) - ( c * src(1, mx) + s * src(3, mx));
          e[2] = $itor(y_out[l].i) - (-s * src(0, my) + c * src(2, my));
          e[3] = $itor(y_out[l].q) - (-s * src(1, my) + c * src(3, my));
          for (int k = 0; k < 4; k++) begin
            if (e[k] < 0) e[k] = -e[k];
            if (e[k] > worst) worst = e[k];
            check(e[k] <= 6.0, $sformatf("cfg %0d t %0d lane %0d stream %0d error %f", cfg, t, l, k, e[k]));
          end
          if (tht[cfg] == 0 && dd[cfg] == 0.0)
            check(x_out[l].i == sample_t'($rtoi($floor(src(0, 2 * (t - 2) + l) + 0.5))), "exact pass-through");
        end
        if (t > 2) check(out_valid, "valid");
      end
      $display("theta %0d d %f: largest error %f LSB", tht[cfg], dd[cfg], worst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
