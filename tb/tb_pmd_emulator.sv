// tb_pmd_emulator - the full 10-section emulator at its default parameters.
// 1. All angles and delays zero: the output must be the input, bit for bit,
//    3K+1 = 31 clocks later (the sample taken at edge t shows after edge t+30).
// 2. Sinusoidal streams with per-section angles and fractional delays: the tb
//    carries each stream as a phasor through the ideal waveplate model
//    (rotate, delay X by +d and Y by -d, ..., final rotation) and compares
//    every output sample within 16 LSB.
// 3. Variable angles: only the first, centre and last sections may update,
//    each exactly every theta_period clocks, with angles within the range;
//    the others keep their fixed angle.
module tb_pmd_emulator;
  import pmd_pkg::*;
  localparam int K = 10;
  localparam real W = 2.0 * 3.14159265358979 * 0.03;
  localparam real A = 5000.0;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, in_valid = 0;
  lanes_t x_in = '0, y_in = '0, x_out, y_out;
  logic out_valid;
  angle_t [K-1:0] theta_fixed = '0;
  angle_t theta_final = 0, theta_min = 0, theta_max = 15;
  coef_t [K-1:0] frac_delay = '0;
  logic [K-1:0][31:0] theta_period = '0;
  angle_t [K-1:0] theta_now;
  logic [K-1:0] theta_update;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pmd_emulator dut (
    .clk, .rst_n, .x_in, .y_in, .in_valid, .theta_fixed, .theta_final, .frac_delay,
    .theta_period, .theta_min, .theta_max, .x_out, .y_out, .out_valid, .theta_now, .theta_update);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real src(input int c, input real m);
    return A * $cos(W * m + 0.9 * c);
  endfunction

  // phasors of the four real streams: 0 X.i, 1 X.q, 2 Y.i, 3 Y.q
  real pr [4], pim [4];

  function automatic void rotate(input int deg);
    real c, s, xr, xi2, yr, yi2;
    c = $cos(deg * PI / 180.0); s = $sin(deg * PI / 180.0);
    for (int q = 0; q < 2; q++) begin
      xr = pr[q]; xi2 = pim[q]; yr = pr[2 + q]; yi2 = pim[2 + q];
      pr[q] = c * xr + s * yr;      pim[q] = c * xi2 + s * yi2;
      pr[2 + q] = -s * xr + c * yr; pim[2 + q] = -s * xi2 + c * yi2;
    end
  endfunction

  function automatic void delay(input int c, input real dd);
    real a, b;
    a = pr[c]; b = pim[c];
    pr[c]  = a * $cos(W * dd) + b * $sin(W * dd);
    pim[c] = b * $cos(W * dd) - a * $sin(W * dd);
  endfunction

  task automatic drive(input int t);
    for (int l = 0; l < 2; l++) begin
      x_in[l].i <= sample_t'($rtoi($floor(src(0, 2 * t + l) + 0.5)));
      x_in[l].q <= sample_t'($rtoi($floor(src(1, 2 * t + l) + 0.5)));
      y_in[l].i <= sample_t'($rtoi($floor(src(2, 2 * t + l) + 0.5)));
      y_in[l].q <= sample_t'($rtoi($floor(src(3, 2 * t + l) + 0.5)));
    end
    in_valid <= 1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lanes_t hist_x [$];
    real worst;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // 1. identity, exact latency
    for (int t = 0; t < 200; t++) begin
      lanes_t v;
      for (int l = 0; l < 2; l++) begin
        v[l].i = sample_t'(int'($urandom_range(0, 16000)) - 8000);
        v[l].q = sample_t'(int'($urandom_range(0, 16000)) - 8000);
      end
      x_in <= v; y_in <= ~v; in_valid <= 1;
      hist_x.push_back(v);
      @(posedge clk); #1;
      if (t >= 3 * K + 1 + 2) begin
        check(x_out == hist_x[t - 3 * K], $sformatf("identity X at t=%0d", t));
        check(y_out == ~hist_x[t - 3 * K], $sformatf("identity Y at t=%0d", t));
        check(out_valid, "valid");
      end
    end
    // 2. sinusoidal check with two configurations
    for (int cfg = 0; cfg < 2; cfg++) begin
      for (int k = 0; k < K; k++) begin
        theta_fixed[k] <= angle_t'(cfg == 0 ? 3 : (7 * k + 2) % 16);
        frac_delay[k] <= coef_t'(cfg == 0 ? 983 : (k == 0 ? 4915 : 492));  // 0.06, 0.3, 0.03 samples
      end
      theta_final <= angle_t'(cfg == 0 ? 10 : 35);
      #1;
      for (int c = 0; c < 4; c++) begin pr[c] = A * $cos(0.9 * c); pim[c] = A * $sin(0.9 * c); end
      for (int k = 0; k < K; k++) begin
        rotate(int'(theta_fixed[k]));
        delay(0, frac_delay[k] / 16384.0); delay(1, frac_delay[k] / 16384.0);
        delay(2, -frac_delay[k] / 16384.0); delay(3, -frac_delay[k] / 16384.0);
      end
      rotate(int'(theta_final));
      worst = 0.0;
      for (int t = 0; t < 600; t++) begin
        drive(t);
        @(posedge clk); #1;
        if (t > 3 * K + 20) for (int l = 0; l < 2; l++) begin
          real m, e [4];
          m = 2 * (t - 3 * K) + l;
          e[0] = $itor(x_out[l].i); e[1] = $itor(x_out[l].q);
          e[2] = $itor(y_out[l].i); e[3] = $itor(y_out[l].q);
          for (int c = 0; c < 4; c++) begin
            e[c] = e[c] - (pr[c] * $cos(W * m) - pim[c] * $sin(W * m));
            if (e[c] < 0) e[c] = -e[c];
            if (e[c] > worst) worst = e[c];
            check(e[c] <= 16.0, $sformatf("cfg %0d t %0d lane %0d stream %0d error %f", cfg, t, l, c, e[c]));
          end
        end
      end
      $display("configuration %0d: largest error %f LSB", cfg, worst);
    end
    // 3. variable sections
    begin
      int n_upd [K];
      for (int k = 0; k < K; k++) begin
        theta_period[k] <= 32'(40 + 10 * k);
        theta_fixed[k] <= angle_t'(20 + k);
        n_upd[k] = 0;
      end
      theta_min <= 2; theta_max <= 12;
      for (int t = 0; t < 4000; t++) begin
        drive(t);
        @(posedge clk); #1;
        for (int k = 0; k < K; k++) begin
          if (theta_update[k]) n_upd[k]++;
          if (k == 0 || k == K / 2 || k == K - 1) begin
            if (t > 200) check(theta_now[k] >= 2 && theta_now[k] <= 12, $sformatf("section %0d angle %0d in range", k, theta_now[k]));
          end else begin
            check(theta_now[k] == angle_t'(20 + k), "fixed section keeps its angle");
          end
        end
      end
      for (int k = 0; k < K; k++) begin
        if (k == 0 || k == K / 2 || k == K - 1)
          check(n_upd[k] >= 4000 / (40 + 10 * k) - 1 && n_upd[k] <= 4000 / (40 + 10 * k) + 1,
                $sformatf("section %0d: %0d updates", k, n_upd[k]));
        else
          check(n_upd[k] == 0, $sformatf("section %0d must not update", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
