// tb_cma_equalizer - blind equalization of a rotated and attenuated QPSK
// pair. Symbols a (per axis +-0.5) are made into a T/2 stream (odd samples =
// symbols, even samples = mean of neighbours), scaled by 0.7 and mixed by a
// 25 degree polarization rotation in the tb. The equalizer, at its default
// step size, must (1) reduce the constant-modulus dispersion mean((|y|^2-R2)^2)
// by a factor of 10 between the first and the last 2000 symbols, (2) then
// decide every symbol of both polarizations correctly, at a fixed latency
// (peak sample on lane 1 at edge t -> output after edge t+3), and (3) hold
// output power near R2.
module tb_cma_equalizer;
  import pmd_pkg::*;
  localparam int NSYM = 200000;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, in_valid = 0;
  lanes_t x_in = '0, y_in = '0;
  cplx_t x_out, y_out;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  cma_equalizer dut (.clk, .rst_n, .x_in, .y_in, .in_valid, .x_out, .y_out, .out_valid);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (NSYM + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // symbols: [pol][axis], +-1
  int ax [$], aq [$], bx [$], bq [$];

  initial begin
    real c, s, g, d_first, d_last, pw;
    int nerr, n_first, n_last, n_pw;
    c = $cos(25.0 * PI / 180.0); s = $sin(25.0 * PI / 180.0); g = 0.7 * 4096.0;
    d_first = 0; d_last = 0; n_first = 0; n_last = 0; nerr = 0; pw = 0; n_pw = 0;
    ax.push_back(1); aq.push_back(1); bx.push_back(1); bq.push_back(1);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 1; t < NSYM; t++) begin
      real sx [2][2], sy [2][2];   // [lane][i/q] before mixing
      ax.push_back(($urandom_range(0, 1) != 0) ? 1 : -1); aq.push_back(($urandom_range(0, 1) != 0) ? 1 : -1);
      bx.push_back(($urandom_range(0, 1) != 0) ? 1 : -1); bq.push_back(($urandom_range(0, 1) != 0) ? 1 : -1);
      sx[0][0] = 0.5 * (ax[t - 1] + ax[t]); sx[0][1] = 0.5 * (aq[t - 1] + aq[t]);
      sy[0][0] = 0.5 * (bx[t - 1] + bx[t]); sy[0][1] = 0.5 * (bq[t - 1] + bq[t]);
      sx[1][0] = ax[t]; sx[1][1] = aq[t];
      sy[1][0] = bx[t]; sy[1][1] = bq[t];
      for (int l = 0; l < 2; l++) begin
        x_in[l].i <= sample_t'($rtoi(g * ( c * sx[l][0] + s * sy[l][0])));
        x_in[l].q <= sample_t'($rtoi(g * ( c * sx[l][1] + s * sy[l][1])));
        y_in[l].i <= sample_t'($rtoi(g * (-s * sx[l][0] + c * sy[l][0])));
        y_in[l].q <= sample_t'($rtoi(g * (-s * sx[l][1] + c * sy[l][1])));
      end
      in_valid <= 1;
      @(posedge clk); #1;
      if (t > 10) begin
        real m2x, m2y;
        int k;
        m2x = ($itor(x_out.i) ** 2 + $itor(x_out.q) ** 2) / 8192.0;   // in units of 2^-13
        m2y = ($itor(y_out.i) ** 2 + $itor(y_out.q) ** 2) / 8192.0;
        if (t < 2010) begin d_first += (m2x - 4096.0) ** 2 + (m2y - 4096.0) ** 2; n_first++; end
        if (t >= NSYM - 2000) begin d_last += (m2x - 4096.0) ** 2 + (m2y - 4096.0) ** 2; n_last++; end
        if (t >= NSYM - 5000) begin
          k = t - 3;
          if ((x_out.i < 0) != (ax[k] < 0) || (x_out.q < 0) != (aq[k] < 0) ||
              (y_out.i < 0) != (bx[k] < 0) || (y_out.q < 0) != (bq[k] < 0)) nerr++;
          pw += (m2x + m2y) / 2.0; n_pw++;
        end
        check(out_valid, "valid");
      end
    end
    d_first = d_first / n_first; d_last = d_last / n_last; pw = pw / n_pw;
    $display("dispersion first %f last %f, power %f, decision errors %0d", d_first, d_last, pw, nerr);
    check(d_last * 10.0 < d_first, "CMA dispersion reduced tenfold");
    check(nerr == 0, $sformatf("%0d symbol errors after convergence", nerr));
    check(pw > 0.9 * 4096.0 && pw < 1.1 * 4096.0, "output power near R2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
