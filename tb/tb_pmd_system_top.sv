// tb_pmd_system_top - end-to-end run of the whole two-polarization system at
// its default parameters (K = 10 sections, 51-tap RRC, 11-tap CMA, step
// 0.0002).
//  1. Matched-filter receiver, no noise, no PMD: no bit errors, bit count right.
//  2. Angle sweep 0..45 degrees on one section with a DGD of 0.6 and of 0.3
//     symbol (matched-filter receiver, no equalizer): errors grow with the
//     angle; with 0.3 symbol there are none at 0 degrees. A fine sweep
//     (0.3 symbol, 0..20 degrees, 1-degree steps, accumulating counters)
//     must show its first errors between 10 and 20 degrees.
//  3. AWGN calibration: matched-filter receiver at Eb/N0 = 4 dB; the measured
//     BER must be within 25 % of the Gaussian value Q(sqrt(2 Eb/N0)) = 1.25e-2.
//  4. Real-time configuration: CMA receiver, 10 sections with a 0.06-symbol
//     DGD each, first/centre/last sections with random angles in 0..15
//     degrees, Eb/N0 = 10 dB. (a) Real-time update rates of 0.3/1/0.1 Hz,
//     which hold the angles still over the simulated span: after convergence
//     the BER must be within 10x of the Gaussian value 3.9e-6. (b) Updates
//     every 5000 clocks (6 kHz): BER must rise above (a) and stay below 1e-3.
//  5. Restart with a DGD of 0.02 and of 0.06 symbol per section: the smaller
//     DGD makes fewer errors while the equalizer converges, and both settle
//     near the Gaussian value.
// Every mechanism is counted (mode switches, counter clears, angle updates per
// variable section, noise errors, PMD errors) and one that never happened is
// a failure.
module tb_pmd_system_top;
  import pmd_pkg::*;
  localparam int K = 10;

  logic clk = 0, rst_n = 0, run = 0, eq_mode = 1, cnt_clear = 0;
  logic [15:0] sigma = 0;
  angle_t [K-1:0] theta_fixed = '0;
  angle_t theta_final = 0, theta_min = 0, theta_max = 15;
  coef_t [K-1:0] frac_delay = '0;
  logic [K-1:0][31:0] theta_period = '0;
  logic [63:0] bits_cnt1, errors_cnt1, bits_cnt2, errors_cnt2;
  angle_t [K-1:0] theta_now;
  logic [K-1:0] theta_update;
  cplx_t rx_x, rx_y;
  logic rx_valid;
  int checks = 0, failures = 0;
  int n_mode = 0, n_clear = 0, n_upd [K], n_noise_err = 0, n_pmd_err = 0;

  always #5 clk = ~clk;

  pmd_system_top dut (
    .clk, .rst_n, .run, .eq_mode, .sigma, .theta_fixed, .theta_final, .frac_delay,
    .theta_period, .theta_min, .theta_max, .cnt_clear,
    .bits_cnt1, .errors_cnt1, .bits_cnt2, .errors_cnt2, .theta_now, .theta_update,
    .rx_x, .rx_y, .rx_valid);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) for (int k = 0; k < K; k++) if (theta_update[k]) n_upd[k]++;

  task automatic clear_and_run(input int n);
    cnt_clear <= 1;
    @(posedge clk);
    cnt_clear <= 0;
    n_clear++;
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic set_mode(input logic m);
    if (eq_mode != m) n_mode++;
    eq_mode <= m;
  endtask

  initial begin
    repeat (2500000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e [16];
    real ber, ber_slow;
    int first_err;
    longint conv_err [2];
    for (int k = 0; k < K; k++) n_upd[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run <= 1;
    // 1. clean link, matched-filter receiver
    set_mode(1);
    repeat (2000) @(posedge clk); #1;
    check(errors_cnt1 == 0 && errors_cnt2 == 0, $sformatf("clean link: %0d/%0d errors", errors_cnt1, errors_cnt2));
    check(bits_cnt1 > 2 * (2000 - 100) && bits_cnt1 <= 2 * 2000 && bits_cnt1 == bits_cnt2,
          $sformatf("bit count %0d", bits_cnt1));

    // 2. one section with a DGD, angle swept 0..45 degrees in 3-degree steps.
    //    DGD 0.6 symbol (d = 0.6 sample): the sweep of the document's example.
    //    DGD 0.3 symbol (d = 0.3 sample): error-free until the angle grows.
    for (int run_dgd = 0; run_dgd < 2; run_dgd++) begin
      frac_delay[0] <= coef_t'(run_dgd == 0 ? 9830 : 4915);
      for (int a = 0; a <= 45; a += 3) begin
        theta_fixed[0] <= angle_t'(a);
        repeat (20) @(posedge clk);
        clear_and_run(1500);
        e[a / 3] = longint'(errors_cnt1 + errors_cnt2);
        $display("DGD %s symbol, theta %2d deg: bits %0d errors %0d + %0d",
                 run_dgd == 0 ? "0.6" : "0.3", a, bits_cnt1, errors_cnt1, errors_cnt2);
        if (e[a / 3] > 0) n_pmd_err++;
      end
      if (run_dgd == 1) check(e[0] == 0, "DGD 0.3: no errors without rotation");
      check(e[15] > 0, "errors at 45 degrees");
      for (int i = 0; i <= 5; i++) check(e[15] > e[i], "more errors at 45 than at 0..15 degrees");
      for (int i = 1; i <= 15; i++) check(e[i] + 30 >= e[i - 1], "errors do not fall with the angle");
    end
    // 2c. fine sweep in the form of a lab trace: DGD 0.3 symbol, angle 0..20
    //     degrees in 1-degree steps of 30000 symbols, counters accumulating
    //     over the whole sweep. Errors must first appear between 10 and 20
    //     degrees.
    frac_delay[0] <= coef_t'(4915);
    theta_fixed[0] <= 0;
    repeat (20) @(posedge clk);
    clear_and_run(1);
    first_err = -1;
    for (int a = 0; a <= 20; a++) begin
      theta_fixed[0] <= angle_t'(a);
      repeat (30000) @(posedge clk); #1;
      if (first_err < 0 && errors_cnt1 + errors_cnt2 > 0) first_err = a;
    end
    $display("fine sweep 0..20 deg, DGD 0.3 symbol: bits %0d/%0d errors %0d/%0d, first errors at %0d deg",
             bits_cnt1, bits_cnt2, errors_cnt1, errors_cnt2, first_err);
    check(first_err >= 10 && first_err <= 20, "fine sweep: first errors between 10 and 20 degrees");
    theta_fixed[0] <= 0;
    frac_delay[0] <= 0;

    // 3. AWGN calibration at Eb/N0 = 4 dB: sigma = 0.5 / sqrt(2 * 10^0.4) = 0.2231
    sigma <= 16'd1828;
    repeat (20) @(posedge clk);
    clear_and_run(20000);
    ber = $itor(errors_cnt1 + errors_cnt2) / $itor(bits_cnt1 + bits_cnt2);
    $display("Eb/N0 4 dB, matched filter: BER %e (Gaussian 1.25e-2)", ber);
    check(ber > 0.75 * 1.25e-2 && ber < 1.25 * 1.25e-2, "BER matches the Gaussian value");
    if (errors_cnt1 + errors_cnt2 > 0) n_noise_err++;

    // 4. real-time configuration with CMA, 10 sections of DGD 0.06 symbol.
    //    4a. slow: first/centre/last sections at their real-time update rates
    //        0.3 / 1 / 0.1 Hz (1e8 / 3e7 / 3e8 clocks at 30 MHz), so the
    //        angles hold still over the simulated span; after convergence the
    //        BER must come close to the Gaussian value 3.9e-6 (below 4e-5).
    sigma <= 16'd916;                 // Eb/N0 = 10 dB
    for (int k = 0; k < K; k++) begin
      frac_delay[k] <= coef_t'(983);  // 0.06 sample: DGD 0.06 symbol
      theta_fixed[k] <= angle_t'(k % 2 == 0 ? 6 : 354);
      theta_period[k] <= 32'd0;
    end
    theta_period[0] <= 32'd100_000_000;
    theta_period[K / 2] <= 32'd30_000_000;
    theta_period[K - 1] <= 32'd300_000_000;
    theta_final <= angle_t'(340);
    theta_min <= 0; theta_max <= 15;
    set_mode(0);
    repeat (300000) @(posedge clk);
    clear_and_run(250000);
    ber_slow = $itor(errors_cnt1 + errors_cnt2) / $itor(bits_cnt1 + bits_cnt2);
    $display("Eb/N0 10 dB, CMA, slow angle updates: bits %0d errors %0d BER %e (Gaussian 3.9e-6)",
             bits_cnt1 + bits_cnt2, errors_cnt1 + errors_cnt2, ber_slow);
    check(bits_cnt1 > 2 * (250000 - 100), "CMA path counts bits");
    check(ber_slow < 4e-5, "slow updates: CMA BER near the Gaussian value");

    //    4b. fast: all three variable sections jump to a new random angle every
    //        5000 clocks (6 kHz, the harsh case); the equalizer must re-converge
    //        after each jump, so the BER rises above the slow case but the
    //        link stays up (below 1e-3).
    for (int k = 0; k < K; k++)
      if (k == 0 || k == K / 2 || k == K - 1) theta_period[k] <= 32'd5000;
    repeat (50000) @(posedge clk);
    clear_and_run(100000);
    ber = $itor(errors_cnt1 + errors_cnt2) / $itor(bits_cnt1 + bits_cnt2);
    $display("Eb/N0 10 dB, CMA, fast angle updates: bits %0d errors %0d BER %e",
             bits_cnt1 + bits_cnt2, errors_cnt1 + errors_cnt2, ber);
    check(ber < 1e-3, "fast updates: CMA BER below 1e-3");
    check(ber > ber_slow, "fast updates cost BER against slow updates");

    // 5. DGD against convergence speed: restart the system (equalizer taps
    //    back to their initial values) with a DGD of 0.02 and then 0.06
    //    symbol per section, slow angle updates. The smaller DGD must make
    //    fewer errors while the equalizer converges (first 100000 symbols)
    //    and both must settle near the Gaussian value (next 200000 symbols).
    for (int r = 0; r < 2; r++) begin
      rst_n <= 0;
      repeat (3) @(posedge clk);
      rst_n <= 1;
      for (int k = 0; k < K; k++) frac_delay[k] <= coef_t'(r == 0 ? 328 : 983);
      for (int k = 0; k < K; k++)
        if (k == 0 || k == K / 2 || k == K - 1) theta_period[k] <= 32'd30_000_000;
      repeat (100) @(posedge clk);
      clear_and_run(100000);
      conv_err[r] = longint'(errors_cnt1 + errors_cnt2);
      clear_and_run(200000);
      ber = $itor(errors_cnt1 + errors_cnt2) / $itor(bits_cnt1 + bits_cnt2);
      $display("DGD %s symbol from reset: %0d errors while converging, then BER %e",
               r == 0 ? "0.02" : "0.06", conv_err[r], ber);
      check(ber < 4e-5, "settled BER near the Gaussian value");
    end
    check(conv_err[0] < conv_err[1], "smaller DGD converges with fewer errors");

    // mechanisms
    $display("mode switches %0d, clears %0d, angle updates %0d/%0d/%0d, noise-error runs %0d, PMD-error runs %0d",
             n_mode, n_clear, n_upd[0], n_upd[K / 2], n_upd[K - 1], n_noise_err, n_pmd_err);
    check(n_mode > 0, "mode switch happened");
    check(n_clear > 0, "counter clear happened");
    check(n_upd[0] > 0 && n_upd[K / 2] > 0 && n_upd[K - 1] > 0, "random angle updates happened");
    for (int k = 0; k < K; k++) if (k != 0 && k != K / 2 && k != K - 1) check(n_upd[k] == 0, "fixed sections never update");
    check(n_noise_err > 0, "noise produced errors");
    check(n_pmd_err > 0, "PMD produced errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
