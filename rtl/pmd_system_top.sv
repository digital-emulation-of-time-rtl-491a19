// pmd_system_top - two-polarization real-time test system for coherent
// receiver DSP with a digital PMD emulator in the channel.
//
// Per polarization (channel 1 = X, channel 2 = Y): an RNG makes two bits per
// clock, the QPSK modulator maps them to a symbol, the RRC pulse shaper
// produces two samples per clock and AWGN of standard deviation 'sigma' is
// added. The PMD emulator then mixes and delays the two polarizations
// (K waveplate sections, three of them with randomly changing angles). The
// receiver is selected by 'eq_mode':
//   0  the 11-tap 2x2 CMA equalizer (real-time system with equalizer)
//   1  matched RRC filter and downsampling per polarization (the verification
//      system without equalizer; set sigma = 0 for it)
// QPSK hard decisions go to the error counters, which compare them with the
// RNG bits delayed by the path latency (LAT_CMA or LAT_RRC clocks, chosen by
// eq_mode) and keep 64-bit counts of bits and bit errors per channel. In the
// original system an on-chip logic analyser reads these counters and a host
// computes the bit error rate; here they are output ports.
//
// The chain and its parameters (51-tap RRC, roll-off 0.1, K = 10 sections,
// 11-tap CMA, step 0.0002, one symbol per clock) follow the document; the two
// receive paths in one top, the mode input and all word lengths are this
// design's choices.
//
// Timing: one symbol per polarization per clock while 'run' is high. Change
// eq_mode, sigma or the PMD settings and then pulse 'cnt_clear'; the counters
// skip the symbols still in flight because the delay line refills.
// theta_now and theta_update are observation outputs. For the fixed sections
// they repeat theta_fixed and stay 0, so these bits carry no logic.
module pmd_system_top
  import pmd_pkg::*;
#(
  parameter int K         = 10,
  parameter int LAG_TAPS  = 5,
  parameter int CMA_TAPS  = 11,
  parameter int CMA_MU    = 3355,     // 0.0002 * 2^24
  parameter int AMP       = 4096,     // QPSK amplitude, 0.5
  parameter int MAX_DELAY = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  logic                 eq_mode,        // 0: CMA, 1: RRC downsampling
  input  logic [15:0]          sigma,          // AWGN standard deviation, sample LSBs
  input  angle_t [K-1:0]       theta_fixed,
  input  angle_t               theta_final,
  input  coef_t  [K-1:0]       frac_delay,     // tau_k/2 in samples, 14 fraction bits
  input  logic   [K-1:0][31:0] theta_period,   // 0 = fixed angle
  input  angle_t               theta_min,
  input  angle_t               theta_max,
  input  logic                 cnt_clear,
  output logic   [63:0]        bits_cnt1,
  output logic   [63:0]        errors_cnt1,
  output logic   [63:0]        bits_cnt2,
  output logic   [63:0]        errors_cnt2,
  output angle_t [K-1:0]       theta_now,
  output logic   [K-1:0]       theta_update,
  output cplx_t                rx_x,           // symbols into the demodulators
  output cplx_t                rx_y,
  output logic                 rx_valid
);
  localparam int R2 = (2 * AMP * AMP) >>> SF;

  // Latencies in clocks from RNG output to demodulator output:
  // modulator 1, pulse-shaper peak 13, AWGN 1, PMD 3K+1, then
  // CMA 4 or RRC downsampler 14, demodulator 1.
  localparam int LAT_FRONT = 1 + 13 + 1 + 3 * K + 1;
  localparam int LAT_CMA   = LAT_FRONT + 4 + 1;
  localparam int LAT_RRC   = LAT_FRONT + 14 + 1;
  localparam int DW        = $clog2(MAX_DELAY);

  // ---------------- transmitter, per polarization ----------------
  logic [1:0] tx_bits [2];
  logic       tx_v    [2];
  cplx_t      sym     [2];
  logic       sym_v   [2];
  lanes_t     shaped  [2];
  logic       shaped_v[2];
  lanes_t     noisy   [2];
  logic       noisy_v [2];

  for (genvar p = 0; p < 2; p++) begin : g_tx
    rng #(.SEED(p == 0 ? 32'h1234_5678 : 32'h8765_4321), .BITS(2)) u_rng (
      .clk, .rst_n, .en(run), .bits(tx_bits[p]), .valid(tx_v[p])
    );
    qpsk_modulator #(.AMP(AMP)) u_mod (
      .clk, .rst_n, .bits(tx_bits[p]), .in_valid(tx_v[p]), .sym(sym[p]), .out_valid(sym_v[p])
    );
    rrc_upsampler u_rrc (
      .clk, .rst_n, .sym(sym[p]), .in_valid(sym_v[p]), .out(shaped[p]), .out_valid(shaped_v[p])
    );
    awgn_channel #(.SEED(p == 0 ? 64'h9E37_79B9_7F4A_7C15 : 64'hC2B2_AE3D_27D4_EB4F)) u_awgn (
      .clk, .rst_n, .in(shaped[p]), .in_valid(shaped_v[p]), .sigma,
      .out(noisy[p]), .out_valid(noisy_v[p])
    );
  end

  // ---------------- fiber: PMD emulator ----------------
  lanes_t pmd_x, pmd_y;
  logic   pmd_v;

  pmd_emulator #(.K(K), .NTAPS(LAG_TAPS)) u_pmd (
    .clk, .rst_n,
    .x_in(noisy[0]), .y_in(noisy[1]), .in_valid(noisy_v[0] & noisy_v[1]),
    .theta_fixed, .theta_final, .frac_delay, .theta_period, .theta_min, .theta_max,
    .x_out(pmd_x), .y_out(pmd_y), .out_valid(pmd_v),
    .theta_now, .theta_update
  );

  // ---------------- receivers ----------------
  cplx_t cma_x, cma_y;
  logic  cma_v;
  cma_equalizer #(.NTAPS(CMA_TAPS), .MU(CMA_MU), .R2(R2)) u_cma (
    .clk, .rst_n, .x_in(pmd_x), .y_in(pmd_y), .in_valid(pmd_v),
    .x_out(cma_x), .y_out(cma_y), .out_valid(cma_v)
  );

  cplx_t ds [2];
  logic  ds_v [2];
  rrc_downsampler u_ds_x (.clk, .rst_n, .in(pmd_x), .in_valid(pmd_v), .out(ds[0]), .out_valid(ds_v[0]));
  rrc_downsampler u_ds_y (.clk, .rst_n, .in(pmd_y), .in_valid(pmd_v), .out(ds[1]), .out_valid(ds_v[1]));

  always_comb begin
    rx_x     = eq_mode ? ds[0] : cma_x;
    rx_y     = eq_mode ? ds[1] : cma_y;
    rx_valid = eq_mode ? (ds_v[0] & ds_v[1]) : cma_v;
  end

  // ---------------- demodulation and error counting ----------------
  logic [1:0]        rx_bits [2];
  logic              rx_bv   [2];
  logic [63:0]       bcnt    [2];
  logic [63:0]       ecnt    [2];
  logic [DW-1:0]     ref_delay;

  assign ref_delay = eq_mode ? DW'(LAT_RRC) : DW'(LAT_CMA);

  for (genvar p = 0; p < 2; p++) begin : g_rx
    qpsk_demodulator u_demod (
      .clk, .rst_n, .sym(p == 0 ? rx_x : rx_y), .in_valid(rx_valid),
      .bits(rx_bits[p]), .out_valid(rx_bv[p])
    );
    error_counter #(.BITS(2), .CNT_W(64), .MAX_DELAY(MAX_DELAY)) u_err (
      .clk, .rst_n, .clear(cnt_clear), .delay(ref_delay),
      .ref_bits(tx_bits[p]), .ref_valid(tx_v[p]),
      .rx_bits(rx_bits[p]), .rx_valid(rx_bv[p]),
      .bits_cnt(bcnt[p]), .errors_cnt(ecnt[p])
    );
  end

  assign bits_cnt1   = bcnt[0];
  assign errors_cnt1 = ecnt[0];
  assign bits_cnt2   = bcnt[1];
  assign errors_cnt2 = ecnt[1];

  initial assert (LAT_RRC < MAX_DELAY) else $error("pmd_system_top: MAX_DELAY too small for K");
endmodule
