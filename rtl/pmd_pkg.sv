// pmd_pkg - types, number formats and constant tables shared by the PMD
// emulation system.
//
// Every sample in the datapath is a complex number whose I and Q parts are
// 16-bit two's-complement values with 13 fraction bits (range -4..+4). After
// pulse shaping a polarization carries two samples per clock (two lanes, lane 0
// the earlier sample). Coefficient formats:
//   RRC taps            16 bit, 15 fraction bits
//   cos / sin (rotation) 16 bit, 14 fraction bits
//   Lagrange taps       16 bit, 14 fraction bits
//   fractional delay    16 bit, 14 fraction bits, in sample periods (T/2)
// The word lengths are this design's choice; the 51-tap RRC with roll-off 0.1
// at two samples per symbol follows the system description.
//
// The RRC taps and the rotation cos/sin table are computed at elaboration time
// with real arithmetic (functions rrc_taps and rot_table), so no data files
// are needed.
package pmd_pkg;

  localparam int SW = 16;          // sample width
  localparam int SF = 13;          // sample fraction bits
  localparam int LANES = 2;        // samples per clock after pulse shaping

  localparam int CW = 16;          // coefficient width
  localparam int RRC_F = 15;       // RRC coefficient fraction bits
  localparam int ROT_F = 14;       // cos/sin fraction bits
  localparam int LAG_F = 14;       // Lagrange coefficient / delay fraction bits

  localparam int RRC_TAPS = 51;
  localparam real RRC_BETA = 0.1;

  localparam int ANG_W = 9;        // angle in whole degrees, 0..359
  localparam int ANGLES = 360;

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [SW-1:0] sample_t;
  typedef logic signed [CW-1:0] coef_t;
  typedef logic [ANG_W-1:0]     angle_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } cplx_t;

  typedef cplx_t [LANES-1:0] lanes_t;   // lanes_t[0] is the earlier sample

  // Round a wide product right by 'sh' bits (round half up) and saturate to SW bits.
  function automatic sample_t rnd_sat(input logic signed [63:0] v, input int sh);
    logic signed [63:0] r;
    r = (sh > 0) ? ((v + (64'sd1 <<< (sh - 1))) >>> sh) : v;
    if (r > 64'sd32767) return sample_t'(16'sd32767);
    else if (r < -64'sd32768) return sample_t'(-16'sd32768);
    else return sample_t'(r[SW-1:0]);
  endfunction

  // Saturate a wide value to SW bits.
  function automatic sample_t sat(input logic signed [63:0] v);
    return rnd_sat(v, 0);
  endfunction

  // Root-raised-cosine impulse response, symbol period 1.
  function automatic real rrc_h(input real t, input real beta);
    real num, den, at;
    at = (t < 0.0) ? -t : t;
    if (t == 0.0) return 1.0 - beta + 4.0 * beta / PI;
    if ((at - 1.0 / (4.0 * beta)) < 1e-9 && (at - 1.0 / (4.0 * beta)) > -1e-9)
      return beta / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * beta)) +
                                  (1.0 - 2.0 / PI) * $cos(PI / (4.0 * beta)));
    num = $sin(PI * t * (1.0 - beta)) + 4.0 * beta * t * $cos(PI * t * (1.0 + beta));
    den = PI * t * (1.0 - (4.0 * beta * t) * (4.0 * beta * t));
    return num / den;
  endfunction

  typedef coef_t rrc_taps_t [RRC_TAPS];

  // 51 taps at T/2 spacing, centred on tap 25, scaled to unit energy
  // (sum of squares = 1) and rounded to RRC_F fraction bits.
  function automatic rrc_taps_t rrc_taps();
    rrc_taps_t c;
    real h [RRC_TAPS];
    real e;
    e = 0.0;
    for (int k = 0; k < RRC_TAPS; k++) begin
      h[k] = rrc_h((real'(k) - real'((RRC_TAPS - 1) / 2)) / 2.0, RRC_BETA);
      e += h[k] * h[k];
    end
    for (int k = 0; k < RRC_TAPS; k++)
      c[k] = coef_t'($rtoi($floor(h[k] / $sqrt(e) * real'(1 << RRC_F) + 0.5)));
    return c;
  endfunction

  typedef struct packed {
    coef_t c;   // cos(theta), ROT_F fraction bits
    coef_t s;   // sin(theta), ROT_F fraction bits
  } cs_t;

  typedef logic [2*CW-1:0] rot_table_t [ANGLES];   // entry = {cos, sin} as in cs_t

  // cos/sin of every whole degree 0..359.
  function automatic rot_table_t rot_table();
    rot_table_t t;
    coef_t c, s;
    for (int a = 0; a < ANGLES; a++) begin
      c = coef_t'($rtoi($floor($cos(real'(a) * PI / 180.0) * real'(1 << ROT_F) + 0.5)));
      s = coef_t'($rtoi($floor($sin(real'(a) * PI / 180.0) * real'(1 << ROT_F) + 0.5)));
      t[a] = {c, s};
    end
    return t;
  endfunction

endpackage
