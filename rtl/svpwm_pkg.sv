// svpwm_pkg: types and constants shared by the bus-clamping SV-PWM generator.
//
// All analogue quantities (V_alpha, V_beta, the triangle carrier and the
// switching levels Ta, Ta+Tb) travel as 9-bit unsigned numbers around a base
// of 224. The reference tables swing from 96 to 352 (amplitude 128) and the
// triangle from 224 to 352, so one triangle half-period (T/2) spans 128 units.
// These numbers, the 360-entry table and the 32 triangle samples per carrier
// period come from the published design; the fixed-point constants for sqrt(3)
// are this implementation's choice.
package svpwm_pkg;

  typedef logic [8:0] sample_t;          // 9-bit unsigned signal value
  typedef logic signed [9:0] ssample_t;  // value minus REF_BASE, signed

  // Sector number S2S1S0, 1..6 (sectors I..VI)
  typedef enum logic [2:0] {
    SEC_I   = 3'd1,
    SEC_II  = 3'd2,
    SEC_III = 3'd3,
    SEC_IV  = 3'd4,
    SEC_V   = 3'd5,
    SEC_VI  = 3'd6
  } sector_t;

  localparam int LUT_DEPTH   = 360;  // one table entry per electrical degree
  localparam int REF_LOW     = 96;
  localparam int REF_BASE    = 224;
  localparam int REF_HIGH    = 352;
  localparam int REF_AMP     = REF_HIGH - REF_BASE;   // 128

  localparam int TRI_SAMPLES = 32;   // triangle samples per carrier period
  localparam int TRI_LOW     = 224;
  localparam int TRI_HIGH    = 352;
  localparam int TRI_STEP    = 2 * (TRI_HIGH - TRI_LOW) / TRI_SAMPLES;  // 8

  // Fixed-point constants, 10 fractional bits
  localparam int SQRT3_Q10   = 1774; // sqrt(3)   ~ 1.73242
  localparam int SQRT3_4_Q10 = 443;  // sqrt(3)/4 ~ 0.43262

  // Signed value relative to the base number
  function automatic ssample_t to_signed(sample_t v);
    return ssample_t'({1'b0, v}) - ssample_t'(REF_BASE);
  endfunction

  // Dwell-time arithmetic. With Vdc/T = 1 and the triangle peak equal to
  // T/2, every entry of the per-sector dwell-time table is a sum of
  // P = (3/4) V_alpha and Q = (sqrt3/4) V_beta. Both are kept in Q10.
  typedef logic signed [19:0] q10_t;

  function automatic q10_t term_p(sample_t v_alfa);
    return q10_t'(to_signed(v_alfa)) * q10_t'(768);          // 3/4 = 768/1024
  endfunction

  function automatic q10_t term_q(sample_t v_beta);
    return q10_t'(to_signed(v_beta)) * q10_t'(SQRT3_4_Q10);  // sqrt3/4
  endfunction

  // Q10 duration -> triangle level: round to an integer, clamp to the
  // triangle's span 0..(TRI_HIGH-TRI_LOW), add the triangle's low level.
  function automatic sample_t to_level(q10_t d);
    q10_t r;
    r = (d + q10_t'(512)) >>> 10;
    if (r < 0)                          r = '0;
    else if (r > q10_t'(TRI_HIGH - TRI_LOW)) r = q10_t'(TRI_HIGH - TRI_LOW);
    return sample_t'(r) + sample_t'(TRI_LOW);
  endfunction

endpackage
