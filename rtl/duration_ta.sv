// duration_ta: duration of the first active vector, Ta, for the present sector.
//
// Implements the Ta column of the published per-sector dwell-time table. With
// Vdc/T = 1 and the triangle peak standing for T/2, each entry reduces to
// P = (3/4) V_alpha and Q = (sqrt3/4) V_beta (in table units):
//   I: P-Q   II: P+Q   III: 2Q   IV: -P+Q   V: -P-Q   VI: -2Q
// The result is rounded, clamped to 0..128 and returned as a level on the
// triangle's scale (224 + Ta) for direct comparison with the carrier.
// Q uses sqrt3/4 ~ 443/1024 (this implementation's constant). Combinational.
module duration_ta
  import svpwm_pkg::*;
(
  input  sector_t sector,
  input  sample_t v_alfa,
  input  sample_t v_beta,
  output sample_t ta
);

  q10_t p, q, d;

  always_comb begin
    p = term_p(v_alfa);
    q = term_q(v_beta);
    unique case (sector)
      SEC_I:   d =  p - q;
      SEC_II:  d =  p + q;
      SEC_III: d =  q + q;
      SEC_IV:  d = -p + q;
      SEC_V:   d = -p - q;
      SEC_VI:  d = -q - q;
      default: d = '0;
    endcase
    ta = to_level(d);
  end

endmodule
