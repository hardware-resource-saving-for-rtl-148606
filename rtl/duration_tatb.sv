// duration_tatb: end of the second active vector, Ta + Tb, for the present sector.
//
// Implements the Ta + Tb column of the published per-sector dwell-time table,
// with P = (3/4) V_alpha and Q = (sqrt3/4) V_beta as in duration_ta:
//   I: P+Q   II: 2Q   III: -P+Q   IV: -P-Q   V: -2Q   VI: P-Q
// The result is rounded, clamped to 0..128 and returned as a level on the
// triangle's scale (224 + Ta + Tb). Combinational.
module duration_tatb
  import svpwm_pkg::*;
(
  input  sector_t sector,
  input  sample_t v_alfa,
  input  sample_t v_beta,
  output sample_t tatb
);

  q10_t p, q, d;

  always_comb begin
    p = term_p(v_alfa);
    q = term_q(v_beta);
    unique case (sector)
      SEC_I:   d =  p + q;
      SEC_II:  d =  q + q;
      SEC_III: d = -p + q;
      SEC_IV:  d = -p - q;
      SEC_V:   d = -q - q;
      SEC_VI:  d =  p - q;
      default: d = '0;
    endcase
    tatb = to_level(d);
  end

endmodule
