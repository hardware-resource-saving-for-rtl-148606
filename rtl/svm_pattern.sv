// svm_pattern: 5-segment bus-clamping switching pattern.
//
// Two comparisons are made: cta = (triangle > Ta) and ctt = (triangle > Ta+Tb).
// In odd sectors one phase is clamped to 1 for the whole carrier period and
// the other two phases take cta and ctt; in even sectors one phase is clamped
// to 0 and the other two take the complements of cta and ctt. This rule is the
// published one. The assignment of phases to sectors is derived so that each
// phase-to-phase duty equals the dwell-time table:
//   sector  clamped  phase on cta  phase on ctt
//   I       a = 1    b             c
//   II      c = 0    a (inverted)  b (inverted)
//   III     b = 1    c             a
//   IV      a = 0    b (inverted)  c (inverted)
//   V       c = 1    a             b
//   VI      b = 0    c (inverted)  a (inverted)
// Each output is 1 when the phase's upper switch is to conduct. Combinational.
module svm_pattern
  import svpwm_pkg::*;
(
  input  sector_t sector,
  input  sample_t tri_in,
  input  sample_t ta,
  input  sample_t tatb,
  output logic    sa,
  output logic    sb,
  output logic    sc
);

  logic cta, ctt;

  always_comb begin
    cta = tri_in > ta;
    ctt = tri_in > tatb;
    unique case (sector)
      SEC_I:   {sa, sb, sc} = {1'b1,  cta,  ctt};
      SEC_II:  {sa, sb, sc} = {~cta, ~ctt, 1'b0};
      SEC_III: {sa, sb, sc} = { ctt, 1'b1,  cta};
      SEC_IV:  {sa, sb, sc} = {1'b0, ~cta, ~ctt};
      SEC_V:   {sa, sb, sc} = { cta,  ctt, 1'b1};
      SEC_VI:  {sa, sb, sc} = {~ctt, 1'b0, ~cta};
      default: {sa, sb, sc} = 3'b000;
    endcase
  end

endmodule
