// svm_generator: three-phase SV-PWM signal generator.
//
// Made of the four parts of the published design: the triangle carrier, the
// Ta and Ta+Tb duration calculators and the switching-pattern stage. The
// sector arrives as three bits S2S1S0 from find_sector and V_alpha/V_beta from
// the reference tables. The triangle steps on each tri_ce pulse (cktri, 32 per
// carrier period). The pattern outputs are registered once on clk, so sa, sb
// and sc follow the triangle, sector and reference inputs by one clock; that
// output register is this implementation's choice.
module svm_generator
  import svpwm_pkg::*;
(
  input  logic    clk,
  input  logic    clrn,     // active-low asynchronous clear
  input  logic    tri_ce,   // triangle step enable (cktri)
  input  logic    s2,
  input  logic    s1,
  input  logic    s0,
  input  sample_t v_alfa,
  input  sample_t v_beta,
  output logic    sa,
  output logic    sb,
  output logic    sc
);

  sector_t sector;
  sample_t tri_val, ta, tatb;
  logic    pa, pb, pc;

  assign sector = sector_t'({s2, s1, s0});

  triangle u_triangle (
    .clk(clk), .clrn(clrn), .ce(tri_ce), .tri_out(tri_val)
  );

  duration_ta u_duration_ta (
    .sector(sector), .v_alfa(v_alfa), .v_beta(v_beta), .ta(ta)
  );

  duration_tatb u_duration_tatb (
    .sector(sector), .v_alfa(v_alfa), .v_beta(v_beta), .tatb(tatb)
  );

  svm_pattern u_svm_pattern (
    .sector(sector), .tri_in(tri_val), .ta(ta), .tatb(tatb),
    .sa(pa), .sb(pb), .sc(pc)
  );

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) {sa, sb, sc} <= 3'b000;
    else       {sa, sb, sc} <= {pa, pb, pc};
  end

endmodule
