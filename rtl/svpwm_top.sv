// svpwm_top: FPGA space-vector PWM generator with 5-segment bus clamping.
//
// The five stages of the published design, wired as in its block diagram:
//   ajust_freq      divides clk into the table step rate (cksin, 50 Hz x 360)
//                   and the triangle sample rate (cktri, 40 kHz x 32);
//   vbeta_valfa     360-entry sine/cosine tables give V_beta and V_alpha;
//   find_sector     three comparators and a truth table give the sector 1..6;
//   svm_generator   triangle carrier, Ta / Ta+Tb calculation and the
//                   bus-clamping pattern give the phase signals sa, sb, sc;
//   deadtime_system splits each phase into upper/lower gates with dead time.
// Outputs are the sector number and the six gate signals of a two-level
// three-phase inverter. Everything runs on clk; cksin and cktri are one-cycle
// enables (the original drew them as clocks). The board clock frequency and
// the dead time are this implementation's choices.
module svpwm_top #(
  parameter int unsigned CLK_HZ       = 33_333_333,
  parameter int unsigned F_CARRIER_HZ = 40_000,
  parameter int unsigned F_REF_HZ     = 50,
  parameter int unsigned DEAD_CYCLES  = 33
) (
  input  logic clk,
  input  logic clrn,      // active-low asynchronous clear
  output logic sector2,
  output logic sector1,
  output logic sector0,
  output logic sa_up,
  output logic sa_lw,
  output logic sb_up,
  output logic sb_lw,
  output logic sc_up,
  output logic sc_lw
);

  import svpwm_pkg::*;

  logic    cksin, cktri;
  sample_t vbeta_sin, valfa_cos;
  logic    sa, sb, sc;

  ajust_freq #(
    .CLK_HZ(CLK_HZ), .F_CARRIER_HZ(F_CARRIER_HZ), .F_REF_HZ(F_REF_HZ)
  ) inst3 (
    .clk(clk), .clrn(clrn), .cksin(cksin), .cktri(cktri)
  );

  vbeta_valfa inst1 (
    .clk(clk), .clrn(clrn), .ce(cksin),
    .vbeta_sin(vbeta_sin), .valfa_cos(valfa_cos)
  );

  find_sector inst (
    .v_beta(vbeta_sin), .v_alfa(valfa_cos),
    .sector2(sector2), .sector1(sector1), .sector0(sector0)
  );

  svm_generator inst4 (
    .clk(clk), .clrn(clrn), .tri_ce(cktri),
    .s2(sector2), .s1(sector1), .s0(sector0),
    .v_alfa(valfa_cos), .v_beta(vbeta_sin),
    .sa(sa), .sb(sb), .sc(sc)
  );

  deadtime_system #(.DEAD_CYCLES(DEAD_CYCLES)) inst2 (
    .clk(clk), .clrn(clrn), .sa(sa), .sb(sb), .sc(sc),
    .sa_up(sa_up), .sa_lw(sa_lw), .sb_up(sb_up), .sb_lw(sb_lw),
    .sc_up(sc_up), .sc_lw(sc_lw)
  );

endmodule
