// find_sector: sector identification without trigonometry.
//
// Three comparators test V_beta against 0, sqrt(3)*V_alpha and
// -sqrt(3)*V_alpha, and the csector truth table turns the three results into
// the sector number S2S1S0 (1..6). This comparator structure and the truth
// table follow the published design. Inputs are 9-bit unsigned values around
// the base 224 and are made signed by subtracting it. The sqrt(3) products
// are avoided by comparing 1024*V_beta with SQRT3_Q10*V_alpha exactly on
// integers (SQRT3_Q10/1024 ~ sqrt(3)); that constant is this
// implementation's choice. Purely combinational.
module find_sector
  import svpwm_pkg::*;
#(
  parameter int SQRT3_K = SQRT3_Q10   // sqrt(3) in units of 1/1024
) (
  input  sample_t v_beta,
  input  sample_t v_alfa,
  output logic    sector2,
  output logic    sector1,
  output logic    sector0
);

  ssample_t vb, va;
  logic signed [23:0] vb_scaled, va_scaled;
  logic [2:0] cmp;
  sector_t    sector;

  always_comb begin
    vb        = to_signed(v_beta);
    va        = to_signed(v_alfa);
    vb_scaled = 24'(vb) * 24'sd1024;
    va_scaled = 24'(va) * 24'(SQRT3_K);
    cmp[2]    = vb > 10'sd0;              // V_beta > 0
    cmp[1]    = vb_scaled > va_scaled;    // V_beta > sqrt3*V_alpha
    cmp[0]    = vb_scaled > -va_scaled;   // V_beta > -sqrt3*V_alpha
  end

  csector u_csector (.cmp(cmp), .sector(sector));

  assign {sector2, sector1, sector0} = sector;

endmodule
