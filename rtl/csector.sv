// csector: converts the three sector comparisons into the sector number.
//
// cmp = {V_beta > 0, V_beta > sqrt3*V_alpha, V_beta > -sqrt3*V_alpha}.
// The six codes that occur map to sectors I..VI as in the published truth
// table: 101->I, 111->II, 110->III, 010->IV, 000->V, 001->VI. The codes 011
// and 100 cannot occur for any vector; this implementation maps them to
// sector I. Purely combinational.
module csector
  import svpwm_pkg::*;
(
  input  logic [2:0] cmp,
  output sector_t    sector
);

  always_comb begin
    unique case (cmp)
      3'b101:  sector = SEC_I;
      3'b111:  sector = SEC_II;
      3'b110:  sector = SEC_III;
      3'b010:  sector = SEC_IV;
      3'b000:  sector = SEC_V;
      3'b001:  sector = SEC_VI;
      default: sector = SEC_I;   // 011, 100: not reachable
    endcase
  end

endmodule
