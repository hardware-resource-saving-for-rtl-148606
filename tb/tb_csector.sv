// tb_csector: exhaustive check of the comparison-to-sector truth table.
// All eight comparator codes are applied; the six reachable ones must give
// the sector of the published table, the two unreachable ones sector I.
module tb_csector;
  import svpwm_pkg::*;

  logic [2:0] cmp;
  sector_t    sector;
  int checks = 0, failures = 0;

  csector dut (.cmp(cmp), .sector(sector));

  // Expected: index = {V_beta>0, V_beta>sqrt3 Va, V_beta>-sqrt3 Va}
  function automatic int expected(logic [2:0] c);
    case (c)
      3'b101: return 1;
      3'b111: return 2;
      3'b110: return 3;
      3'b010: return 4;
      3'b000: return 5;
      3'b001: return 6;
      default: return 1;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      cmp = 3'(i);
      #1;
      checks++;
      if (int'(sector) != expected(cmp)) begin
        failures++;
        $display("FAIL cmp=%b sector=%0d expected %0d", cmp, sector, expected(cmp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
