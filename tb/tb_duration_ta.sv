// tb_duration_ta: checks duration_ta against the Ta column of the dwell-time
// table evaluated in real arithmetic with T = Vdc = 256 table units (the
// triangle's half-period of 128 units standing for T/2). Random V_alpha,
// V_beta over the full table range are applied in every sector; the result
// must match the clamped, rounded real value within one unit (the hardware
// uses a 10-bit approximation of sqrt(3)/4).
module tb_duration_ta;
  import svpwm_pkg::*;

  sector_t sector;
  sample_t v_alfa, v_beta, out;
  int checks = 0, failures = 0;

  duration_ta dut (.sector(sector), .v_alfa(v_alfa), .v_beta(v_beta), .ta(out));

  function automatic real expected(int sec, int va, int vb);
    real K, a, b, d;
    K = 3.0 * 256.0 / 4.0;               // 3T/4
    a = real'(va) / 256.0;               // V_alpha / Vdc
    b = real'(vb) / ($sqrt(3.0) * 256.0); // V_beta / (sqrt3 Vdc)
    case (sec)
      1: d = K * (a - b);
      2: d = K * (a + b);
      3: d = K * (2.0 * b);
      4: d = K * (-a + b);
      5: d = K * (-a - b);
      default: d = -K * (2.0 * b);
    endcase
    if (d < 0.0) d = 0.0;
    if (d > 128.0) d = 128.0;
    return 224.0 + d;
  endfunction

  task automatic apply(int sec, int va, int vb);
    real e;
    sector = sector_t'(sec);
    v_alfa = sample_t'(224 + va);
    v_beta = sample_t'(224 + vb);
    #1;
    e = expected(sec, va, vb);
    checks++;
    if (real'(out) > e + 1.0 || real'(out) < e - 1.0) begin
      failures++;
      if (failures < 10)
        $display("FAIL sector %0d va=%0d vb=%0d got %0d expected %f", sec, va, vb, out, e);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 1; s <= 6; s++) begin
      apply(s, 0, 0);
      apply(s, 128, 0);
      apply(s, 0, 128);
      apply(s, -128, 0);
      apply(s, 0, -128);
      apply(s, 64, 111);
      apply(s, -111, -64);
      for (int n = 0; n < 1000; n++)
        apply(s, int'($urandom_range(256)) - 128, int'($urandom_range(256)) - 128);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
