// tb_find_sector: sector identification against the vector angle.
// Inputs are the 360 sine/cosine table points and random vectors; the
// expected sector is floor(angle/60)+1 with the angle from atan2 in real
// arithmetic. Vectors within 0.2 degrees of a sector border, or shorter than
// 4 units, are skipped because a border point may fall either way.
module tb_find_sector;
  import svpwm_pkg::*;

  sample_t v_beta, v_alfa;
  logic    s2, s1, s0;
  int checks = 0, failures = 0, skipped = 0;
  int seen [1:6];

  find_sector dut (.v_beta(v_beta), .v_alfa(v_alfa),
                   .sector2(s2), .sector1(s1), .sector0(s0));

  localparam real PI = 3.14159265358979323846;

  task automatic apply(int va, int vb);
    real ang, rem;
    int  exp_sec, got;
    v_alfa = sample_t'(224 + va);
    v_beta = sample_t'(224 + vb);
    #1;
    if (va * va + vb * vb < 16) begin skipped++; return; end
    ang = $atan2(real'(vb), real'(va)) * 180.0 / PI;
    if (ang < 0.0) ang += 360.0;
    rem = ang - 60.0 * $floor(ang / 60.0);
    if (rem < 0.2 || rem > 59.8) begin skipped++; return; end
    exp_sec = int'($floor(ang / 60.0)) + 1;
    got = int'({s2, s1, s0});
    checks++;
    seen[exp_sec]++;
    if (got != exp_sec) begin
      failures++;
      if (failures < 10)
        $display("FAIL va=%0d vb=%0d angle=%f sector=%0d expected %0d", va, vb, ang, got, exp_sec);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 1; s <= 6; s++) seen[s] = 0;
    for (int k = 0; k < 360; k++)
      apply($rtoi(128.0 * $cos(2.0 * PI * k / 360.0) + 128.5) - 128,
            $rtoi(128.0 * $sin(2.0 * PI * k / 360.0) + 128.5) - 128);
    for (int n = 0; n < 5000; n++)
      apply(int'($urandom_range(256)) - 128, int'($urandom_range(256)) - 128);
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL sector %0d never tested", s); end
    end
    $display("skipped %0d border points", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
