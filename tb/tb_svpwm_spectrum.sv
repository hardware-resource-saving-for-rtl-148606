// tb_svpwm_spectrum: line-voltage spectrum of the complete generator at its
// default parameters. After one settling turn, the phase-to-phase switching
// function v_ab = sa - sb (in units of Vdc, before dead time) is recorded
// for exactly one reference period, starting when the sine table wraps to
// angle 0. A discrete Fourier transform over that window gives the
// fundamental and the harmonics 2..25. Expected, worked out here:
//   fundamental amplitude = sqrt(3) * 128 / 256 = 0.866 of Vdc (table
//   amplitude 128 against Vdc = 256 table units), leading the reference
//   (cosine) by 30 degrees; every low-order harmonic small, the triplen ones
//   cancelled in the line voltage.
// Limits: fundamental within 2 %, phase within 2 degrees, each harmonic below
// 3 % of the fundamental, total harmonic distortion up to the 25th below 5 %.
module tb_svpwm_spectrum;
  localparam real PI = 3.14159265358979323846;
  localparam int  NH = 25;

  logic clk = 0, clrn = 1;
  logic sector2, sector1, sector0;
  logic sa_up, sa_lw, sb_up, sb_lw, sc_up, sc_lw;

  svpwm_top dut (
    .clk(clk), .clrn(clrn),
    .sector2(sector2), .sector1(sector1), .sector0(sector0),
    .sa_up(sa_up), .sa_lw(sa_lw), .sb_up(sb_up), .sb_lw(sb_lw),
    .sc_up(sc_up), .sc_lw(sc_lw)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real re [1:NH];
  real im [1:NH];

  initial begin
    int  div_sin, n_win;
    real amp [1:NH];
    real ph1, thd, expected;
    div_sin = $rtoi(33333333.0 / (50.0 * 360.0) + 0.5);
    n_win   = 360 * div_sin;
    for (int h = 1; h <= NH; h++) begin re[h] = 0.0; im[h] = 0.0; end
    #1 clrn = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) clrn = 1;
    // settle for one turn, then align to the table returning to angle 0
    repeat (360 * div_sin / 2) @(posedge clk);
    @(posedge clk iff (dut.inst1.ce && dut.inst1.addr == 9'd359));
    @(negedge clk);
    for (int n = 0; n < n_win; n++) begin
      real v, w;
      v = real'(int'(dut.inst4.sa) - int'(dut.inst4.sb));
      w = 2.0 * PI * real'(n) / real'(n_win);
      for (int h = 1; h <= NH; h++) begin
        re[h] += v * $cos(h * w);
        im[h] += v * $sin(h * w);
      end
      @(negedge clk);
    end
    thd = 0.0;
    for (int h = 1; h <= NH; h++) begin
      amp[h] = 2.0 * $sqrt(re[h] * re[h] + im[h] * im[h]) / real'(n_win);
      if (h > 1) thd += amp[h] * amp[h];
    end
    thd = $sqrt(thd) / amp[1];
    // phase of the fundamental relative to cos(wt): v = A cos(wt - phi)
    ph1 = $atan2(im[1], re[1]) * 180.0 / PI;
    expected = $sqrt(3.0) * 128.0 / 256.0;
    $display("fundamental %f of Vdc (expected %f), leads the reference by %f deg (expected 30)",
             amp[1], expected, -ph1);
    for (int h = 2; h <= NH; h++)
      $display("harmonic %0d: %f %% of fundamental", h, 100.0 * amp[h] / amp[1]);
    $display("THD up to harmonic %0d: %f %%", NH, 100.0 * thd);

    checks++;
    if (amp[1] < 0.98 * expected || amp[1] > 1.02 * expected) begin
      failures++; $display("FAIL fundamental amplitude");
    end
    checks++;
    if (ph1 + 30.0 > 2.0 || ph1 + 30.0 < -2.0) begin
      failures++; $display("FAIL fundamental phase");
    end
    for (int h = 2; h <= NH; h++) begin
      checks++;
      if (amp[h] > 0.03 * amp[1]) begin failures++; $display("FAIL harmonic %0d too large", h); end
    end
    checks++;
    if (thd > 0.05) begin failures++; $display("FAIL THD"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
