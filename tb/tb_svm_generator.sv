// tb_svm_generator: the generator is driven with reference vectors at angles
// spread over all six sectors (not within 1 degree of a border), with the
// sector bits worked out here from the angle and a triangle step every 4
// clocks. A model in real arithmetic tracks the carrier and predicts each
// phase one clock ahead (outputs are registered): Ta and Ta+Tb from the
// dwell-time table with T = Vdc = 256, the clamped phase and the comparison
// rule rotated per sector. Phase bits whose comparison lies within one unit
// of the carrier level are not checked. Per carrier period the clamped phase
// must not move and the phase-to-phase duty (a-b) must match
// (Va - Vb)/Vdc within the carrier's resolution.
module tb_svm_generator;
  import svpwm_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int  CE_DIV = 4;

  logic    clk = 0, clrn = 0, ce = 0;
  logic    s2, s1, s0;
  sample_t v_alfa, v_beta;
  logic    sa, sb, sc;
  int checks = 0, failures = 0, skipped = 0;
  int clamp_hi = 0, clamp_lo = 0;

  svm_generator dut (.clk(clk), .clrn(clrn), .tri_ce(ce), .s2(s2), .s1(s1), .s0(s0),
                     .v_alfa(v_alfa), .v_beta(v_beta), .sa(sa), .sb(sb), .sc(sc));

  always #5 clk = ~clk;

  int  sec, va, vb;
  int  tri_m = 224;
  logic rising = 1;
  int  cyc = 0;
  logic [2:0] exp_q;   // expected phases after the coming clock edge
  logic [2:0] care_q;

  // Model of the pattern for carrier level t (table units above 224)
  task automatic model(int t, output logic [2:0] ph, output logic [2:0] care);
    real a, b, K, x, y;
    int cl;
    logic odd;
    K = 192.0;
    a = real'(va) / 256.0;
    b = real'(vb) / ($sqrt(3.0) * 256.0);
    case (sec)
      1: begin x = K * (a - b);  y = K * (a + b);  end
      2: begin x = K * (a + b);  y = K * 2.0 * b;  end
      3: begin x = K * 2.0 * b;  y = K * (-a + b); end
      4: begin x = K * (-a + b); y = K * (-a - b); end
      5: begin x = K * (-a - b); y = -K * 2.0 * b; end
      default: begin x = -K * 2.0 * b; y = K * (a - b); end
    endcase
    odd = sec[0];
    cl  = odd ? (sec - 1) / 2 : (sec / 2 + 1) % 3;
    ph[cl] = odd;
    ph[(cl + 1) % 3] = odd ? (real'(t) > x) : !(real'(t) > x);
    ph[(cl + 2) % 3] = odd ? (real'(t) > y) : !(real'(t) > y);
    care = 3'b111;
    if (x - real'(t) < 1.0 && real'(t) - x < 1.0) care[(cl + 1) % 3] = 0;
    if (y - real'(t) < 1.0 && real'(t) - y < 1.0) care[(cl + 2) % 3] = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // carrier model and one-clock-ahead prediction
  always @(posedge clk) if (clrn) begin
    logic [2:0] ph, care;
    model(tri_m - 224, ph, care);
    exp_q  <= ph;
    care_q <= care;
    if (ce) begin
      if (rising) begin tri_m += 8; if (tri_m == 352) rising = 0; end
      else        begin tri_m -= 8; if (tri_m == 224) rising = 1; end
    end
    cyc++;
    ce <= (cyc % CE_DIV == 0);
  end

  // per-cycle comparison and per-period duty bookkeeping
  int on_a, on_b, on_c, per_cyc;
  logic [2:0] first;
  logic clamp_moved;
  logic started = 0;
  always @(negedge clk) if (clrn && started) begin
    logic [2:0] got;
    got = {sc, sb, sa};
    for (int i = 0; i < 3; i++) begin
      if (care_q[i]) begin
        checks++;
        if (got[i] != exp_q[i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0t sector %0d phase %0d got %b expected %b", $time, sec, i, got[i], exp_q[i]);
        end
      end else skipped++;
    end
  end

  task automatic run_angle(real deg);
    real th;
    int e_ab, da, db, clamp_idx;
    logic clamp_val, moved;
    th  = deg * PI / 180.0;
    @(negedge clk);
    va  = $rtoi(128.0 * $cos(th) + 128.5) - 128;
    vb  = $rtoi(128.0 * $sin(th) + 128.5) - 128;
    sec = int'($floor(deg / 60.0)) + 1;
    v_alfa = sample_t'(224 + va);
    v_beta = sample_t'(224 + vb);
    {s2, s1, s0} = 3'(sec);
    started = 1;
    // let the change pass, then measure one full carrier period
    repeat (32 * CE_DIV + 2) @(negedge clk);
    on_a = 0; on_b = 0; on_c = 0; per_cyc = 0;
    clamp_idx = (sec % 2 == 1) ? (sec - 1) / 2 : (sec / 2 + 1) % 3;
    clamp_val = sec[0];
    moved = 0;
    repeat (32 * CE_DIV) begin
      on_a += sa; on_b += sb; on_c += sc; per_cyc++;
      if ({sc, sb, sa}[clamp_idx] != clamp_val) moved = 1;
      @(negedge clk);
    end
    checks++;
    if (moved) begin failures++; $display("FAIL sector %0d: clamped phase switched", sec); end
    else if (clamp_val) clamp_hi++; else clamp_lo++;
    // line voltage a-b: duty difference against (Va - Vb)/Vdc
    begin
      real d_meas, d_ideal, vbph;
      vbph    = real'(-va) / 2.0 + $sqrt(3.0) / 2.0 * real'(vb);
      d_ideal = (real'(va) - vbph) / 256.0;
      d_meas  = real'(on_a - on_b) / real'(per_cyc);
      checks++;
      if (d_meas - d_ideal > 0.135 || d_ideal - d_meas > 0.135) begin
        failures++;
        $display("FAIL angle %f: a-b duty %f, ideal %f", deg, d_meas, d_ideal);
      end
    end
  endtask

  initial begin
    v_alfa = 9'd224; v_beta = 9'd224; {s2, s1, s0} = 3'd1;
    repeat (3) @(posedge clk);
    clrn = 1;
    for (int s = 0; s < 6; s++) begin
      run_angle(60.0 * s + 1.5);
      run_angle(60.0 * s + 30.0);
      run_angle(60.0 * s + 58.5);
      for (int n = 0; n < 4; n++) run_angle(60.0 * s + 2.0 + real'($urandom_range(56)));
    end
    checks += 2;
    if (clamp_hi == 0) begin failures++; $display("FAIL no clamp-high period"); end
    if (clamp_lo == 0) begin failures++; $display("FAIL no clamp-low period"); end
    $display("clamp-high periods %0d, clamp-low periods %0d, unchecked bits %0d", clamp_hi, clamp_lo, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
