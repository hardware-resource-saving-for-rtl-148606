// tb_svpwm_top: end-to-end run of the complete generator at its default
// parameters (33.333 MHz clock, 40 kHz carrier, 50 Hz reference, 33-cycle
// dead time) for two full reference periods (about 40 ms of operation).
// Checked against values worked out here:
//  - the sector output walks I, II, ..., VI, I in order, each sector lasting
//    60 table steps, and a reference period is 360 table steps (50 Hz);
//  - the triangle period is 32 triangle steps (40 kHz);
//  - in every carrier period that lies within one sector, the clamped phase
//    of that sector stays at 1 (odd sectors) or 0 (even sectors), at most
//    four phase edges occur when the reference did not move, and the a-b
//    duty matches the reference line voltage within the carrier's resolution;
//  - the gate pairs are never on together, every both-off gap lasts at least
//    the dead time, and an upper (lower) gate is only on while its phase is 1 (0).
// Each mechanism (every sector, clamp high, clamp low, dead-time insertion,
// table wrap-around) must occur at least once.
module tb_svpwm_top;
  localparam real CLK_HZ = 33333333.0;
  localparam int  DEAD   = 33;
  localparam real PI     = 3.14159265358979323846;

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
  int div_sin, div_tri;
  longint cyc = 0;

  // mechanism counters
  int seen_sector [1:6];
  int clamp_hi = 0, clamp_lo = 0, dead_insertions = 0, wraps = 0, carrier_periods = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  initial begin
    repeat (1_500_000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sector sequence and reference period ----------------
  int     cur_sec = 0;
  longint sec_start = -1, last_sector1 = -1;
  logic   sec_valid = 0;
  always @(negedge clk) if (clrn && cyc > 4) begin
    int s;
    s = int'({sector2, sector1, sector0});
    if (s != cur_sec) begin
      if (sec_valid) begin
        checks++;
        if (s != (cur_sec % 6) + 1) fail($sformatf("sector %0d followed by %0d", cur_sec, s));
        if (sec_start >= 0) begin
          longint len;
          len = cyc - sec_start;
          checks++;
          if (len < 59 * div_sin || len > 61 * div_sin)
            fail($sformatf("sector %0d lasted %0d cycles", cur_sec, len));
        end
        sec_start = cyc;
        if (s == 1) begin
          if (last_sector1 >= 0) begin
            checks++;
            wraps++;
            if (cyc - last_sector1 != 360 * div_sin)
              fail($sformatf("reference period %0d cycles, expected %0d", cyc - last_sector1, 360 * div_sin));
          end
          last_sector1 = cyc;
        end
      end
      sec_valid = 1;
      cur_sec = s;
      if (s >= 1 && s <= 6) seen_sector[s]++;
      else fail($sformatf("sector code %0d", s));
    end
  end

  // ---------------- carrier periods: clamp, edges, duty ----------------
  logic [8:0] tri_prev = 9'd224;
  longint     valley_at = -1;
  int         on_a, on_b, per_len, edges, per_sec;
  logic       per_mixed, clamp_bad, ref_moved;
  int         stable_periods = 0;
  logic [2:0] ph_prev;
  int         va0, vb0;

  always @(negedge clk) if (clrn && cyc > 4) begin
    logic [8:0] t;
    logic [2:0] ph;   // {c, b, a}
    int s;
    t  = dut.inst4.u_triangle.tri_out;
    ph = {dut.inst4.sc, dut.inst4.sb, dut.inst4.sa};
    s  = int'({sector2, sector1, sector0});
    if (t == 9'd224 && tri_prev != 9'd224) begin
      // a new carrier period starts
      if (valley_at >= 0) begin
        checks++;
        carrier_periods++;
        if (cyc - valley_at != 32 * div_tri)
          fail($sformatf("carrier period %0d cycles, expected %0d", cyc - valley_at, 32 * div_tri));
        if (!per_mixed && per_len > 0) begin
          real d_meas, d_ideal, vbph;
          checks += 3;
          if (clamp_bad) fail($sformatf("sector %0d: clamped phase moved", per_sec));
          else if (per_sec % 2 == 1) clamp_hi++;
          else clamp_lo++;
          // with the reference held for the whole period, two phases switch twice
          if (!ref_moved) begin
            stable_periods++;
            if (edges > 4) fail($sformatf("%0d phase edges in one carrier period", edges));
          end
          vbph    = -real'(va0) / 2.0 + $sqrt(3.0) / 2.0 * real'(vb0);
          d_ideal = (real'(va0) - vbph) / 256.0;
          d_meas  = real'(on_a - on_b) / real'(per_len);
          if (d_meas - d_ideal > 0.14 || d_ideal - d_meas > 0.14)
            fail($sformatf("a-b duty %f, ideal %f (sector %0d)", d_meas, d_ideal, per_sec));
        end
      end
      valley_at = cyc;
      on_a = 0; on_b = 0; per_len = 0; edges = 0;
      per_sec = s; per_mixed = 0; clamp_bad = 0; ref_moved = 0;
      va0 = int'(dut.inst1.valfa_cos) - 224;
      vb0 = int'(dut.inst1.vbeta_sin) - 224;
    end else if (valley_at >= 0) begin
      int cl;
      if (s != per_sec) per_mixed = 1;
      if (int'(dut.inst1.valfa_cos) - 224 != va0 || int'(dut.inst1.vbeta_sin) - 224 != vb0) ref_moved = 1;
      cl = (per_sec % 2 == 1) ? (per_sec - 1) / 2 : (per_sec / 2 + 1) % 3;
      if (ph[cl] != per_sec[0]) clamp_bad = 1;
      for (int i = 0; i < 3; i++) if (ph[i] != ph_prev[i]) edges++;
    end
    if (valley_at >= 0) begin
      on_a += ph[0]; on_b += ph[1]; per_len++;
    end
    tri_prev = t;
    ph_prev  = ph;
  end

  // ---------------- gates: shoot-through, dead time, polarity ----------------
  int off_len [3];
  logic [2:0] ph_q;
  always @(negedge clk) if (clrn && cyc > 4) begin
    logic [2:0] up, lw;
    up = {sc_up, sb_up, sa_up};
    lw = {sc_lw, sb_lw, sa_lw};
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (up[i] && lw[i]) fail($sformatf("leg %0d upper and lower on", i));
      if (up[i] && !ph_q[i]) fail($sformatf("leg %0d upper on while phase is 0", i));
      if (lw[i] && ph_q[i])  fail($sformatf("leg %0d lower on while phase is 1", i));
      if (!up[i] && !lw[i]) off_len[i]++;
      else begin
        if (off_len[i] > 0) begin
          dead_insertions++;
          if (off_len[i] < DEAD) fail($sformatf("leg %0d dead time %0d cycles", i, off_len[i]));
        end
        off_len[i] = 0;
      end
    end
    ph_q = {dut.inst4.sc, dut.inst4.sb, dut.inst4.sa};
  end

  always @(posedge clk) cyc++;

  initial begin
    for (int s = 1; s <= 6; s++) seen_sector[s] = 0;
    for (int i = 0; i < 3; i++) off_len[i] = -1_000_000;  // ignore the gap after reset
    div_sin = $rtoi(CLK_HZ / (50.0 * 360.0) + 0.5);
    div_tri = $rtoi(CLK_HZ / (40000.0 * 32.0) + 0.5);
    #1 clrn = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) clrn = 1;
    repeat (2 * 360 * div_sin + 5 * div_sin) @(posedge clk);

    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (seen_sector[s] < 2) fail($sformatf("sector %0d seen %0d times", s, seen_sector[s]));
    end
    checks += 5;
    if (stable_periods == 0) fail("no carrier period with a steady reference");
    if (clamp_hi == 0) fail("no carrier period clamped high");
    if (clamp_lo == 0) fail("no carrier period clamped low");
    if (dead_insertions == 0) fail("no dead-time insertion");
    if (wraps == 0) fail("reference table never wrapped");
    $display("carrier periods %0d (%0d clamped high, %0d clamped low), dead-time insertions %0d, reference periods %0d",
             carrier_periods, clamp_hi, clamp_lo, dead_insertions, wraps);
    $display("carrier %f Hz, reference %f Hz", CLK_HZ / real'(32 * div_tri), CLK_HZ / real'(360 * div_sin));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
