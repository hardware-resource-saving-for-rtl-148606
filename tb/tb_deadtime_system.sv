// tb_deadtime_system: drives the three phase inputs with random pulse
// widths, some shorter than the dead time, and compares the six gates every
// clock with a model: a gate is on when its phase level has been sampled
// unchanged for at least DEAD_CYCLES clocks since the last change (or since
// reset). Also checks that the upper and lower gates of a leg are never on
// together and that every both-off interval lasts at least DEAD_CYCLES.
module tb_deadtime_system;
  localparam int D = 33;

  logic clk = 0, clrn = 0;
  logic [2:0] s = 3'b000;   // {sa, sb, sc}
  logic [2:0] up, lw;
  int checks = 0, failures = 0, insertions = 0, short_pulses = 0;

  deadtime_system dut (
    .clk(clk), .clrn(clrn), .sa(s[2]), .sb(s[1]), .sc(s[0]),
    .sa_up(up[2]), .sa_lw(lw[2]), .sb_up(up[1]), .sb_lw(lw[1]),
    .sc_up(up[0]), .sc_lw(lw[0])
  );

  always #5 clk = ~clk;

  int cnt [3];
  logic [2:0] prev;
  int off_len [3];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model, updated with the same sampling as the block
  always @(posedge clk or negedge clrn) begin
    if (!clrn) begin
      prev = 3'b000;
      for (int i = 0; i < 3; i++) begin cnt[i] = 0; off_len[i] = -1000000; end
    end else begin
      for (int i = 0; i < 3; i++) begin
        if (s[i] != prev[i]) begin
          if (cnt[i] < D) short_pulses++;
          cnt[i] = 0;
        end else cnt[i]++;
      end
      prev = s;
    end
  end

  always @(negedge clk) if (clrn) begin
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (up[i] != (prev[i] && cnt[i] >= D) || lw[i] != (!prev[i] && cnt[i] >= D)) begin
        failures++;
        if (failures < 10)
          $display("FAIL leg %0d at %0t: up=%b lw=%b s=%b cnt=%0d", i, $time, up[i], lw[i], prev[i], cnt[i]);
      end
      if (up[i] && lw[i]) begin failures++; $display("FAIL shoot-through leg %0d", i); end
      if (!up[i] && !lw[i]) off_len[i]++;
      else begin
        if (off_len[i] > 0) begin
          insertions++;
          checks++;
          if (off_len[i] < D) begin failures++; $display("FAIL dead time %0d cycles", off_len[i]); end
        end
        off_len[i] = 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    clrn = 1;
    for (int n = 0; n < 300; n++) begin
      int i;
      i = int'($urandom_range(2));
      @(negedge clk);
      s[i] = ~s[i];
      repeat ($urandom_range(3 * D)) @(negedge clk);
    end
    repeat (2 * D) @(negedge clk);
    checks += 2;
    if (insertions < 50) begin failures++; $display("FAIL only %0d dead-time insertions", insertions); end
    if (short_pulses == 0) begin failures++; $display("FAIL no pulse shorter than the dead time"); end
    $display("dead-time insertions %0d, short pulses %0d", insertions, short_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
