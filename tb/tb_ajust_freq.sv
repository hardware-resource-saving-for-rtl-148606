// tb_ajust_freq: measures the spacing of cksin and cktri pulses at the
// default 33.333 MHz clock. Each pulse must be one cycle wide, the spacing
// must equal the rounded divisor CLK_HZ/(rate) computed here in real
// arithmetic, and the resulting carrier (cktri/32) and reference
// (cksin/360) frequencies must be within 0.5 % of 40 kHz and 50 Hz.
module tb_ajust_freq;
  logic clk = 0, clrn = 0;
  logic cksin, cktri;
  int checks = 0, failures = 0;

  localparam real CLK = 33333333.0;

  ajust_freq dut (.clk(clk), .clrn(clrn), .cksin(cksin), .cktri(cktri));

  always #5 clk = ~clk;

  int cyc = 0, last_sin = -1, last_tri = -1, n_sin = 0, n_tri = 0;
  int div_sin, div_tri;
  logic cksin_q = 0, cktri_q = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (clrn) begin
    cyc++;
    cksin_q <= cksin;
    cktri_q <= cktri;
    if (cksin && cksin_q) begin failures++; $display("FAIL cksin wider than one cycle"); end
    if (cktri && cktri_q) begin failures++; $display("FAIL cktri wider than one cycle"); end
    if (cksin) begin
      if (last_sin >= 0) begin
        checks++;
        if (cyc - last_sin != div_sin) begin
          failures++; $display("FAIL cksin spacing %0d expected %0d", cyc - last_sin, div_sin);
        end
      end
      last_sin = cyc; n_sin++;
    end
    if (cktri) begin
      if (last_tri >= 0) begin
        checks++;
        if (cyc - last_tri != div_tri) begin
          failures++; $display("FAIL cktri spacing %0d expected %0d", cyc - last_tri, div_tri);
        end
      end
      last_tri = cyc; n_tri++;
    end
  end

  initial begin
    real f_car, f_ref;
    div_sin = $rtoi(CLK / (50.0 * 360.0) + 0.5);
    div_tri = $rtoi(CLK / (40000.0 * 32.0) + 0.5);
    repeat (3) @(posedge clk);
    clrn = 1;
    repeat (div_sin * 20 + 10) @(posedge clk);
    f_car = CLK / real'(div_tri * 32);
    f_ref = CLK / real'(div_sin * 360);
    $display("carrier %f Hz, reference %f Hz", f_car, f_ref);
    checks += 4;
    if (f_car < 39800.0 || f_car > 40200.0) failures++;
    if (f_ref < 49.75 || f_ref > 50.25) failures++;
    if (n_sin < 20) begin failures++; $display("FAIL only %0d cksin pulses", n_sin); end
    if (n_tri < 20 * div_sin / div_tri - 2) begin failures++; $display("FAIL only %0d cktri pulses", n_tri); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
