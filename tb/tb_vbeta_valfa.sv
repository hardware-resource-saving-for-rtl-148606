// tb_vbeta_valfa: steps the reference tables through two full turns (720
// ce pulses at random spacing) and compares every output pair with
// 224 + round(128 sin k) and 224 + round(128 cos k) computed here. Also
// checks the table extremes 96 and 352 and that outputs hold between pulses.
// Output timing: ce at clock n moves the address at n, the data at n+1.
module tb_vbeta_valfa;
  import svpwm_pkg::*;

  logic    clk = 0, clrn = 0, ce = 0;
  sample_t vbeta_sin, valfa_cos;
  int checks = 0, failures = 0;
  int mn = 1000, mx = -1;

  vbeta_valfa dut (.clk(clk), .clrn(clrn), .ce(ce),
                   .vbeta_sin(vbeta_sin), .valfa_cos(valfa_cos));

  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979323846;

  task automatic check_angle(int k);
    int es, ec;
    es = $rtoi(224.0 + 128.0 * $sin(2.0 * PI * k / 360.0) + 0.5);
    ec = $rtoi(224.0 + 128.0 * $cos(2.0 * PI * k / 360.0) + 0.5);
    checks++;
    if (int'(vbeta_sin) != es || int'(valfa_cos) != ec) begin
      failures++;
      if (failures < 10)
        $display("FAIL angle %0d: sin %0d cos %0d expected %0d %0d", k, vbeta_sin, valfa_cos, es, ec);
    end
    if (int'(vbeta_sin) < mn) mn = int'(vbeta_sin);
    if (int'(vbeta_sin) > mx) mx = int'(vbeta_sin);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    clrn = 1;
    repeat (2) @(negedge clk);
    check_angle(0);
    for (int n = 1; n <= 720; n++) begin
      ce = 1;
      @(negedge clk);
      ce = 0;
      @(negedge clk);
      check_angle(n % 360);
      repeat ($urandom_range(3)) begin
        @(negedge clk);
        check_angle(n % 360);
      end
    end
    checks += 2;
    if (mn != 96)  begin failures++; $display("FAIL minimum %0d", mn); end
    if (mx != 352) begin failures++; $display("FAIL maximum %0d", mx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
