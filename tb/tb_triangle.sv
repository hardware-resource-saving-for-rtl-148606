// tb_triangle: the carrier must step 224, 232, ..., 352, ..., 232 and repeat,
// one step per ce pulse, holding between pulses; period 32 samples.
module tb_triangle;
  import svpwm_pkg::*;

  logic    clk = 0, clrn = 0, ce = 0;
  sample_t tri_out;
  int checks = 0, failures = 0;
  int idx;          // position in the 32-sample period
  int periods = 0;

  triangle dut (.clk(clk), .clrn(clrn), .ce(ce), .tri_out(tri_out));

  always #5 clk = ~clk;

  function automatic int level(int i);
    return (i <= 16) ? 224 + 8 * i : 224 + 8 * (32 - i);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    clrn = 1;
    @(negedge clk);
    checks++;
    if (tri_out != 9'd224) begin failures++; $display("FAIL reset value %0d", tri_out); end
    idx = 0;
    for (int n = 0; n < 32 * 5; n++) begin
      // hold for a random number of cycles without ce
      repeat ($urandom_range(3)) begin
        @(negedge clk);
        checks++;
        if (int'(tri_out) != level(idx)) begin failures++; $display("FAIL hold %0d exp %0d", tri_out, level(idx)); end
      end
      ce = 1;
      @(negedge clk);
      ce = 0;
      idx = (idx + 1) % 32;
      if (idx == 0) periods++;
      checks++;
      if (int'(tri_out) != level(idx)) begin
        failures++;
        $display("FAIL step %0d: %0d expected %0d", n, tri_out, level(idx));
      end
    end
    checks++;
    if (periods != 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
