// tb_svm_pattern: checks the bus-clamping pattern with a rotation rule
// written independently of the block's case table. Phases are numbered
// a=0, b=1, c=2. In odd sector k the clamped-high phase is (k-1)/2; in even
// sector k the clamped-low phase is (k/2+1) mod 3. The phase after the clamped
// one (mod 3) follows triangle > Ta and the next one triangle > Ta+Tb, both
// inverted in even sectors.
module tb_svm_pattern;
  import svpwm_pkg::*;

  sector_t sector;
  sample_t tri_in, ta, tatb;
  logic    sa, sb, sc;
  int checks = 0, failures = 0;

  svm_pattern dut (.sector(sector), .tri_in(tri_in), .ta(ta), .tatb(tatb),
                   .sa(sa), .sb(sb), .sc(sc));

  function automatic logic [2:0] expected(int k, int t, int x, int y);
    logic [2:0] ph;   // ph[0]=a, ph[1]=b, ph[2]=c
    int cl;
    logic odd, c1, c2;
    odd = k[0];
    cl  = odd ? (k - 1) / 2 : (k / 2 + 1) % 3;
    c1  = t > x;
    c2  = t > y;
    ph[cl]          = odd;
    ph[(cl + 1) % 3] = odd ? c1 : !c1;
    ph[(cl + 2) % 3] = odd ? c2 : !c2;
    return ph;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] e;
    for (int k = 1; k <= 6; k++) begin
      for (int n = 0; n < 2000; n++) begin
        sector = sector_t'(k);
        tri_in = sample_t'(224 + 8 * $urandom_range(16));
        ta     = sample_t'(224 + $urandom_range(128));
        tatb   = sample_t'(ta + $urandom_range(352 - int'(ta)));
        #1;
        e = expected(k, tri_in, ta, tatb);
        checks++;
        if ({sc, sb, sa} != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL sector %0d tri=%0d ta=%0d tatb=%0d abc=%b%b%b expected %b%b%b",
                     k, tri_in, ta, tatb, sa, sb, sc, e[0], e[1], e[2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
