// vbeta_valfa: sine/cosine reference generator.
//
// A phase counter walks through LUT_DEPTH (360) addresses, one per electrical
// degree, advancing on each ce pulse (cksin). Two read-only tables give
// vbeta_sin = 224 + round(128 sin k) and valfa_cos = 224 + round(128 cos k),
// spanning 96..352 as in the published design; no trigonometry is computed in
// hardware, the tables are filled at elaboration. The table read is
// registered: the outputs change one clock after the address, and the address
// advances one clock after ce. After clrn the address is 0 (angle 0) and the
// outputs hold the angle-0 values. The rounding of table entries and the
// registered read are this implementation's choices.
module vbeta_valfa
  import svpwm_pkg::*;
(
  input  logic    clk,
  input  logic    clrn,        // active-low asynchronous clear
  input  logic    ce,          // step enable (cksin)
  output sample_t vbeta_sin,   // V_beta
  output sample_t valfa_cos    // V_alpha
);

  localparam int AW = $clog2(LUT_DEPTH);

  function automatic sample_t table_entry(int k, bit cosine);
    real ang, v;
    ang = 2.0 * 3.14159265358979323846 * real'(k) / real'(LUT_DEPTH);
    v   = cosine ? $cos(ang) : $sin(ang);
    v   = real'(REF_BASE) + real'(REF_AMP) * v;
    return sample_t'($rtoi(v + 0.5));  // v >= 96, so truncation rounds
  endfunction

  sample_t sin_rom [LUT_DEPTH];
  sample_t cos_rom [LUT_DEPTH];

  initial begin
    for (int k = 0; k < LUT_DEPTH; k++) begin
      sin_rom[k] = table_entry(k, 1'b0);
      cos_rom[k] = table_entry(k, 1'b1);
      assert (sin_rom[k] >= sample_t'(REF_LOW) && sin_rom[k] <= sample_t'(REF_HIGH))
        else $error("vbeta_valfa: table entry %0d out of range", k);
    end
  end

  logic [AW-1:0] addr;

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn)                                  addr <= '0;
    else if (ce && addr == AW'(LUT_DEPTH - 1))  addr <= '0;
    else if (ce)                                addr <= addr + 1'b1;
  end

  // Registered table read (no reset: memory output register)
  always_ff @(posedge clk) begin
    vbeta_sin <= sin_rom[addr];
    valfa_cos <= cos_rom[addr];
  end

endmodule
