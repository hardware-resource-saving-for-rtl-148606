// triangle: symmetric triangle carrier for the SV-PWM comparators.
//
// The carrier takes TRI_SAMPLES (32) samples per period, rising from TRI_LOW
// (224) to TRI_HIGH (352) in steps of TRI_STEP (8) and falling back:
// 224, 232, ..., 352, 344, ..., 232, then 224 again. One sample is taken per
// ce pulse (cktri), so the carrier frequency is the ce rate / 32. Levels and
// sample count follow the published design; after clrn the carrier sits at
// 224 and rises, which is this implementation's choice.
module triangle
  import svpwm_pkg::*;
(
  input  logic    clk,
  input  logic    clrn,     // active-low asynchronous clear
  input  logic    ce,       // step enable (cktri)
  output sample_t tri_out
);

  logic rising;

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) begin
      tri_out <= sample_t'(TRI_LOW);
      rising  <= 1'b1;
    end else if (ce) begin
      if (rising) begin
        tri_out <= tri_out + sample_t'(TRI_STEP);
        if (tri_out == sample_t'(TRI_HIGH - TRI_STEP)) rising <= 1'b0;
      end else begin
        tri_out <= tri_out - sample_t'(TRI_STEP);
        if (tri_out == sample_t'(TRI_LOW + TRI_STEP)) rising <= 1'b1;
      end
    end
  end

endmodule
