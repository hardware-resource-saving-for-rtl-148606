// ajust_freq: clock dividers for the SV-PWM generator.
//
// Two free-running modulo counters divide the system clock. cksin pulses
// F_REF_HZ * LUT_DEPTH times a second (18 kHz for a 50 Hz reference and a
// 360-entry table) and steps the sine/cosine table; cktri pulses
// F_CARRIER_HZ * TRI_SAMPLES times a second (1.28 MHz for a 40 kHz carrier
// sampled 32 times) and steps the triangle. Both outputs are one-cycle-wide
// clock enables in the clk domain, high on the last cycle of each division
// period. Divisors are rounded to the nearest integer, so the actual rates
// are CLK_HZ / DIV. The 40 kHz and 50 Hz targets come from the published
// design; the board clock frequency, the enable style and the clear input
// are this implementation's choices.
module ajust_freq
  import svpwm_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 33_333_333,
  parameter int unsigned F_CARRIER_HZ = 40_000,
  parameter int unsigned F_REF_HZ     = 50
) (
  input  logic clk,
  input  logic clrn,    // active-low asynchronous clear
  output logic cksin,   // table step enable
  output logic cktri    // triangle step enable
);

  localparam int unsigned SIN_RATE = F_REF_HZ * LUT_DEPTH;
  localparam int unsigned TRI_RATE = F_CARRIER_HZ * TRI_SAMPLES;
  localparam int unsigned DIV_SIN  = (CLK_HZ + SIN_RATE / 2) / SIN_RATE;
  localparam int unsigned DIV_TRI  = (CLK_HZ + TRI_RATE / 2) / TRI_RATE;
  localparam int SIN_W = $clog2(DIV_SIN + 1);
  localparam int TRI_W = $clog2(DIV_TRI + 1);

  initial begin
    assert (DIV_SIN >= 2 && DIV_TRI >= 2)
      else $error("ajust_freq: CLK_HZ too low for the requested rates");
  end

  logic [SIN_W-1:0] sin_cnt;
  logic [TRI_W-1:0] tri_cnt;

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) begin
      sin_cnt <= '0;
      cksin   <= 1'b0;
    end else begin
      cksin <= (sin_cnt == SIN_W'(DIV_SIN - 2));
      if (sin_cnt == SIN_W'(DIV_SIN - 1)) sin_cnt <= '0;
      else                                sin_cnt <= sin_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) begin
      tri_cnt <= '0;
      cktri   <= 1'b0;
    end else begin
      cktri <= (tri_cnt == TRI_W'(DIV_TRI - 2));
      if (tri_cnt == TRI_W'(DIV_TRI - 1)) tri_cnt <= '0;
      else                                tri_cnt <= tri_cnt + 1'b1;
    end
  end

endmodule
