// deadtime_system: complementary gate signals with dead time.
//
// For each inverter leg the phase signal s (1 = upper switch on) becomes an
// upper gate s_up and a lower gate s_lw. When s changes, both gates go off at
// once and the newly requested gate turns on only after s has been stable for
// DEAD_CYCLES clocks, so the two switches of a leg are never on together and
// each turn-on is delayed by the dead time (turn-off is immediate). A per-leg
// counter measures how long s has been stable. After clrn all gates are off
// for the first dead time. The published design names this stage and its
// ports only; the rising-edge-delay method and the default of 33 cycles
// (1 us at 33.333 MHz) are this implementation's choices.
module deadtime_system #(
  parameter int unsigned DEAD_CYCLES = 33
) (
  input  logic clk,
  input  logic clrn,    // active-low asynchronous clear
  input  logic sa,
  input  logic sb,
  input  logic sc,
  output logic sa_up,
  output logic sa_lw,
  output logic sb_up,
  output logic sb_lw,
  output logic sc_up,
  output logic sc_lw
);

  localparam int CW = $clog2(DEAD_CYCLES + 1);

  logic [2:0]    s_in, s_q, up, lw;
  logic [CW-1:0] stable [3];

  assign s_in = {sa, sb, sc};

  for (genvar i = 0; i < 3; i++) begin : g_leg
    always_ff @(posedge clk or negedge clrn) begin
      if (!clrn) begin
        s_q[i]    <= 1'b0;
        stable[i] <= '0;
        up[i]     <= 1'b0;
        lw[i]     <= 1'b0;
      end else begin
        s_q[i] <= s_in[i];
        if (s_in[i] != s_q[i]) begin
          stable[i] <= '0;
          up[i]     <= 1'b0;
          lw[i]     <= 1'b0;
        end else begin
          if (stable[i] != CW'(DEAD_CYCLES)) stable[i] <= stable[i] + 1'b1;
          up[i] <= s_q[i]  && (stable[i] >= CW'(DEAD_CYCLES - 1));
          lw[i] <= !s_q[i] && (stable[i] >= CW'(DEAD_CYCLES - 1));
        end
      end
    end

    // The two gates of a leg are never on together
    assert property (@(posedge clk) disable iff (!clrn) !(up[i] && lw[i]));
  end

  assign {sa_up, sb_up, sc_up} = up;
  assign {sa_lw, sb_lw, sc_lw} = lw;

endmodule
