// pulse_timer: RF pulse bookkeeping.
//
// Registers the RF gate from the timing system (pulse_on), emits a one-clock
// pulse_start strobe on its rising edge, and counts clocks since that edge
// (count, saturating at its maximum). settled rises once count has reached
// settle_cycles and stays high until the gate falls. The tuning loop uses
// settled so that it acts only during the pulse after the cavity field has
// settled, which keeps the tuner from hunting on the filling transient.
//
// Timing: pulse_on, pulse_start and count change one clock after rf_gate;
// count is 0 in the clock of pulse_start; settled is high from the clock in
// which count equals settle_cycles. A CW of 20 bits covers the longest pulse
// of 2 ms (208,000 clocks at 104 MHz). Detecting "settled" by a programmable
// delay is this design's choice.
module pulse_timer #(
  parameter int unsigned CW = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rf_gate,
  input  logic [CW-1:0] settle_cycles,
  output logic          pulse_on,
  output logic          pulse_start,
  output logic          settled,
  output logic [CW-1:0] count
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pulse_on    <= 1'b0;
      pulse_start <= 1'b0;
      count       <= '0;
    end else begin
      pulse_on    <= rf_gate;
      pulse_start <= rf_gate && !pulse_on;
      if (rf_gate && !pulse_on)  count <= '0;
      else if (rf_gate && count != '1) count <= count + 1'b1;
    end
  end

  assign settled = pulse_on && (count >= settle_cycles);
endmodule
