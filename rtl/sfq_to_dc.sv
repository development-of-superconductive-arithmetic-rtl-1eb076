// TFF-type SFQ-to-DC output monitor.
//
// Every SFQ pulse on the input flips the monitor's DC voltage state, so a
// steady stream of pulses (one per clock) shows as a level that toggles every
// period, and no pulses leave the level where it was. On a slow oscilloscope
// the first averages to a single line and the second shows as a "0"/"1"
// double line: this is how the high-speed eye-diagram tests read the outputs.
//
// Interface: clk, rst_n (asynchronous, active low: starts the state at 0,
// whereas the real converter starts in a random state), pulse (input
// pulse), level (DC output). Timing: level changes one clock after the
// pulse. The toggle behaviour follows the original circuit; the reset and the
// registered timing are this RTL's choices.
module sfq_to_dc (
  input  logic clk,
  input  logic rst_n,
  input  logic pulse,
  output logic level
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     level <= 1'b0;
    else if (pulse) level <= ~level;
  end

endmodule
