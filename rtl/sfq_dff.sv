// D cell: RSFQ delay flip-flop.
//
// A pulse arriving during a clock period is stored as a flux quantum and
// released at the next clock pulse. It re-times pulses that must wait for the
// ripple stages of the multi-bit ALU so that all bits of a result leave
// together.
//
// Interface: clk (clock pulse), rst_n (asynchronous, active low, clears the
// stored flux), d (input pulse), q (output pulse, one clock later).
// The use of D cells for alignment follows the two-bit ALU diagram; the reset
// is this RTL's own addition, since the circuit simply starts empty.
module sfq_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
