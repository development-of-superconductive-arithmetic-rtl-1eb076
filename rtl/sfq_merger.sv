// SFQ merger (confluence buffer).
//
// Any pulse arriving on either input leaves on the single output. Two
// pulses arriving in the same slot leave as one pulse, so at the logic level
// the merger is an OR. In the ALU the two inputs of every merger are never
// active in the same slot for the operations of the switch table; the blocks
// that use mergers check that with assertions.
//
// Interface: a, b (input pulses), q (output pulse). Timing: unclocked, no
// latency. The merger as a part of the 1-bit block follows the original circuit; its
// logic-level model is this RTL's choice.
module sfq_merger (
  input  logic a,
  input  logic b,
  output logic q
);

  always_comb q = a | b;

endmodule
