// DC-controlled SFQ switch.
//
// In the superconducting circuit a data pulse starts a race between two
// Josephson junctions: with the control current I_sw off, the junction in
// series with the input switches first and the pulse escapes; with I_sw on,
// the shunt junction switches first and the pulse is passed to the output.
// At the logic level this is a gate: a pulse on d is transmitted to q only
// while ctrl is on.
//
// Pulse abstraction used throughout this design: each clock period is one
// pulse slot, and a 1 on a pulse signal means that one SFQ pulse travels on
// that line during the period. ctrl is a quasi-static DC level.
//
// Interface: d (data pulse), ctrl (DC control current on/off), q (output
// pulse). Timing: unclocked, no latency; the junction-level propagation delay
// is not modelled. The switching rule follows the circuit description; the
// modelling as a combinational gate is this RTL's choice.
module sfq_switch (
  input  logic d,
  input  logic ctrl,
  output logic q
);

  always_comb q = d & ctrl;

endmodule
