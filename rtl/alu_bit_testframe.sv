// On-chip high-speed test frame of the 1-bit ALU block.
//
// The operands are made from the clock ("data-from-clock"): the clock pulse
// train is split into two input switches, and the low-frequency DC gate
// levels gate_a and gate_b decide whether the clock pulse of each period
// reaches the A and B inputs of the 1-bit ALU block. The block's OUTPUT and
// CARRY pulses are read by two TFF-type SFQ-to-DC monitors. With a gate held
// on, the block receives a pulse every period; an output that fires every
// period makes its monitor toggle every period.
//
// Interface: clk, rst_n, gate_a, gate_b (DC gate levels of the input
// switches), sw (switch settings a, b, c), out_o and carry_o (output pulses),
// out_mon and carry_mon (monitor DC levels).
// Timing: out_o/carry_o follow the gates by one clock, the monitor levels
// change one clock after that. The frame's structure follows the original circuit's
// test-frame diagram; the counter-flow clock timing of the real circuit has
// no equivalent at this level, and the reset is this RTL's addition.
module alu_bit_testframe
  import rsfq_alu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    gate_a,
  input  logic    gate_b,
  input  alu_sw_t sw,
  output logic    out_o,
  output logic    carry_o,
  output logic    out_mon,
  output logic    carry_mon
);

  // Every clock period carries one clock pulse into the input switches.
  localparam logic CLOCK_PULSE = 1'b1;

  logic a_pulse, b_pulse;

  sfq_switch u_in_a (.d(CLOCK_PULSE), .ctrl(gate_a), .q(a_pulse));
  sfq_switch u_in_b (.d(CLOCK_PULSE), .ctrl(gate_b), .q(b_pulse));

  rsfq_alu_bit u_bit (
    .clk     (clk),
    .rst_n   (rst_n),
    .a_i     (a_pulse),
    .b_i     (b_pulse),
    .sw      (sw),
    .out_o   (out_o),
    .carry_o (carry_o)
  );

  sfq_to_dc u_mon_out   (.clk(clk), .rst_n(rst_n), .pulse(out_o),   .level(out_mon));
  sfq_to_dc u_mon_carry (.clk(clk), .rst_n(rst_n), .pulse(carry_o), .level(carry_mon));

endmodule
