// 1-bit ALU block built from one half adder, three switches and a merger.
//
// The clocked half adder turns the A and B pulses of a period into a sum
// pulse S (A xor B) or a carry pulse C (A and B). Three DC switches then
// commutate those two outputs:
//   OUTPUT = (S gated by a) merged with (C gated by b)
//   CARRY  =  C gated by c
// With the switch table this gives OR (a, b on: S or C = A or B),
// AND (b on), ADD (a, c on: sum and carry) and XOR (a on).
//
// Interface: clk, rst_n, a_i and b_i (operand pulses), sw (switch settings
// a, b, c as DC levels), out_o (OUTPUT pulse) and carry_o (CARRY pulse).
// Timing: one clock of latency (the half adder); a new operand pair may
// enter every clock. The switches sit after the half adder, so the switch
// setting in force one clock after the operands enter decides the result.
// The structure follows the original circuit's 1-bit block diagram; the reset is this
// RTL's own addition.
module rsfq_alu_bit
  import rsfq_alu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    a_i,
  input  logic    b_i,
  input  alu_sw_t sw,
  output logic    out_o,
  output logic    carry_o
);

  logic s, c;
  logic s_gated, c_gated_out;

  rsfq_half_adder u_ha (
    .clk   (clk),
    .rst_n (rst_n),
    .a     (a_i),
    .b     (b_i),
    .s     (s),
    .c     (c)
  );

  sfq_switch u_sw_a (.d(s), .ctrl(sw.a), .q(s_gated));
  sfq_switch u_sw_b (.d(c), .ctrl(sw.b), .q(c_gated_out));
  sfq_switch u_sw_c (.d(c), .ctrl(sw.c), .q(carry_o));

  sfq_merger u_merge (.a(s_gated), .b(c_gated_out), .q(out_o));

  // The half adder never emits S and C together, so the merger never sees
  // two pulses in one slot.
  a_merger_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(s_gated && c_gated_out));

endmodule
