// Shared types of the RSFQ half-adder ALU.
//
// alu_op_t names the four operations of the ALU (OR, AND, ADD, XOR). The
// operation set is the original circuit's; the 2-bit encoding is this RTL's own
// choice, ordered like the columns of the switch table.
//
// alu_sw_t is the bundle of the three DC switch controls a, b and c that
// commutate the half-adder outputs of every 1-bit block: a passes the sum
// (S) output to OUTPUT, b passes the carry (C) output to OUTPUT through the
// merger, c passes C to the CARRY output.
package rsfq_alu_pkg;

  typedef enum logic [1:0] {
    OP_OR  = 2'd0,
    OP_AND = 2'd1,
    OP_ADD = 2'd2,
    OP_XOR = 2'd3
  } alu_op_t;

  typedef struct packed {
    logic a;  // S   -> OUTPUT
    logic b;  // C   -> OUTPUT (through the merger)
    logic c;  // C   -> CARRY
  } alu_sw_t;

endpackage
