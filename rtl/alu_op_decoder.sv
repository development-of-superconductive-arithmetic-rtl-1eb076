// Instruction decoder of the RSFQ ALU.
//
// Turns the selected operation into the DC on/off settings of the three
// switches of every 1-bit block, per the switch table:
//
//            OR  AND  ADD  XOR
//      a      1    0    1    1
//      b      1    1    0    0
//      c      0    0    1    0
//
// Interface: op (alu_op_t), sw (switch settings a, b, c). Timing: purely
// combinational; in the chip the switch settings are DC levels that are
// held for the whole run of an operation. The table follows the original circuit; the
// binary op encoding is this RTL's own.
module alu_op_decoder
  import rsfq_alu_pkg::*;
(
  input  alu_op_t op,
  output alu_sw_t sw
);

  // Switch settings, one per operation (the columns of the table above).
  localparam alu_sw_t SW_OR  = '{a: 1'b1, b: 1'b1, c: 1'b0};
  localparam alu_sw_t SW_AND = '{a: 1'b0, b: 1'b1, c: 1'b0};
  localparam alu_sw_t SW_ADD = '{a: 1'b1, b: 1'b0, c: 1'b1};
  localparam alu_sw_t SW_XOR = '{a: 1'b1, b: 1'b0, c: 1'b0};

  always_comb begin
    unique case (op)
      OP_OR:   sw = SW_OR;
      OP_AND:  sw = SW_AND;
      OP_ADD:  sw = SW_ADD;
      OP_XOR:  sw = SW_XOR;
      default: sw = SW_XOR;
    endcase
  end

endmodule
