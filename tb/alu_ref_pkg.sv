// Reference model shared by the ALU testbenches: the arithmetic meaning of
// each operation, written directly from its definition (no pulse-level
// structure), and the switch setting of each operation.
package alu_ref_pkg;
  import rsfq_alu_pkg::*;

  // Result word and carry out of op applied to WIDTH-bit operands a, b.
  function automatic logic [32:0] alu_ref(input alu_op_t op, input int width,
                                          input logic [31:0] a, input logic [31:0] b);
    logic [32:0] full;
    logic [31:0] mask;
    mask = (width >= 32) ? '1 : ((32'd1 << width) - 1);
    unique case (op)
      OP_OR:  full = {1'b0, (a | b) & mask};
      OP_AND: full = {1'b0, (a & b) & mask};
      OP_XOR: full = {1'b0, (a ^ b) & mask};
      default: begin
        full = {1'b0, a & mask} + {1'b0, b & mask};
        // move the carry out of bit width-1 to bit 32
        full = {full[width], full[31:0] & mask};
      end
    endcase
    return full;
  endfunction

  function automatic alu_sw_t op_switches(input alu_op_t op);
    unique case (op)
      OP_OR:   return '{a: 1'b1, b: 1'b1, c: 1'b0};
      OP_AND:  return '{a: 1'b0, b: 1'b1, c: 1'b0};
      OP_ADD:  return '{a: 1'b1, b: 1'b0, c: 1'b1};
      default: return '{a: 1'b1, b: 1'b0, c: 1'b0};
    endcase
  endfunction

endpackage
