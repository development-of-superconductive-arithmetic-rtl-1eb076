// Top level of the RSFQ half-adder ALU design.
//
// Two circuits stand side by side, as on the two test chips:
//  * the pipelined WIDTH-bit ALU (4 bits by default) with its instruction
//    decoder and one TFF-type SFQ-to-DC monitor on every result bit and on
//    the carry out;
//  * the high-speed test frame of a single 1-bit ALU block, with its own
//    decoder, operands made from the clock by two DC-gated input switches,
//    and SFQ-to-DC monitors on OUTPUT and CARRY.
// The operation of each is chosen by an alu_op_t input that the decoder
// turns into the switch settings a, b, c.
//
// Interface (ALU): alu_op, alu_a, alu_b, alu_result, alu_carry (pulses,
// WIDTH clocks after the operands), alu_result_mon, alu_carry_mon (monitor
// levels, one clock later). Interface (test frame): tf_op, tf_gate_a,
// tf_gate_b, tf_out, tf_carry, tf_out_mon, tf_carry_mon.
// clk is the common clock pulse train and rst_n an asynchronous active-low
// reset that empties every cell; both are this RTL's abstraction of the
// circuit's clock distribution and initial state.
module rsfq_alu_top
  import rsfq_alu_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // pipelined ALU
  input  alu_op_t          alu_op,
  input  logic [WIDTH-1:0] alu_a,
  input  logic [WIDTH-1:0] alu_b,
  output logic [WIDTH-1:0] alu_result,
  output logic             alu_carry,
  output logic [WIDTH-1:0] alu_result_mon,
  output logic             alu_carry_mon,
  // 1-bit block test frame
  input  alu_op_t          tf_op,
  input  logic             tf_gate_a,
  input  logic             tf_gate_b,
  output logic             tf_out,
  output logic             tf_carry,
  output logic             tf_out_mon,
  output logic             tf_carry_mon
);

  alu_sw_t alu_sw, tf_sw;

  // ---------------- pipelined ALU ----------------
  alu_op_decoder u_alu_dec (.op(alu_op), .sw(alu_sw));

  rsfq_alu_pipe #(.WIDTH(WIDTH)) u_alu (
    .clk      (clk),
    .rst_n    (rst_n),
    .a_i      (alu_a),
    .b_i      (alu_b),
    .sw       (alu_sw),
    .result_o (alu_result),
    .carry_o  (alu_carry)
  );

  for (genvar i = 0; i < WIDTH; i++) begin : g_mon
    sfq_to_dc u_mon (.clk(clk), .rst_n(rst_n), .pulse(alu_result[i]), .level(alu_result_mon[i]));
  end
  sfq_to_dc u_mon_carry (.clk(clk), .rst_n(rst_n), .pulse(alu_carry), .level(alu_carry_mon));

  // ---------------- 1-bit block test frame ----------------
  alu_op_decoder u_tf_dec (.op(tf_op), .sw(tf_sw));

  alu_bit_testframe u_tf (
    .clk       (clk),
    .rst_n     (rst_n),
    .gate_a    (tf_gate_a),
    .gate_b    (tf_gate_b),
    .sw        (tf_sw),
    .out_o     (tf_out),
    .carry_o   (tf_carry),
    .out_mon   (tf_out_mon),
    .carry_mon (tf_carry_mon)
  );

endmodule
