// Pipelined WIDTH-bit RSFQ ALU.
//
// Level 0 is a row of 1-bit ALU blocks, one per bit, all sharing the switch
// settings. In ADD mode each block gives a propagate pulse p (A xor B on
// OUTPUT) and a generate pulse g (A and B on CARRY); in OR, AND and XOR mode
// switch c is off, so g is always empty and p already is the result bit.
//
// The carry then ripples through one clocked half adder per bit, one bit per
// pipeline level. At level k (k = 1 .. WIDTH-1) a half adder adds the
// carry out of bit k-1 to p of bit k: its S output is result bit k, and its
// C output is merged with g of bit k (delayed k levels by D cells) to form
// the carry out of bit k. Every other bit passes through a D cell so that all
// bits of one operation leave together. In the logic modes the carries are
// empty and the half adders just pass p through. The two inputs of a carry
// merger are never active together (p and g exclude each other), which an
// assertion checks.
//
// Interface: clk, rst_n, a_i and b_i (operand pulse words), sw (switch
// settings a, b, c), result_o (OUTPUT word) and carry_o (carry out of the
// top bit; empty in the logic modes).
// Timing: latency WIDTH clocks (one for the 1-bit blocks, WIDTH-1 for the
// ripple levels); a new operand pair may enter every clock. sw is applied
// after the half adders of level 0, so it must hold its value from one
// clock after an operation enters until that operation leaves level 0.
//
// The two-bit construction (1-bit blocks, a second-level half adder, D cells
// and a carry merger) follows the original circuit; its extension to WIDTH bits, one
// half adder level per bit, is this RTL's reading of how the blocks are
// chained, and the reset is this RTL's addition.
module rsfq_alu_pipe
  import rsfq_alu_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a_i,
  input  logic [WIDTH-1:0] b_i,
  input  alu_sw_t          sw,
  output logic [WIDTH-1:0] result_o,
  output logic             carry_o
);

  // pv[k][i]: at pipeline level k, result bit i for i <= k, propagate pulse
  //           of bit i for i > k.
  // gv[k][i]: at level k, generate pulse of bit i (used for i > k).
  // cy[k]   : at level k, carry out of bit k.
  logic [WIDTH-1:0] pv [WIDTH];
  logic [WIDTH-1:0] gv [WIDTH];
  logic             cy [WIDTH];

  // Level 0: one 1-bit ALU block per bit.
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    rsfq_alu_bit u_bit (
      .clk     (clk),
      .rst_n   (rst_n),
      .a_i     (a_i[i]),
      .b_i     (b_i[i]),
      .sw      (sw),
      .out_o   (pv[0][i]),
      .carry_o (gv[0][i])
    );
  end
  assign cy[0] = gv[0][0];

  // Levels 1 .. WIDTH-1: carry ripple, one half adder per level.
  for (genvar k = 1; k < WIDTH; k++) begin : g_lvl
    logic ha_c, g_dly;

    rsfq_half_adder u_ha (
      .clk   (clk),
      .rst_n (rst_n),
      .a     (pv[k-1][k]),
      .b     (cy[k-1]),
      .s     (pv[k][k]),
      .c     (ha_c)
    );

    sfq_dff    u_dg    (.clk(clk), .rst_n(rst_n), .d(gv[k-1][k]), .q(g_dly));
    sfq_merger u_merge (.a(ha_c), .b(g_dly), .q(cy[k]));

    for (genvar i = 0; i < WIDTH; i++) begin : g_pass
      if (i != k) begin : g_p
        sfq_dff u_dp (.clk(clk), .rst_n(rst_n), .d(pv[k-1][i]), .q(pv[k][i]));
      end
      if (i > k) begin : g_g
        sfq_dff u_dg (.clk(clk), .rst_n(rst_n), .d(gv[k-1][i]), .q(gv[k][i]));
      end else begin : g_gz
        assign gv[k][i] = 1'b0;  // generate pulses already consumed
      end
    end

    a_carry_merger_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
      !(ha_c && g_dly));
  end

  assign result_o = pv[WIDTH-1];
  assign carry_o  = cy[WIDTH-1];

endmodule
