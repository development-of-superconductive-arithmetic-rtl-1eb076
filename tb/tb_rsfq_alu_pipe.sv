// Self-checking testbench of the pipelined ALU.
//
// Runs the default 4-bit ALU through every operand pair for each of OR, AND,
// ADD and XOR, back to back (one operation per clock), then a random stream
// with frequent operation changes. An 8-bit instance and a 2-bit instance
// (the two-bit construction) run the random stream too. Each result and
// carry out must match the reference exactly WIDTH clocks after its operands
// entered, using the operation in force one clock
// after they entered (when the level-0 outputs pass the switches). It also
// counts results whose carry rippled through at least two bits.
module tb_rsfq_alu_pipe;
  import rsfq_alu_pkg::*;
  import alu_ref_pkg::*;

  localparam int NX = 4 * 256;     // exhaustive part
  localparam int NR = 2000;        // random part
  localparam int N  = NX + NR;

  logic    clk = 1'b0, rst_n = 1'b0;
  int      checks = 0, failures = 0;
  int      ripples = 0, carry_outs = 0;
  int      cyc = 0;

  alu_op_t    op = OP_OR;
  alu_sw_t    sw;
  logic [7:0] a = '0, b = '0;
  logic [3:0] r4;
  logic       c4;
  logic [7:0] r8;
  logic       c8;
  logic [1:0] r2;
  logic       c2;

  alu_op_t    op_h [N+16];
  logic [7:0] a_h  [N+16];
  logic [7:0] b_h  [N+16];

  assign sw = op_switches(op);

  rsfq_alu_pipe dut4 (.clk(clk), .rst_n(rst_n), .a_i(a[3:0]), .b_i(b[3:0]), .sw(sw),
                      .result_o(r4), .carry_o(c4));

  rsfq_alu_pipe #(.WIDTH(8)) dut8 (.clk(clk), .rst_n(rst_n), .a_i(a), .b_i(b), .sw(sw),
                                   .result_o(r8), .carry_o(c8));

  // the two-bit construction of the block diagram
  rsfq_alu_pipe #(.WIDTH(2)) dut2 (.clk(clk), .rst_n(rst_n), .a_i(a[1:0]), .b_i(b[1:0]), .sw(sw),
                                   .result_o(r2), .carry_o(c2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int width, input int n, input logic [7:0] r, input logic c);
    logic [32:0] exp;
    exp = alu_ref(op_h[n+1], width, 32'(a_h[n]), 32'(b_h[n]));
    checks++;
    if (r !== exp[7:0] || c !== exp[32]) begin
      failures++;
      $display("FAIL W=%0d n=%0d op=%s a=%0h b=%0h -> %0h c%0b expected %0h c%0b",
               width, n, op_h[n+1].name(), a_h[n], b_h[n], r, c, exp[7:0], exp[32]);
    end
  endtask

  // Sampled before each edge: entry cyc is captured at this edge, and the
  // outputs now on the ports belong to entry cyc-WIDTH.
  always @(posedge clk) if (rst_n) begin
    a_h[cyc]  = a;
    b_h[cyc]  = b;
    op_h[cyc] = op;
    if (cyc >= 4 && cyc - 4 < NX) begin
      check(4, cyc - 4, {4'h0, r4}, c4);
      if (op_h[cyc-3] == OP_ADD) begin
        logic [3:0] p, g;
        p = a_h[cyc-4][3:0] ^ b_h[cyc-4][3:0];
        g = a_h[cyc-4][3:0] & b_h[cyc-4][3:0];
        // a generate of bit 0 or 1 that propagates through two more bits
        if ((g[0] && p[1] && p[2]) || (g[1] && p[2] && p[3])) ripples++;
        if (c4) carry_outs++;
      end
    end
    if (cyc >= 2 && cyc - 2 >= NX && cyc - 2 < N) check(2, cyc - 2, {6'h0, r2}, c2);
    if (cyc >= 8 && cyc - 8 >= NX && cyc - 8 < N) check(8, cyc - 8, r8, c8);
    cyc <= cyc + 1;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < N + 10; t++) begin
      if (t < NX) begin
        op = alu_op_t'((t / 256 + 2) % 4);   // ADD, XOR, OR, AND
        {a, b} = {4'h0, 4'(t % 256 / 16), 4'h0, 4'(t % 16)};
      end else begin
        if ($urandom_range(0, 3) == 0) op = alu_op_t'($urandom_range(0, 3));
        a = 8'($urandom);
        b = 8'($urandom);
      end
      @(negedge clk);
    end
    checks++;
    if (ripples == 0 || carry_outs == 0) begin
      failures++;
      $display("FAIL no rippled carry (%0d) or carry out (%0d) seen", ripples, carry_outs);
    end
    $display("ripples=%0d carry_outs=%0d", ripples, carry_outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
