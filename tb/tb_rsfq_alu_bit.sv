// Self-checking testbench of the 1-bit ALU block.
//
// The switches are set straight from the switch table. For each of OR,
// AND, ADD and XOR every operand pair is applied (as in the block's circuit
// simulation), then a random back-to-back stream with random operation
// changes runs. OUTPUT and CARRY must match the reference one clock after
// the operands, using the switch setting in force when they are sampled.
module tb_rsfq_alu_bit;
  import rsfq_alu_pkg::*;
  import alu_ref_pkg::*;

  localparam int N = 600;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    a = 1'b0, b = 1'b0;
  alu_op_t op = OP_OR;
  alu_sw_t sw;
  logic    out, carry;
  int      checks = 0, failures = 0;

  logic    a_h [N+2];
  logic    b_h [N+2];
  int      cyc = 0;

  assign sw = op_switches(op);

  rsfq_alu_bit dut (.clk(clk), .rst_n(rst_n), .a_i(a), .b_i(b), .sw(sw),
                    .out_o(out), .carry_o(carry));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample before the edge: the pair entered at edge cyc-1 is read now,
  // with the operation that is in force now.
  always @(posedge clk) if (rst_n) begin
    logic [32:0] exp;
    cyc <= cyc + 1;
    a_h[cyc] = a;
    b_h[cyc] = b;
    if (cyc >= 1 && cyc <= N) begin
      exp = alu_ref(op, 1, 32'(a_h[cyc-1]), 32'(b_h[cyc-1]));
      checks++;
      if (out !== exp[0] || carry !== exp[32]) begin
        failures++;
        $display("FAIL cyc=%0d op=%s a=%0b b=%0b out=%0b carry=%0b expected %0b %0b",
                 cyc, op.name(), a_h[cyc-1], b_h[cyc-1], out, carry, exp[0], exp[32]);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      if (t < 32) begin
        // each op for eight slots: the four operand pairs, twice
        op = alu_op_t'(t / 8);
        {a, b} = 2'(t % 4);
      end else begin
        if ($urandom_range(0, 7) == 0) op = alu_op_t'($urandom_range(0, 3));
        {a, b} = 2'($urandom_range(0, 3));
      end
      @(negedge clk);
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
