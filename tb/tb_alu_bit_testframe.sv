// Self-checking testbench of the 1-bit ALU high-speed test frame.
//
// Reproduces the eye-diagram test: the two input gates follow slow square
// waves (each level held for HOLD clocks, B a quarter period behind A), so
// the block sees every operand combination as a steady pulse train. For each
// of OR, AND, XOR and ADD the output pulses are checked every clock, and the
// SFQ-to-DC monitors must alternate every clock while their output fires and
// hold still while it does not.
module tb_alu_bit_testframe;
  import rsfq_alu_pkg::*;
  import alu_ref_pkg::*;

  localparam int HOLD = 8;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    gate_a = 1'b0, gate_b = 1'b0;
  alu_op_t op = OP_OR;
  alu_sw_t sw;
  logic    out, carry, out_mon, carry_mon;
  logic    pa = 1'b0, pb = 1'b0;
  logic    m_out = 1'b0, m_carry = 1'b0;
  logic [32:0] exp;
  int      checks = 0, failures = 0;
  int      toggles_out = 0, toggles_carry = 0;

  assign sw = op_switches(op);

  alu_bit_testframe dut (.clk(clk), .rst_n(rst_n), .gate_a(gate_a), .gate_b(gate_b),
                         .sw(sw), .out_o(out), .carry_o(carry),
                         .out_mon(out_mon), .carry_mon(carry_mon));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    exp = alu_ref(op, 1, 32'(pa), 32'(pb));
    checks += 3;
    if (out !== exp[0] || carry !== exp[32]) begin
      failures++;
      $display("FAIL op=%s gates=%0b%0b out=%0b carry=%0b", op.name(), pa, pb, out, carry);
    end
    if (out_mon !== m_out) begin failures++; $display("FAIL out monitor"); end
    if (carry_mon !== m_carry) begin failures++; $display("FAIL carry monitor"); end
    if (exp[0])  begin m_out   = ~m_out;   toggles_out++;   end
    if (exp[32]) begin m_carry = ~m_carry; toggles_carry++; end
    pa = gate_a;
    pb = gate_b;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int o = 0; o < 4; o++) begin
      op = alu_op_t'(o);
      for (int t = 0; t < 8 * HOLD; t++) begin
        gate_a = ((t / (2 * HOLD)) % 2) == 0;
        gate_b = (((t + HOLD) / (2 * HOLD)) % 2) == 0;
        @(negedge clk);
      end
    end
    checks++;
    if (toggles_out == 0 || toggles_carry == 0) begin
      failures++;
      $display("FAIL monitors never toggled: out=%0d carry=%0d", toggles_out, toggles_carry);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
