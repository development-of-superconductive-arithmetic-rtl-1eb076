// End-to-end testbench of the whole design at its default size (4-bit ALU).
//
// Pipelined ALU: a stream of operand pairs enters one per clock while the
// operation is switched between OR, AND, ADD and XOR with operations still
// in flight. Every result and carry out is checked against the reference
// 4 clocks after entry, and every SFQ-to-DC monitor level is checked against
// a model that flips once per expected output pulse.
// Test frame: the eye-diagram sequence (both input gates held at each
// combination for several clocks) runs for each operation; output pulses
// and monitor levels are checked every clock.
// Each mechanism must occur at least once: each operation, an operation
// change with the pipeline full, a carry generated in bit 0 and rippled to
// the top bit, a carry out, and a toggle of every monitor.
module tb_rsfq_alu_top;
  import rsfq_alu_pkg::*;
  import alu_ref_pkg::*;

  localparam int W    = 4;
  localparam int N    = 3000;
  localparam int HOLD = 6;

  logic         clk = 1'b0, rst_n = 1'b0;
  int           checks = 0, failures = 0;
  int           cyc = 0;

  alu_op_t      alu_op = OP_OR, tf_op = OP_OR;
  logic [W-1:0] alu_a = '0, alu_b = '0;
  logic [W-1:0] alu_result, alu_result_mon;
  logic         alu_carry, alu_carry_mon;
  logic         tf_gate_a = 1'b0, tf_gate_b = 1'b0;
  logic         tf_out, tf_carry, tf_out_mon, tf_carry_mon;

  alu_op_t      op_h [N+16];
  logic [W-1:0] a_h  [N+16];
  logic [W-1:0] b_h  [N+16];

  logic [W-1:0] m_res = '0;
  logic         m_cy = 1'b0, m_tout = 1'b0, m_tcy = 1'b0, pa = 1'b0, pb = 1'b0;

  // mechanism counters
  int n_op [4];
  int n_tf_op [4];
  int n_switch_in_flight = 0, n_ripple = 0, n_carry_out = 0, n_tf_combo = 0;
  int n_mon_toggle [W+3];

  rsfq_alu_top dut (
    .clk(clk), .rst_n(rst_n),
    .alu_op(alu_op), .alu_a(alu_a), .alu_b(alu_b),
    .alu_result(alu_result), .alu_carry(alu_carry),
    .alu_result_mon(alu_result_mon), .alu_carry_mon(alu_carry_mon),
    .tf_op(tf_op), .tf_gate_a(tf_gate_a), .tf_gate_b(tf_gate_b),
    .tf_out(tf_out), .tf_carry(tf_carry),
    .tf_out_mon(tf_out_mon), .tf_carry_mon(tf_carry_mon)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    logic [32:0] exp, texp;
    a_h[cyc]  = alu_a;
    b_h[cyc]  = alu_b;
    op_h[cyc] = alu_op;

    // ---- pipelined ALU ----
    if (cyc >= W && cyc - W < N) begin
      int n;
      n = cyc - W;
      exp = alu_ref(op_h[n+1], W, 32'(a_h[n]), 32'(b_h[n]));
      checks += 3;
      if (alu_result !== exp[W-1:0] || alu_carry !== exp[32]) begin
        failures++;
        $display("FAIL ALU n=%0d op=%s a=%0h b=%0h -> %0h c%0b expected %0h c%0b",
                 n, op_h[n+1].name(), a_h[n], b_h[n], alu_result, alu_carry,
                 exp[W-1:0], exp[32]);
      end
      if (alu_result_mon !== m_res) begin failures++; $display("FAIL result monitors"); end
      if (alu_carry_mon !== m_cy)   begin failures++; $display("FAIL carry monitor"); end
      for (int i = 0; i < W; i++) if (exp[i]) begin m_res[i] = ~m_res[i]; n_mon_toggle[i]++; end
      if (exp[32]) begin m_cy = ~m_cy; n_mon_toggle[W]++; end
      n_op[op_h[n+1]]++;
      if (op_h[n+1] != op_h[n]) n_switch_in_flight++;
      if (op_h[n+1] == OP_ADD) begin
        logic [W-1:0] p, g;
        p = a_h[n] ^ b_h[n];
        g = a_h[n] & b_h[n];
        if (g[0] && &p[W-1:1]) n_ripple++;
        if (exp[32]) n_carry_out++;
      end
    end

    // ---- 1-bit block test frame ----
    texp = alu_ref(tf_op, 1, 32'(pa), 32'(pb));
    checks += 3;
    if (tf_out !== texp[0] || tf_carry !== texp[32]) begin
      failures++;
      $display("FAIL frame op=%s gates=%0b%0b out=%0b carry=%0b", tf_op.name(), pa, pb,
               tf_out, tf_carry);
    end
    if (tf_out_mon !== m_tout)  begin failures++; $display("FAIL frame out monitor"); end
    if (tf_carry_mon !== m_tcy) begin failures++; $display("FAIL frame carry monitor"); end
    if (texp[0])  begin m_tout = ~m_tout; n_mon_toggle[W+1]++; end
    if (texp[32]) begin m_tcy  = ~m_tcy;  n_mon_toggle[W+2]++; end
    n_tf_op[tf_op]++;
    pa = tf_gate_a;
    pb = tf_gate_b;
    cyc <= cyc + 1;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < N + 8; t++) begin
      // ALU: hold an operation for a random run, operands random every clock
      if ($urandom_range(0, 5) == 0) alu_op = alu_op_t'($urandom_range(0, 3));
      if (t % 50 == 7) begin
        // force a carry generated in bit 0 that ripples to the top bit
        alu_op = OP_ADD;
        alu_a  = W'(1) | (W'($urandom) & ~W'(1));
        alu_b  = W'(1) | (~alu_a & ~W'(1));
      end else begin
        alu_a = W'($urandom);
        alu_b = W'($urandom);
      end
      // test frame: eye-diagram sweep, each gate combination held HOLD clocks
      tf_op = alu_op_t'((t / (4 * HOLD)) % 4);
      {tf_gate_a, tf_gate_b} = 2'((t / HOLD) % 4);
      if (t % HOLD == 0) n_tf_combo++;
      @(negedge clk);
    end

    for (int o = 0; o < 4; o++) begin
      checks += 2;
      if (n_op[o] == 0)    begin failures++; $display("FAIL op %0d never ran", o); end
      if (n_tf_op[o] == 0) begin failures++; $display("FAIL frame op %0d never ran", o); end
    end
    for (int i = 0; i < W + 3; i++) begin
      checks++;
      if (n_mon_toggle[i] == 0) begin failures++; $display("FAIL monitor %0d never toggled", i); end
    end
    checks += 4;
    if (n_switch_in_flight == 0) begin failures++; $display("FAIL no op change in flight"); end
    if (n_ripple == 0)           begin failures++; $display("FAIL no full carry ripple"); end
    if (n_carry_out == 0)        begin failures++; $display("FAIL no carry out"); end
    if (n_tf_combo < 16)         begin failures++; $display("FAIL frame sweep incomplete"); end
    $display("ops: OR=%0d AND=%0d ADD=%0d XOR=%0d; op changes in flight=%0d; full ripples=%0d; carry outs=%0d; frame combos=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_switch_in_flight, n_ripple, n_carry_out, n_tf_combo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
