// Self-checking testbench of the clocked half adder: random A/B pulse
// streams, one new pair per clock; S must equal A xor B and C must equal
// A and B of the pair taken one clock earlier, and S and C never together.
module tb_rsfq_half_adder;

  logic clk = 1'b0, rst_n = 1'b0, a = 1'b0, b = 1'b0, s, c;
  logic pa, pb;
  int checks = 0, failures = 0;
  int seen_s = 0, seen_c = 0;

  rsfq_half_adder dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .s(s), .c(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (s !== 1'b0 || c !== 1'b0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1'b1;
    // the first pairs cover all four combinations, the rest are random
    {a, b} = 2'b00;
    {pa, pb} = {a, b};
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      checks++;
      if (s !== (pa ^ pb) || c !== (pa & pb)) begin
        failures++;
        $display("FAIL t=%0d a=%0b b=%0b -> s=%0b c=%0b", t, pa, pb, s, c);
      end
      if (s) seen_s++;
      if (c) seen_c++;
      {a, b} = (t < 4) ? 2'(t) : 2'($urandom_range(0, 3));
      {pa, pb} = {a, b};
    end
    checks++;
    if (seen_s == 0 || seen_c == 0) begin failures++; $display("FAIL outputs never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
