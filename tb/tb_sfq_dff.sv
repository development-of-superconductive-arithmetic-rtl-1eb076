// Self-checking testbench of the D (delay) cell: a random pulse stream must
// come out exactly one clock later, and reset must empty the cell.
module tb_sfq_dff;

  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, q;
  logic prev;
  int checks = 0, failures = 0;

  sfq_dff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

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
    if (q !== 1'b0) begin failures++; $display("FAIL reset q=%0b", q); end
    @(negedge clk) rst_n = 1'b1;
    d = 1'b1;
    prev = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      checks++;
      if (q !== prev) begin
        failures++;
        $display("FAIL t=%0d q=%0b expected %0b", t, q, prev);
      end
      d = 1'($urandom_range(0, 1));
      prev = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
