// Self-checking testbench of the SFQ merger: a pulse on either input, or on
// both, must appear on the output; none in, none out.
module tb_sfq_merger;

  logic a, b, q;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  sfq_merger dut (.a(a), .b(b), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < 4; i++) begin
        {a, b} = 2'(i);
        #1;
        checks++;
        if (q !== (i != 0)) begin
          failures++;
          $display("FAIL a=%0b b=%0b q=%0b", a, b, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
