// Self-checking testbench of the SFQ-to-DC monitor: the level must flip once
// per input pulse and hold otherwise. A steady pulse train (one per clock)
// must make the level alternate every clock.
module tb_sfq_to_dc;

  logic clk = 1'b0, rst_n = 1'b0, pulse = 1'b0, level;
  logic model;
  int checks = 0, failures = 0;

  sfq_to_dc dut (.clk(clk), .rst_n(rst_n), .pulse(pulse), .level(level));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      // first a steady train, then silence, then random pulses
      pulse = (t < 100) ? 1'b1 : (t < 200) ? 1'b0 : 1'($urandom_range(0, 1));
      @(negedge clk);
      if (pulse) model = ~model;
      checks++;
      if (level !== model) begin
        failures++;
        $display("FAIL t=%0d level=%0b expected %0b", t, level, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
