// Self-checking testbench of the DC-controlled SFQ switch.
//
// Checks the gate for every input combination, then replays a data stream
// that repeats the pattern 1,1,0,1 while the control current is switched on
// and off in windows: pulses must pass only while the control is on.
// Expected values are computed in the testbench from the switching rule.
module tb_sfq_switch;

  logic d, ctrl, q;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  sfq_switch dut (.d(d), .ctrl(ctrl), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: d=%0b ctrl=%0b q=%0b expected %0b", what, d, ctrl, q, exp);
    end
  endtask

  localparam logic [3:0] PATTERN = 4'b1101;  // sent MSB first
  int passed, blocked;

  initial begin
    for (int i = 0; i < 4; i++) begin
      {d, ctrl} = 2'(i);
      #1 check((i == 3), "truth table");
    end
    // Pattern stream: control on for slots 2..9, off for 10..19, on again.
    passed = 0; blocked = 0;
    for (int t = 0; t < 32; t++) begin
      @(negedge clk);
      d    = PATTERN[3 - (t % 4)];
      ctrl = (t >= 2 && t < 10) || (t >= 20 && t < 28);
      #1 check(d && ctrl, "1101 stream");
      if (d && ctrl)  passed++;
      if (d && !ctrl) blocked++;
    end
    checks++;
    if (passed != 12 || blocked != 12) begin
      failures++;
      $display("FAIL pulse count: passed=%0d blocked=%0d", passed, blocked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
