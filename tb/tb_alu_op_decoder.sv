// Self-checking testbench of the instruction decoder against the switch
// table (a, b, c for OR, AND, ADD, XOR), written out here as bit literals.
module tb_alu_op_decoder;
  import rsfq_alu_pkg::*;

  alu_op_t op;
  alu_sw_t sw;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  alu_op_decoder dut (.op(op), .sw(sw));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input alu_op_t o, input logic [2:0] abc);
    op = o;
    #1;
    checks++;
    if ({sw.a, sw.b, sw.c} !== abc) begin
      failures++;
      $display("FAIL op=%s abc=%03b expected %03b", o.name(), {sw.a, sw.b, sw.c}, abc);
    end
  endtask

  initial begin
    repeat (3) begin
      check(OP_OR,  3'b110);
      check(OP_AND, 3'b010);
      check(OP_ADD, 3'b101);
      check(OP_XOR, 3'b100);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
