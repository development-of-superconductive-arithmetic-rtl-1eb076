// Clocked RSFQ half adder cell.
//
// The cell collects the pulses that arrive on a and b during a clock period.
// At the next clock pulse it emits a pulse on s if exactly one input pulse
// arrived (XOR) and a pulse on c if both arrived (AND). The cell is one
// pipeline stage: s and c never fire together.
//
// Interface: clk, rst_n (asynchronous, active low, this RTL's addition),
// a, b (input pulses), s, c (output pulses, valid one clock after the inputs).
// The function and the clocking follow the original circuit; the cell's inner
// structure is not modelled.
module rsfq_half_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= 1'b0;
      c <= 1'b0;
    end else begin
      s <= a ^ b;
      c <= a & b;
    end
  end

endmodule
