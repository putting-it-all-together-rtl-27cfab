// latch1: instruction register.
//
// Holds the opcode of the instruction being executed. It takes the data bus
// on the rising clock edge at the end of the fetch cycle (load active high)
// and holds it for the remaining cycles of the instruction. Although named a
// latch in the computer's block list, it is built as an edge-triggered
// register so that it is transparent to no glitches on the bus.
module latch1 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] d,
  input  logic         clk,
  input  logic         load,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (load) q <= d;
  end
endmodule
