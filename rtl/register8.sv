// register8: W-bit register with load enable (MAR, output port, accumulator).
//
// Captures 'd' on the rising clock edge while load (active high) is set and
// holds otherwise. No reset: the computer's program initialises what it uses.
module register8 #(
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
