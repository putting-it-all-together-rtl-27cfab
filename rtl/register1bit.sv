// register1bit: one-bit flag register with load enable (zero and carry flags).
//
// Captures 'd' on the rising clock edge while load (active high) is set and
// holds otherwise. No reset.
module register1bit (
  input  logic d,
  input  logic clk,
  input  logic load,
  output logic q
);
  always_ff @(posedge clk) begin
    if (load) q <= d;
  end
endmodule
