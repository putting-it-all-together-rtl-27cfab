// counter: W-bit loadable up-counter, used for the X and PC registers.
//
// On each rising clock edge: clear (synchronous, highest priority) sets the
// count to zero, otherwise load takes 'd' from the data bus, otherwise inc
// adds one (wrapping at 2**W). With none active the count holds. All
// controls are active high. Result visible one clock after the edge.
// Priority of clear over load over increment is this design's choice.
module counter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] d,
  input  logic         clk,
  input  logic         load,
  input  logic         inc,
  input  logic         clr,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (clr)       q <= '0;
    else if (load) q <= d;
    else if (inc)  q <= q + 1'b1;
  end
endmodule
