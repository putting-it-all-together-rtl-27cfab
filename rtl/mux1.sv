// mux1: 4-to-1 bus multiplexer.
//
// Selects one of four W-bit inputs with a 2-bit select. The computer uses two
// copies: MUXIN picks what the processor drives onto the data bus (zero, the
// accumulator or the input port) and MUXMEM picks the memory address
// (external address, X, PC or MAR). Purely combinational.
module mux1 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic [W-1:0] in3,
  input  logic [1:0]   sel,
  output logic [W-1:0] out
);
  always_comb begin
    unique case (sel)
      2'd0: out = in0;
      2'd1: out = in1;
      2'd2: out = in2;
      default: out = in3;
    endcase
  end
endmodule
