// alu: arithmetic unit of the accumulator computer.
//
// Inputs are the index register X, the data bus and the accumulator ACCA;
// the 6-bit control word picks the operation (see cpu_pkg::alu_op_t):
//   ALU_PASS  result = data            z = (data == 0)     c = 0
//   ALU_ADD   {c, result} = acca + data z = (result == 0)
//   ALU_CMPX  result = x - data        z = (x == data)     c = borrow
// Flags are only computed here; the control unit decides whether the zero
// and carry registers take them. Purely combinational.
// The operand sources follow the computer's wiring; the operation set (only
// what the instruction set needs) and its encoding are this design's choice.
module alu
  import cpu_pkg::*;
(
  input  alu_op_t       alu_ctl,
  input  logic [DW-1:0] x,
  input  logic [DW-1:0] data,
  input  logic [DW-1:0] acca,
  output logic          z,
  output logic          c,
  output logic [DW-1:0] result
);
  logic [DW:0] wide;

  always_comb begin
    unique case (alu_ctl)
      ALU_ADD:  wide = {1'b0, acca} + {1'b0, data};
      ALU_CMPX: wide = {1'b0, x} - {1'b0, data};
      default:  wide = {1'b0, data};
    endcase
    result = wide[DW-1:0];
    c      = wide[DW];
    z      = (result == '0);
  end
endmodule
