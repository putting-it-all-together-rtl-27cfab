// decoder: address decoder for the I/O location.
//
// Compares the 8-bit address bus with the I/O address 0xFF and gives two
// active-low outputs: addr_ff_n is low when the address is 0xFF (input or
// output port selected), addr_notff_n is low for every other address and
// serves directly as the memory chip select. Purely combinational.
// The two outputs and their use follow the computer's specification; the
// active-low polarity of addr_ff_n is this design's choice.
module decoder
  import cpu_pkg::*;
(
  input  logic [DW-1:0] addr,
  output logic          addr_ff_n,     // 0: address is 0xFF
  output logic          addr_notff_n   // 0: address is not 0xFF (memory chip select)
);
  always_comb begin
    addr_ff_n    = (addr != IO_ADDR);
    addr_notff_n = (addr == IO_ADDR);
  end
endmodule
