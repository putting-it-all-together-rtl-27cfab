// combina: memory and I/O strobe logic of the accumulator computer.
//
// Combines the processor's read and store lines, the external load lines and
// the I/O address decode into the strobes of the outside world. All inputs
// are active high; the memory strobes are active low like the memory's pins.
//   m_w_n     memory write: store by the processor, or an external write
//             while the computer is held in reset
//   m_r_n     memory read: read by the processor, or an external read while
//             in reset
//   inmux1    the input port drives the data bus (processor read of 0xFF)
//   out_ld    the output port register loads the bus (processor store to 0xFF)
// The memory chip select comes from the address decoder, so a strobe at
// address 0xFF reaches no memory. Purely combinational.
// Which strobes this block makes follows the computer's specification; the
// equations are this design's own, and the output port strobe, which the
// specification leaves to the control unit, is decoded here because it
// needs the address.
module combina (
  input  logic rst,      // computer held in reset
  input  logic ext_w,    // external write request
  input  logic store,    // processor store
  input  logic addr_ff,  // address is 0xFF
  input  logic ext_r,    // external read request
  input  logic read,     // processor read
  output logic m_w_n,
  output logic m_r_n,
  output logic inmux1,
  output logic out_ld
);
  always_comb begin
    m_w_n  = !((rst && ext_w) || (!rst && store));
    m_r_n  = !((rst && ext_r) || (!rst && read));
    inmux1 = !rst && read && addr_ff;
    out_ld = !rst && store && addr_ff;
  end
endmodule
