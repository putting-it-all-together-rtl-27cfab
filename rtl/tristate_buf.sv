// tristate_buf: W-bit three-state bus driver.
//
// Drives the shared data bus with 'd' while the active-low enable oe_n is
// low, and releases it (high impedance) otherwise, so that the external
// memory or the memory loader can drive the same wires. Combinational.
// The bus it drives is meant to have several drivers.
module tristate_buf #(
  parameter int unsigned W = 8
) (
  input  logic         oe_n,  // 0: drive the bus
  input  logic [W-1:0] d,
  inout  wire  [W-1:0] bus
);
  assign bus = oe_n ? {W{1'bz}} : d;
endmodule
