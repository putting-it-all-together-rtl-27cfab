// sram_model: behavioural model of the external 256 x 8 RAM.
//
// Drives 'data' with mem[addr] while cs_n and oe_n are low (asynchronous
// read) and releases it otherwise. Stores 'data' into mem[addr] at a rising
// clock edge when cs_n and we_n are low, i.e. at the end of a write cycle.
// Testbenches may preload and inspect 'mem' hierarchically. Not synthesizable
// as a real RAM macro; it stands in for the off-chip part.
module sram_model (
  input  logic       clk,
  input  logic       cs_n,
  input  logic       oe_n,
  input  logic       we_n,
  input  logic [7:0] addr,
  inout  wire  [7:0] data
);
  logic [7:0] mem [256];

  initial for (int i = 0; i < 256; i++) mem[i] = 8'h00;

  assign data = (!cs_n && !oe_n && we_n) ? mem[addr] : 8'bz;

  always @(posedge clk) begin
    if (!cs_n && !we_n) mem[addr] <= data;
  end
endmodule
