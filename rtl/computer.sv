// computer: the accumulator computer with its memory loader, minus the RAM.
//
// The processor and the memory loader share the data bus. While RESN is low
// the processor is in reset: its PC is cleared and its address bus and
// memory write strobe are handed to the loader (loader addr -> EXT_ADDR,
// loader we_n -> EXT_W), so the loader's write pulses, with the loader
// driving DATA, store the demonstration program into the RAM attached to
// ADDR, DATA, MEM_CS, M_R and M_W. Once LOAD_DONE is high, raising RESN
// starts the program at address 0. External reads (EXT_R) during reset are
// brought out for a tester. The RAM itself is outside: it must drive DATA
// while MEM_CS and M_R are low and store DATA at the clock edge ending a
// cycle in which MEM_CS and M_W are low.
//
// Joining the loader to the processor's external-access inputs is this
// design's choice; the specification treats the loader as a separate
// project writing the same RAM. DATA has several drivers by intent.
module computer
  import cpu_pkg::*;
(
  input  logic          CLK,
  input  logic          RESN,         // 0: reset and memory loading, 1: run
  input  logic          LOAD_RST,     // 1: restart the memory loader
  input  logic          EXT_R,        // 0: external memory read (in reset)
  input  logic [DW-1:0] INPUT_PORT,
  output logic          MEM_CS,
  output logic          M_R,
  output logic          M_W,
  inout  wire  [DW-1:0] DATA,
  output logic [DW-1:0] ADDR,
  output logic [DW-1:0] OUTPUT_PORT,
  output tstate_t       TIN,
  output tstate_t       TOUT,
  output logic [DW-1:0] OUTMUX,
  output logic          E,
  output logic          INMUX1,
  output logic          STORE,
  output logic          LOAD_DONE,
  output logic          LOAD_CS,
  output logic          LOAD_OE
);

  logic          ld_we_n;
  logic [DW-1:0] ld_addr;

  memory_loader u_loader (
    .clk(CLK), .rst(LOAD_RST), .cs_n(LOAD_CS), .oe_n(LOAD_OE), .we_n(ld_we_n),
    .addr(ld_addr), .data(DATA), .done(LOAD_DONE)
  );

  processor u_proc (
    .CLK, .RESN, .EXT_W(ld_we_n), .EXT_R, .INPUT_PORT, .EXT_ADDR(ld_addr),
    .MEM_CS, .M_R, .M_W, .DATA, .ADDR, .OUTPUT_PORT, .TIN, .TOUT,
    .E, .OUTMUX, .INMUX1, .STORE
  );

endmodule
