// memory_loader: writes the demonstration program into the computer's RAM.
//
// An 8-bit counter, cleared by rst and then advanced by every clock edge,
// steps through a fixed image of N_BYTES bytes. Byte i is written at count
// 2*i+1: for that whole cycle the loader pulls cs_n and we_n low and drives
// addr = i and data = image[i]. The even counts in between are idle cycles
// (strobes high, data bus released, addr = 0) that separate the write
// pulses. From count 2*N_BYTES+1 on, done goes high and the counter stops.
// oe_n is never asserted: the loader only writes.
//
// The image is the looping table-reader program followed by its six-byte
// table and a zero at 0x10:
//   0x00 LDX #0x0A | 0x02 LDAA 0,X | 0x03 INX | 0x04 CPX #0x10
//   0x06 JEQ 0x00  | 0x08 JMP 0x02 | 0x0A..0x0F 81 42 24 18 24 42 | 0x10 00
// The write protocol, the program and the table follow the computer's
// specification; the opcode values are those of cpu_pkg, and the reset
// input and the stopping counter are this design's additions.
module memory_loader
  import cpu_pkg::*;
#(
  parameter int unsigned N_BYTES = 17
) (
  input  logic          clk,
  input  logic          rst,    // synchronous, active high: restart loading
  output logic          cs_n,
  output logic          oe_n,
  output logic          we_n,
  output logic [DW-1:0] addr,
  inout  wire  [DW-1:0] data,
  output logic          done
);

  localparam logic [DW-1:0] IMAGE [17] = '{
    OP_LDX_IMM, 8'h0A,   // 0x00 J1: LDX #0x0A
    OP_LDAA_IDX,         // 0x02 J2: LDAA 0,X
    OP_INX,              // 0x03     INX
    OP_CPX_IMM, 8'h10,   // 0x04     CPX #0x10
    OP_JEQ,     8'h00,   // 0x06     JEQ J1
    OP_JMP,     8'h02,   // 0x08     JMP J2
    8'h81, 8'h42, 8'h24, 8'h18, 8'h24, 8'h42,  // 0x0A..0x0F table
    8'h00                // 0x10
  };

  logic [DW-1:0] count;
  logic [DW-1:0] idx;
  logic          writing;
  logic [DW-1:0] wdata;

  counter #(.W(DW)) u_cnter (
    .d('0), .clk, .load(1'b0), .inc(!done), .clr(rst), .q(count)
  );

  always_comb begin
    idx     = count >> 1;
    done    = (count >= DW'(2 * N_BYTES + 1));
    writing = !done && count[0];
    cs_n    = !writing;
    we_n    = !writing;
    oe_n    = 1'b1;
    addr    = writing ? idx : '0;
    wdata   = (idx < DW'(N_BYTES) && idx < 8'd17) ? IMAGE[idx[4:0]] : '0;
  end

  tristate_buf #(.W(DW)) u_tris (.oe_n(!writing), .d(wdata), .bus(data));

endmodule
