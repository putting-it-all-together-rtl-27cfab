// cpu_pkg: types and constants shared by the 8-bit accumulator computer.
//
// The computer has one 8-bit data bus, an accumulator (ACCA), an index
// register (X), a program counter (PC), a memory address register (MAR), an
// instruction latch, zero and carry flags, an input port and an output port.
// Address 0xFF is not memory: reading it returns the input port and writing
// it loads the output port.
//
// The opcodes of LDAA #imm (0x02), STAA addr (0x03), ADAA addr (0x04) and
// LDX #imm (0x09) follow the example programs this computer was specified
// with; all other opcode values, the ALU operation codes and the address
// multiplexer encoding are this design's own choice.
package cpu_pkg;

  localparam int unsigned DW = 8;  // data and address width

  // Source of the memory address (select of the address multiplexer).
  typedef enum logic [1:0] {
    SEL_EXT = 2'd0,  // external address, used while the computer is held in reset
    SEL_X   = 2'd1,  // index register
    SEL_PC  = 2'd2,  // program counter
    SEL_MAR = 2'd3   // memory address register
  } mem_sel_t;

  // ALU operation (6-bit control word).
  typedef enum logic [5:0] {
    ALU_PASS = 6'd0,  // result = bus data, Z from the data, C = 0
    ALU_ADD  = 6'd1,  // {C, result} = ACCA + bus data
    ALU_CMPX = 6'd2   // result = X - bus data, Z when equal, C = borrow
  } alu_op_t;

  // Timing states of the control unit.
  typedef enum logic [1:0] {
    T0 = 2'd0,  // fetch opcode
    T1 = 2'd1,
    T2 = 2'd2,
    T3 = 2'd3   // unused
  } tstate_t;

  // Instruction set.
  localparam logic [7:0] OP_LDAA_DIR = 8'h01;  // LDAA addr  : ACCA <- M[addr]     3 cycles
  localparam logic [7:0] OP_LDAA_IMM = 8'h02;  // LDAA #imm  : ACCA <- imm         2 cycles
  localparam logic [7:0] OP_STAA_DIR = 8'h03;  // STAA addr  : M[addr] <- ACCA     3 cycles
  localparam logic [7:0] OP_ADAA_DIR = 8'h04;  // ADAA addr  : ACCA <- ACCA+M[addr] 3 cycles
  localparam logic [7:0] OP_LDAA_IDX = 8'h05;  // LDAA 0,X   : ACCA <- M[X]        2 cycles
  localparam logic [7:0] OP_INX      = 8'h06;  // INX        : X <- X + 1          2 cycles
  localparam logic [7:0] OP_CPX_IMM  = 8'h07;  // CPX #imm   : Z,C <- X - imm      2 cycles
  localparam logic [7:0] OP_JEQ      = 8'h08;  // JEQ addr   : if Z, PC <- addr    2 cycles
  localparam logic [7:0] OP_LDX_IMM  = 8'h09;  // LDX #imm   : X <- imm            2 cycles
  localparam logic [7:0] OP_JMP      = 8'h0A;  // JMP addr   : PC <- addr          2 cycles
  localparam logic [7:0] OP_JCS      = 8'h0B;  // JCS addr   : if C, PC <- addr    2 cycles

  localparam logic [7:0] IO_ADDR = 8'hFF;  // input port (read) / output port (write)

endpackage
