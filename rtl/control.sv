// control: timing and control unit of the accumulator computer.
//
// A timing-state register (tout) counts the clock cycles of an instruction:
// T0 fetches the opcode, T1 and T2 execute it. The state register's output
// is looped back outside the unit and enters again as tin; all control lines
// are decoded combinationally from tin, the instruction latch and the zero
// and carry flags, and the next timing state is written to the register on
// the rising clock edge. Every instruction returns to T0 when it is done.
//
//   T0 (all)      address=PC, read, load instruction latch, PC+1
//   LDAA #imm     T1: address=PC, read, ALU pass, load ACCA and Z, PC+1
//   LDAA 0,X      T1: address=X, read, ALU pass, load ACCA and Z
//   LDAA/ADAA/STAA addr
//                 T1: address=PC, read, load MAR, PC+1
//                 T2: address=MAR, then
//                     LDAA: read, ALU pass, load ACCA and Z
//                     ADAA: read, ALU add, load ACCA, Z and C
//                     STAA: store (ACCA driven onto the bus)
//   LDX #imm      T1: address=PC, read, load X, PC+1
//   INX           T1: X+1
//   CPX #imm      T1: address=PC, read, ALU compare, load Z and C, PC+1
//   JMP/JEQ/JCS   T1: address=PC, read; load PC if taken (JEQ: Z=1,
//                     JCS: C=1), else PC+1
//   other opcodes T1: nothing (two-cycle no-operation)
//
// The control outputs are active low, as the computer's datapath expects
// (the datapath inverts them). While rst is high the unit stays in T0,
// asserts nothing and selects the external address, so that memory can be
// loaded from outside. The 2-bit state loop, the active-low strobes, the
// two-cycle LDAA #imm and the lines themselves follow the computer's
// specification; the cycle-by-cycle microprogram of the other instructions
// and the opcode values are this design's choice. The output port strobe is
// decoded from the store line and the address in the combina block, not here.
module control
  import cpu_pkg::*;
(
  input  logic [DW-1:0] instr,
  input  tstate_t       tin,
  output tstate_t       tout,
  input  logic          clk,
  input  logic          rst,       // active high
  input  logic          zreg,
  input  logic          creg,
  output alu_op_t       alu_ctl,
  output mem_sel_t      mem_sel,
  output logic          inst_l_n,  // load instruction latch
  output logic          pc_i_n,    // increment PC
  output logic          pc_l_n,    // load PC from the bus
  output logic          acca_l_n,  // load ACCA from the ALU
  output logic          mar_l_n,   // load MAR from the bus
  output logic          c_l_n,     // load carry flag
  output logic          z_l_n,     // load zero flag
  output logic          x_i_n,     // increment X
  output logic          x_l_n,     // load X from the bus
  output logic          read_n,    // read memory or input port
  output logic          store_n    // drive ACCA onto the bus and write
);

  typedef struct packed {
    logic inst_l, pc_i, pc_l, acca_l, mar_l, c_l, z_l, x_i, x_l, read, store;
  } strobes_t;

  strobes_t s;
  tstate_t  next_t;

  always_comb begin
    s       = '0;
    alu_ctl = ALU_PASS;
    mem_sel = SEL_PC;
    next_t  = T0;
    if (rst) begin
      mem_sel = SEL_EXT;
    end else begin
      unique case (tin)
        T0: begin
          s.read   = 1'b1;
          s.inst_l = 1'b1;
          s.pc_i   = 1'b1;
          next_t   = T1;
        end
        T1: begin
          unique case (instr)
            OP_LDAA_IMM: begin
              s.read = 1'b1; s.acca_l = 1'b1; s.z_l = 1'b1; s.pc_i = 1'b1;
            end
            OP_LDAA_IDX: begin
              mem_sel = SEL_X;
              s.read = 1'b1; s.acca_l = 1'b1; s.z_l = 1'b1;
            end
            OP_LDAA_DIR, OP_ADAA_DIR, OP_STAA_DIR: begin
              s.read = 1'b1; s.mar_l = 1'b1; s.pc_i = 1'b1;
              next_t = T2;
            end
            OP_LDX_IMM: begin
              s.read = 1'b1; s.x_l = 1'b1; s.pc_i = 1'b1;
            end
            OP_INX: begin
              s.x_i = 1'b1;
            end
            OP_CPX_IMM: begin
              alu_ctl = ALU_CMPX;
              s.read = 1'b1; s.z_l = 1'b1; s.c_l = 1'b1; s.pc_i = 1'b1;
            end
            OP_JMP: begin
              s.read = 1'b1; s.pc_l = 1'b1;
            end
            OP_JEQ: begin
              s.read = 1'b1; s.pc_l = zreg; s.pc_i = !zreg;
            end
            OP_JCS: begin
              s.read = 1'b1; s.pc_l = creg; s.pc_i = !creg;
            end
            default: ;
          endcase
        end
        T2: begin
          mem_sel = SEL_MAR;
          unique case (instr)
            OP_LDAA_DIR: begin
              s.read = 1'b1; s.acca_l = 1'b1; s.z_l = 1'b1;
            end
            OP_ADAA_DIR: begin
              alu_ctl = ALU_ADD;
              s.read = 1'b1; s.acca_l = 1'b1; s.z_l = 1'b1; s.c_l = 1'b1;
            end
            OP_STAA_DIR: begin
              s.store = 1'b1;
            end
            default: ;
          endcase
        end
        default: ;  // T3 is never entered; return to T0
      endcase
    end
  end

  always_comb begin
    inst_l_n = !s.inst_l;
    pc_i_n   = !s.pc_i;
    pc_l_n   = !s.pc_l;
    acca_l_n = !s.acca_l;
    mar_l_n  = !s.mar_l;
    c_l_n    = !s.c_l;
    z_l_n    = !s.z_l;
    x_i_n    = !s.x_i;
    x_l_n    = !s.x_l;
    read_n   = !s.read;
    store_n  = !s.store;
  end

  always_ff @(posedge clk) begin
    if (rst) tout <= T0;
    else     tout <= next_t;
  end

  // No instruction uses a fourth timing state.
  a_no_t3: assert property (@(posedge clk) disable iff (rst) tout != T3);

endmodule
