// processor: the 8-bit accumulator computer's processor, wired from its parts.
//
// One 8-bit bidirectional data bus (DATA) joins everything: the external
// memory, the input port and the accumulator drive it, and the instruction
// latch, X, PC, MAR, output port and ALU read it. The address bus (ADDR)
// comes from a 4-to-1 multiplexer (MUXMEM) choosing the external address,
// X, PC or MAR; a second multiplexer (MUXIN) chooses whether the processor
// drives the accumulator or the input port onto DATA, through a three-state
// driver. The ALU takes X, DATA and ACCA; its result goes to ACCA and its
// flags to the zero and carry registers. The control unit sequences the
// registers from the instruction latch and a 2-bit timing state, and
// combina turns read/store into memory and I/O strobes. Address 0xFF is the
// I/O location; every other address selects the memory (MEM_CS low).
//
// Pins (active-low where named so): RESN low holds the computer in reset,
// clears PC and hands the address bus and memory strobes to EXT_ADDR,
// EXT_W and EXT_R so memory can be loaded; RESN high runs the program from
// address 0. The memory reads when MEM_CS and M_R are low (it must drive
// DATA in that cycle) and writes when MEM_CS and M_W are low (it takes DATA
// at the end of that cycle). One instruction takes two or three clock
// cycles; all registers change on the rising clock edge.
//
// The block list and its wiring follow the computer's specification; the
// signal polarities inside the processor are made consistent by this
// design (see each block), and the output-port strobe comes from combina.
// DATA has several drivers by intent (three-state bus). Two assertions
// state the bus rules: no contention with the RAM, no read with a write.
module processor
  import cpu_pkg::*;
(
  input  logic          CLK,
  input  logic          RESN,         // 0: reset / external memory access
  input  logic          EXT_W,        // 0: external memory write (in reset)
  input  logic          EXT_R,        // 0: external memory read (in reset)
  input  logic [DW-1:0] INPUT_PORT,
  input  logic [DW-1:0] EXT_ADDR,
  output logic          MEM_CS,       // 0: memory selected
  output logic          M_R,          // 0: memory read
  output logic          M_W,          // 0: memory write
  inout  wire  [DW-1:0] DATA,
  output logic [DW-1:0] ADDR,
  output logic [DW-1:0] OUTPUT_PORT,
  output tstate_t       TIN,
  output tstate_t       TOUT,
  output logic          E,            // 1: processor drives DATA
  output logic [DW-1:0] OUTMUX,       // value the processor would drive
  output logic          INMUX1,       // 1: input port on DATA
  output logic          STORE         // 0: store cycle
);

  logic          rst;
  logic          addr_ff_n, addr_notff_n;
  logic          zreg, creg, zalu, calu;
  logic          c_l_n, z_l_n, x_i_n, x_l_n, inst_l_n, pc_i_n, pc_l_n, acca_l_n, mar_l_n;
  logic          read_n, out_ld;
  mem_sel_t      mem_sel;
  alu_op_t       alu_ctl;
  logic [DW-1:0] xreg, pcreg, marreg, instr, accar, alur;

  assign rst    = !RESN;
  assign TIN    = TOUT;
  assign E      = INMUX1 || !STORE;
  assign MEM_CS = addr_notff_n;

  // Address decoder and multiplexers
  decoder u_decoder (.addr(ADDR), .addr_ff_n, .addr_notff_n);

  mux1 #(.W(DW)) u_muxin (
    .in0('0), .in1(accar), .in2(INPUT_PORT), .in3('0),
    .sel({INMUX1, !STORE}), .out(OUTMUX)
  );

  mux1 #(.W(DW)) u_muxmem (
    .in0(EXT_ADDR), .in1(xreg), .in2(pcreg), .in3(marreg),
    .sel(mem_sel), .out(ADDR)
  );

  // Bus driver
  tristate_buf #(.W(DW)) u_tris (.oe_n(!E), .d(OUTMUX), .bus(DATA));

  // Counters
  counter #(.W(DW)) u_xr  (.d(DATA), .clk(CLK), .load(!x_l_n),  .inc(!x_i_n),  .clr(1'b0), .q(xreg));
  counter #(.W(DW)) u_pcr (.d(DATA), .clk(CLK), .load(!pc_l_n), .inc(!pc_i_n), .clr(rst),  .q(pcreg));

  // Registers
  register8 #(.W(DW)) u_mar   (.d(DATA), .clk(CLK), .load(!mar_l_n),  .q(marreg));
  register8 #(.W(DW)) u_outrg (.d(DATA), .clk(CLK), .load(out_ld),    .q(OUTPUT_PORT));
  register1bit        u_zr    (.d(zalu), .clk(CLK), .load(!z_l_n),    .q(zreg));
  register1bit        u_cr    (.d(calu), .clk(CLK), .load(!c_l_n),    .q(creg));
  register8 #(.W(DW)) u_accr  (.d(alur), .clk(CLK), .load(!acca_l_n), .q(accar));
  latch1    #(.W(DW)) u_insl  (.d(DATA), .clk(CLK), .load(!inst_l_n), .q(instr));

  // ALU
  alu u_alu (.alu_ctl, .x(xreg), .data(DATA), .acca(accar), .z(zalu), .c(calu), .result(alur));

  // Control
  control u_control (
    .instr, .tin(TIN), .tout(TOUT), .clk(CLK), .rst, .zreg, .creg,
    .alu_ctl, .mem_sel, .inst_l_n, .pc_i_n, .pc_l_n, .acca_l_n, .mar_l_n,
    .c_l_n, .z_l_n, .x_i_n, .x_l_n, .read_n, .store_n(STORE)
  );

  // Strobe logic
  combina u_combina (
    .rst, .ext_w(!EXT_W), .store(!STORE), .addr_ff(!addr_ff_n), .ext_r(!EXT_R),
    .read(!read_n), .m_w_n(M_W), .m_r_n(M_R), .inmux1(INMUX1), .out_ld
  );

  // Bus rules: the processor never drives DATA while the RAM is asked to,
  // and never asks for a read and a write of the RAM in the same cycle.
  a_no_bus_contention: assert property (@(posedge CLK) !(E && !MEM_CS && !M_R));
  a_read_xor_write:    assert property (@(posedge CLK) !(!M_R && !M_W));

endmodule
