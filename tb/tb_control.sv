// tb_control: runs random instruction streams through the control unit with
// its timing-state loop closed and a model instruction latch, and compares
// every cycle's strobes, ALU control and address select with the
// instruction timing table, and every instruction's cycle count (two, or
// three for the memory-direct LDAA/ADAA/STAA). Also checks reset.
module tb_control;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, zreg, creg;
  logic [7:0] instr;
  tstate_t tout;
  alu_op_t alu_ctl;
  mem_sel_t mem_sel;
  logic inst_l_n, pc_i_n, pc_l_n, acca_l_n, mar_l_n, c_l_n, z_l_n, x_i_n, x_l_n, read_n, store_n;
  logic [10:0] got, exp;

  // strobe order: inst_l pc_i pc_l acca_l mar_l c_l z_l x_i x_l read store
  localparam logic [10:0] FETCH = 11'b11000000010;

  control dut (.instr, .tin(tout), .tout, .clk, .rst, .zreg, .creg, .alu_ctl, .mem_sel,
               .inst_l_n, .pc_i_n, .pc_l_n, .acca_l_n, .mar_l_n, .c_l_n, .z_l_n,
               .x_i_n, .x_l_n, .read_n, .store_n);
  always #5 clk = ~clk;

  assign got = ~{inst_l_n, pc_i_n, pc_l_n, acca_l_n, mar_l_n, c_l_n, z_l_n, x_i_n, x_l_n, read_n, store_n};

  // expected behaviour of execute cycle k (1 or 2) of opcode op
  function automatic void expect_cycle(input logic [7:0] op, input int k, input logic z, input logic c,
                                       output logic [10:0] s, output mem_sel_t ms, output alu_op_t a,
                                       output logic last);
    s = '0; ms = SEL_PC; a = ALU_PASS; last = 1'b1;
    if (k == 1) begin
      case (op)
        8'h02: s = 11'b01010010010;                             // LDAA #
        8'h05: begin s = 11'b00010010010; ms = SEL_X; end       // LDAA 0,X
        8'h01, 8'h03, 8'h04: begin s = 11'b01001000010; last = 1'b0; end
        8'h09: s = 11'b01000000110;                             // LDX #
        8'h06: s = 11'b00000001000;                             // INX
        8'h07: begin s = 11'b01000110010; a = ALU_CMPX; end     // CPX #
        8'h0A: s = 11'b00100000010;                             // JMP
        8'h08: s = z ? 11'b00100000010 : 11'b01000000010;       // JEQ
        8'h0B: s = c ? 11'b00100000010 : 11'b01000000010;       // JCS
        default: s = '0;
      endcase
    end else begin
      ms = SEL_MAR;
      case (op)
        8'h01: s = 11'b00010010010;
        8'h04: begin s = 11'b00010110010; a = ALU_ADD; end
        8'h03: s = 11'b00000000001;
        default: s = '0;
      endcase
    end
  endfunction

  task automatic cmp(input string what, input logic [10:0] es, input mem_sel_t ems, input alu_op_t ea);
    checks++;
    if (got !== es || mem_sel !== ems || alu_ctl !== ea) begin
      failures++;
      $display("FAIL %s instr=%02h t=%0d got=%011b exp=%011b sel=%0d/%0d alu=%0d/%0d",
               what, instr, tout, got, es, mem_sel, ems, alu_ctl, ea);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] op;
    logic last;
    mem_sel_t ems;
    alu_op_t ea;
    int cycles;
    rst = 1; zreg = 0; creg = 0; instr = 8'h00;
    repeat (2) @(negedge clk);
    cmp("reset", '0, SEL_EXT, ALU_PASS);
    rst = 0;
    #1;
    for (int n = 0; n < 2000; n++) begin
      op = (n % 5 == 0) ? 8'($urandom) : 8'(1 + $urandom % 11);
      zreg = 1'($urandom); creg = 1'($urandom);
      // T0: fetch
      checks++;
      if (tout !== T0) begin failures++; $display("FAIL not in T0 at instruction start"); end
      cmp("fetch", FETCH, SEL_PC, ALU_PASS);
      @(posedge clk);
      instr <= op;  // what the instruction latch takes from the bus
      cycles = 1;
      for (int k = 1; k <= 2; k++) begin
        @(negedge clk);
        cycles++;
        expect_cycle(op, k, zreg, creg, exp, ems, ea, last);
        cmp("exec", exp, ems, ea);
        if (last) break;
      end
      @(negedge clk);
      checks++;
      if (cycles != ((op == 8'h01 || op == 8'h03 || op == 8'h04) ? 3 : 2)) begin
        failures++; $display("FAIL op %02h took %0d cycles", op, cycles);
      end
    end
    // reset in the middle of an instruction returns to T0
    @(posedge clk); rst <= 1;
    @(negedge clk);
    checks++;
    if (got !== '0 || mem_sel !== SEL_EXT) begin failures++; $display("FAIL strobes active in reset"); end
    @(negedge clk);
    checks++;
    if (tout !== T0) begin failures++; $display("FAIL reset did not return to T0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
