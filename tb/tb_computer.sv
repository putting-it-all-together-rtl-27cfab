// tb_computer: end-to-end test of the whole computer with a RAM model.
//
// Phase 1: with the processor held in reset the memory loader writes the
// table-reader program and its table into the RAM through the processor's
// external-access path; the RAM is then compared with the expected image.
// Phase 2: reset is released and the program runs for three passes over
// the table. Every LDAA 0,X must read the next table address (0x0A..0x0F,
// then again from 0x0A) and load the table value into ACCA, one value every
// 10 clock cycles (LDAA, INX, CPX, JEQ and JMP or LDX at 2 cycles each).
// Phase 3: back in reset, the worked example program is placed in the RAM
// (LDAA #2A, ADAA F0, STAA F1, LDAA FF, STAA FF) and run; ACCA, carry, the
// stored byte, the input port read and the output port write are checked.
// Each mechanism is counted and a mechanism that never happened fails.
module tb_computer;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, resn, load_rst, ext_r;
  logic [7:0] input_port, addr, output_port, outmux;
  logic mem_cs, m_r, m_w, e, inmux1, store, load_done, load_cs, load_oe;
  tstate_t tin, tout;
  wire  [7:0] data;

  // mechanism counters
  int n_ext_write = 0, n_fetch = 0, n_ldaa_idx = 0, n_inx = 0, n_cpx_eq = 0, n_cpx_ne = 0;
  int n_jeq_taken = 0, n_jeq_not = 0, n_jmp = 0, n_ldx = 0, n_carry = 0, n_mem_store = 0;
  int n_in_port = 0, n_out_port = 0, n_three_cycle = 0;

  computer dut (.CLK(clk), .RESN(resn), .LOAD_RST(load_rst), .EXT_R(ext_r), .INPUT_PORT(input_port),
                .MEM_CS(mem_cs), .M_R(m_r), .M_W(m_w), .DATA(data), .ADDR(addr),
                .OUTPUT_PORT(output_port), .TIN(tin), .TOUT(tout), .OUTMUX(outmux), .E(e),
                .INMUX1(inmux1), .STORE(store), .LOAD_DONE(load_done), .LOAD_CS(load_cs),
                .LOAD_OE(load_oe));
  sram_model ram (.clk, .cs_n(mem_cs), .oe_n(m_r), .we_n(m_w), .addr, .data);
  always #5 clk = ~clk;

  logic [7:0] image [17] = '{8'h09, 8'h0A, 8'h05, 8'h06, 8'h07, 8'h10, 8'h08, 8'h00, 8'h0A, 8'h02,
                             8'h81, 8'h42, 8'h24, 8'h18, 8'h24, 8'h42, 8'h00};

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism monitor, sampled just before each rising edge
  always @(negedge clk) begin
    if (!resn && !m_w && !mem_cs) n_ext_write++;
    if (resn) begin
      if (tout == T0) n_fetch++;
      if (tout == T2) n_three_cycle++;
      if (tout == T1) begin
        case (dut.u_proc.instr)
          8'h05: n_ldaa_idx++;
          8'h06: n_inx++;
          8'h09: n_ldx++;
          8'h07: if (dut.u_proc.xreg == data) n_cpx_eq++; else n_cpx_ne++;
          8'h08: if (dut.u_proc.zreg) n_jeq_taken++; else n_jeq_not++;
          8'h0A: n_jmp++;
          default: ;
        endcase
      end
      if (!store && !mem_cs && !m_w) n_mem_store++;
      if (inmux1) n_in_port++;
      if (!store && mem_cs) n_out_port++;
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, last_load;
    logic [7:0] exp_addr;
    for (int i = 0; i < 256; i++) ram.mem[i] = 8'hEE;
    input_port = 8'h3C; ext_r = 1;
    // Phase 1: load memory while in reset
    resn = 0; load_rst = 1;
    @(negedge clk);
    load_rst = 0;
    k = 0;
    while (!load_done && k < 100) begin @(negedge clk); k++; end
    chk("loader finished", load_done && load_oe && load_cs);
    for (int a = 0; a < 17; a++)
      chk($sformatf("RAM[%02h]=%02h exp %02h", a, ram.mem[a], image[a]), ram.mem[a] == image[a]);
    chk("nothing written past 0x10", ram.mem[17] == 8'hEE);
    // external read while in reset
    ext_r = 0;
    #1 chk("external read in reset drives the bus", !m_r && data == 8'h09 && !e);
    @(negedge clk);
    ext_r = 1;

    // Phase 2: run the table-reader program
    resn = 1;
    k = 0; last_load = -1;
    for (int n = 0; n < 200 && k < 18; n++) begin
      #1;
      if (tout == T1 && dut.u_proc.instr == 8'h05) begin
        exp_addr = 8'h0A + 8'(k % 6);
        chk($sformatf("LDAA 0,X #%0d reads %02h (exp %02h)", k, addr, exp_addr),
            addr == exp_addr && !m_r && !mem_cs);
        @(negedge clk);
        chk($sformatf("ACCA=%02h exp %02h", dut.u_proc.accar, image[10 + k % 6]),
            dut.u_proc.accar == image[10 + k % 6]);
        if (last_load >= 0)
          chk($sformatf("one table value every 10 cycles (got %0d)", n - last_load), n - last_load == 10);
        last_load = n;
        k++;
      end else begin
        @(negedge clk);
      end
    end
    chk("three passes over the table", k == 18);

    // Phase 3: the worked example and the I/O ports
    resn = 0;
    @(negedge clk);
    for (int i = 0; i < 16; i++) ram.mem[i] = 8'h00;
    {ram.mem[0], ram.mem[1], ram.mem[2], ram.mem[3], ram.mem[4], ram.mem[5]} =
      {8'h02, 8'h2A, 8'h04, 8'hF0, 8'h03, 8'hF1};
    {ram.mem[6], ram.mem[7], ram.mem[8], ram.mem[9], ram.mem[10], ram.mem[11]} =
      {8'h01, 8'hFF, 8'h03, 8'hFF, 8'h0A, 8'h0A};
    ram.mem[8'hF0] = 8'hEB; ram.mem[8'hF1] = 8'h00;
    @(negedge clk);
    resn = 1;
    repeat (2) @(negedge clk);
    chk("LDAA #2A in two cycles", dut.u_proc.accar == 8'h2A);
    repeat (3) @(negedge clk);
    chk("ADAA F0: ACCA 15 and carry", dut.u_proc.accar == 8'h15 && dut.u_proc.creg);
    if (dut.u_proc.creg) n_carry++;
    repeat (2) @(negedge clk);
    #1 chk("STAA F1: ACCA on bus, MEM_CS and M_W low", data == 8'h15 && addr == 8'hF1 && !mem_cs && !m_w);
    @(negedge clk);
    chk("M[F1] = 15", ram.mem[8'hF1] == 8'h15);
    repeat (3) @(negedge clk);
    chk("LDAA FF loads the input port", dut.u_proc.accar == 8'h3C);
    repeat (3) @(negedge clk);
    chk("STAA FF writes the output port", output_port == 8'h3C && ram.mem[8'hFF] == 8'hEE);
    repeat (4) @(negedge clk);

    chk("mechanism: external write in reset", n_ext_write == 17);
    chk("mechanism: opcode fetch", n_fetch > 0);
    chk("mechanism: three-cycle instruction", n_three_cycle > 0);
    chk("mechanism: LDX #", n_ldx > 0);
    chk("mechanism: LDAA 0,X", n_ldaa_idx > 0);
    chk("mechanism: INX", n_inx > 0);
    chk("mechanism: CPX equal", n_cpx_eq > 0);
    chk("mechanism: CPX not equal", n_cpx_ne > 0);
    chk("mechanism: JEQ taken", n_jeq_taken > 0);
    chk("mechanism: JEQ not taken", n_jeq_not > 0);
    chk("mechanism: JMP", n_jmp > 0);
    chk("mechanism: add with carry out", n_carry > 0);
    chk("mechanism: store to memory", n_mem_store > 0);
    chk("mechanism: input port read", n_in_port > 0);
    chk("mechanism: output port write", n_out_port > 0);
    $display("mechanisms: ext_write=%0d fetch=%0d ldx=%0d ldaa_idx=%0d inx=%0d cpx_eq=%0d cpx_ne=%0d jeq_taken=%0d jeq_not=%0d jmp=%0d carry=%0d store=%0d in=%0d out=%0d",
             n_ext_write, n_fetch, n_ldx, n_ldaa_idx, n_inx, n_cpx_eq, n_cpx_ne, n_jeq_taken,
             n_jeq_not, n_jmp, n_carry, n_mem_store, n_in_port, n_out_port);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
