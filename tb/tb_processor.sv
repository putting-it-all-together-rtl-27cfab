// tb_processor: the processor with a RAM model. In reset it writes one byte
// and reads it back through the external-access path. Then it runs a
// program that covers every instruction, taken and untaken branches, the
// input port (LDAA 0xFF) and the output port (STAA 0xFF):
//   00 LDAA #2A   02 ADAA F0 (M[F0]=EB: 2A+EB = 15, carry)   04 STAA F1
//   06 LDAA FF    08 STAA FF   0A JCS 0E (taken)   0C LDAA #77 (skipped)
//   0E LDX #40    10 LDAA 0,X  11 INX   12 CPX #41   14 JEQ 18 (taken)
//   16 LDAA #66 (skipped)   18 CPX #50   1A JEQ 00 (not taken)
//   1C CPX #05    1E JCS 00 (not taken)  20 JMP 20
// It checks the clock cycle of every opcode fetch (two cycles per
// instruction, three for LDAA/ADAA/STAA with a memory address), the
// registers after each instruction, and the bus and strobes during stores.
module tb_processor;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, resn, ext_w, ext_r;
  logic [7:0] input_port, ext_addr, addr, output_port, outmux;
  logic mem_cs, m_r, m_w, e, inmux1, store;
  tstate_t tin, tout;
  wire  [7:0] data;
  logic tb_drv;
  logic [7:0] tb_val;

  processor dut (.CLK(clk), .RESN(resn), .EXT_W(ext_w), .EXT_R(ext_r), .INPUT_PORT(input_port),
                 .EXT_ADDR(ext_addr), .MEM_CS(mem_cs), .M_R(m_r), .M_W(m_w), .DATA(data),
                 .ADDR(addr), .OUTPUT_PORT(output_port), .TIN(tin), .TOUT(tout), .E(e),
                 .OUTMUX(outmux), .INMUX1(inmux1), .STORE(store));
  sram_model ram (.clk, .cs_n(mem_cs), .oe_n(m_r), .we_n(m_w), .addr, .data);
  assign data = tb_drv ? tb_val : 8'bz;
  always #5 clk = ~clk;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected opcode fetches: cycle number and address
  int fetch_cyc [18] = '{0, 2, 5, 8, 11, 14, 16, 18, 20, 22, 24, 26, 28, 30, 32, 34, 36, 38};
  logic [7:0] fetch_pc [18] = '{8'h00, 8'h02, 8'h04, 8'h06, 8'h08, 8'h0A, 8'h0E, 8'h10, 8'h11,
                                8'h12, 8'h14, 8'h18, 8'h1A, 8'h1C, 8'h1E, 8'h20, 8'h20, 8'h20};
  logic [7:0] prog [34] = '{8'h02, 8'h2A, 8'h04, 8'hF0, 8'h03, 8'hF1, 8'h01, 8'hFF, 8'h03, 8'hFF,
                            8'h0B, 8'h0E, 8'h02, 8'h77, 8'h09, 8'h40, 8'h05, 8'h06, 8'h07, 8'h41,
                            8'h08, 8'h18, 8'h02, 8'h66, 8'h07, 8'h50, 8'h08, 8'h00, 8'h07, 8'h05,
                            8'h0B, 8'h00, 8'h0A, 8'h20};

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nf;
    for (int i = 0; i < 256; i++) ram.mem[i] = 8'h00;
    for (int i = 0; i < 34; i++) ram.mem[i] = prog[i];
    ram.mem[8'hF0] = 8'hEB;
    ram.mem[8'hFF] = 8'hAB;
    input_port = 8'hC3;
    resn = 0; ext_w = 1; ext_r = 1; ext_addr = 8'h00; tb_drv = 0; tb_val = 0;
    repeat (2) @(negedge clk);
    // external write of 5C to 40 while in reset
    chk("reset: processor releases the bus", !e && store && tout == T0);
    ext_addr = 8'h40; ext_w = 0; tb_drv = 1; tb_val = 8'h5C;
    #1 chk("reset: external write strobes", addr == 8'h40 && !mem_cs && !m_w && m_r);
    @(negedge clk);
    ext_w = 1; tb_drv = 0; ext_r = 0;
    #1 chk("reset: external read returns written byte", !m_r && data == 8'h5C);
    @(negedge clk);
    ext_r = 1; ext_addr = 8'h00;
    chk("reset: PC cleared", dut.pcreg == 8'h00);
    resn = 1;
    nf = 0;
    for (int n = 0; n < 40; n++) begin
      #1;
      if (tout == T0) begin
        chk($sformatf("fetch %0d at cycle %0d (exp %0d) addr %02h (exp %02h)", nf, n,
                      nf < 18 ? fetch_cyc[nf] : -1, addr, nf < 18 ? fetch_pc[nf] : 8'h00),
            nf < 18 && n == fetch_cyc[nf] && addr == fetch_pc[nf] && !m_r && !mem_cs);
        nf++;
      end
      case (n)
        2:  chk("LDAA #2A -> ACCA 2A", dut.accar == 8'h2A && dut.zreg == 1'b0);
        5:  chk("ADAA F0 -> ACCA 15, C=1, Z=0", dut.accar == 8'h15 && dut.creg && !dut.zreg);
        7:  chk("STAA F1 store cycle: bus 15 to F1, MEM_CS and M_W low",
                addr == 8'hF1 && data == 8'h15 && !mem_cs && !m_w && m_r && e && !store);
        8:  chk("STAA F1 -> M[F1] = 15", ram.mem[8'hF1] == 8'h15);
        10: chk("LDAA FF read cycle: input port on bus, memory not selected",
                addr == 8'hFF && mem_cs && inmux1 && e && data == 8'hC3);
        11: chk("LDAA FF -> ACCA C3", dut.accar == 8'hC3);
        13: chk("STAA FF store cycle: memory not selected", addr == 8'hFF && mem_cs && data == 8'hC3);
        14: chk("STAA FF -> output port C3, RAM untouched",
                output_port == 8'hC3 && ram.mem[8'hFF] == 8'hAB && ram.mem[8'hF1] == 8'h15);
        18: chk("LDX #40 -> X 40", dut.xreg == 8'h40);
        19: chk("LDAA 0,X reads address X", addr == 8'h40 && !m_r);
        20: chk("LDAA 0,X -> ACCA 5C (written in reset)", dut.accar == 8'h5C);
        22: chk("INX -> X 41", dut.xreg == 8'h41);
        24: chk("CPX #41 -> Z=1 C=0", dut.zreg && !dut.creg);
        28: chk("CPX #50 -> Z=0 C=1", !dut.zreg && dut.creg);
        32: chk("CPX #05 -> Z=0 C=0, skipped loads not done", !dut.zreg && !dut.creg && dut.accar == 8'h5C);
        default: ;
      endcase
      @(negedge clk);
    end
    chk("all fetches seen", nf == 18);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
