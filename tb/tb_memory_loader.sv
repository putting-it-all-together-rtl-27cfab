// tb_memory_loader: lets the loader run into a RAM model and checks the
// write protocol (one write per odd count, idle cycles in between, OE never
// asserted), the stored image, and that done rises after 2*17+1 clocks.
module tb_memory_loader;
  int checks = 0, failures = 0;
  logic clk = 0, rst, cs_n, oe_n, we_n, done;
  logic [7:0] addr;
  wire  [7:0] data;
  int writes = 0, done_at = -1, prev_write = -1;
  logic [7:0] image [17] = '{8'h09, 8'h0A, 8'h05, 8'h06, 8'h07, 8'h10, 8'h08, 8'h00, 8'h0A, 8'h02,
                             8'h81, 8'h42, 8'h24, 8'h18, 8'h24, 8'h42, 8'h00};

  memory_loader dut (.clk, .rst, .cs_n, .oe_n, .we_n, .addr, .data, .done);
  sram_model ram (.clk, .cs_n, .oe_n, .we_n, .addr, .data);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) ram.mem[i] = 8'hEE;
    rst = 1;
    @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 60; cyc++) begin
      // sample in the middle of the cycle that follows clock edge number cyc
      checks++;
      if (oe_n !== 1'b1 || cs_n !== we_n) begin failures++; $display("FAIL strobes cyc=%0d", cyc); end
      if (!we_n) begin
        checks++;
        if (addr !== 8'(writes) || data !== image[writes] || cyc - prev_write != 2) begin
          failures++;
          $display("FAIL write %0d at cyc %0d addr=%02h data=%02h", writes, cyc, addr, data);
        end
        prev_write = cyc;
        writes++;
      end
      if (done && done_at < 0) done_at = cyc;
      @(negedge clk);
    end
    checks++;
    if (writes != 17) begin failures++; $display("FAIL %0d writes", writes); end
    checks++;
    if (done_at != 35) begin failures++; $display("FAIL done at count %0d", done_at); end
    for (int a = 0; a < 17; a++) begin
      checks++;
      if (ram.mem[a] !== image[a]) begin failures++; $display("FAIL mem[%02h]=%02h", a, ram.mem[a]); end
    end
    checks++;
    if (ram.mem[17] !== 8'hEE) begin failures++; $display("FAIL wrote past the image"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
