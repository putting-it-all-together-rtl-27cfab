// tb_decoder: checks the I/O address decoder on all 256 addresses.
module tb_decoder;
  int checks = 0, failures = 0;
  logic [7:0] addr;
  logic ff_n, notff_n;

  decoder dut (.addr, .addr_ff_n(ff_n), .addr_notff_n(notff_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      #1;
      checks++;
      if (ff_n !== (a != 255) || notff_n !== (a == 255)) begin
        failures++;
        $display("FAIL addr=%02h ff_n=%b notff_n=%b", addr, ff_n, notff_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
