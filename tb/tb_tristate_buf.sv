// tb_tristate_buf: checks that the driver puts its input on the bus while
// enabled and releases the bus, letting a second driver win, while disabled.
module tb_tristate_buf;
  int checks = 0, failures = 0;
  logic       oe_n, other_en;
  logic [7:0] d, other;
  wire  [7:0] bus;

  tristate_buf #(.W(8)) dut (.oe_n, .d, .bus);
  assign bus = other_en ? other : 8'bz;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d = 8'($urandom);
      other = ~d;
      oe_n = i[0];
      other_en = oe_n;
      #1;
      checks++;
      if (bus !== (oe_n ? other : d)) begin
        failures++;
        $display("FAIL oe_n=%b d=%02h bus=%02h", oe_n, d, bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
