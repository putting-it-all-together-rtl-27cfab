// tb_register8: random loads and holds against a reference model.
module tb_register8;
  int checks = 0, failures = 0;
  logic clk = 0, load;
  logic [7:0] d, q, model;

  register8 #(.W(8)) dut (.d, .clk, .load, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1; d = 8'h5A;
    @(negedge clk);
    model = 8'h5A;
    checks++;
    if (q !== model) begin failures++; $display("FAIL first load q=%02h", q); end
    for (int i = 0; i < 1000; i++) begin
      load = ($urandom % 3) == 0;
      d    = 8'($urandom);
      @(negedge clk);
      if (load) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL i=%0d q=%02h exp=%02h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
