// tb_register1bit: random loads and holds of the flag register against a
// reference model.
module tb_register1bit;
  int checks = 0, failures = 0;
  logic clk = 0, load, d, q, model;

  register1bit dut (.d, .clk, .load, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1; d = 1;
    @(negedge clk);
    model = 1;
    for (int i = 0; i < 1000; i++) begin
      load = ($urandom % 3) == 0;
      d    = 1'($urandom);
      @(negedge clk);
      if (load) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL i=%0d q=%b exp=%b", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
