// tb_counter: random clear/load/increment sequences against a reference
// model with priority clear > load > increment, including wrap-around.
module tb_counter;
  int checks = 0, failures = 0;
  logic clk = 0, load, inc, clr;
  logic [7:0] d, q, model;
  int n_wrap = 0;

  counter #(.W(8)) dut (.d, .clk, .load, .inc, .clr, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; load = 0; inc = 0; d = 0;
    @(negedge clk);
    model = 0;
    for (int i = 0; i < 1500; i++) begin
      clr  = ($urandom % 20) == 0;
      load = ($urandom % 6) == 0;
      inc  = ($urandom % 3) != 0;
      d    = ($urandom % 4 == 0) ? 8'hFE : 8'($urandom);
      @(negedge clk);
      if (clr) model = 0;
      else if (load) model = d;
      else if (inc) begin
        if (model == 8'hFF) n_wrap++;
        model = model + 1;
      end
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL i=%0d q=%02h exp=%02h", i, q, model);
      end
    end
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL no wrap-around exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
