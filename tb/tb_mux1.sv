// tb_mux1: drives random inputs and selects into the 4-to-1 multiplexer and
// compares the output with the selected input.
module tb_mux1;
  int checks = 0, failures = 0;
  logic [7:0] in0, in1, in2, in3, out, exp;
  logic [1:0] sel;

  mux1 #(.W(8)) dut (.in0, .in1, .in2, .in3, .sel, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      {in0, in1, in2, in3} = {$urandom, $urandom};
      sel = 2'(i % 4);
      #1;
      exp = (sel == 0) ? in0 : (sel == 1) ? in1 : (sel == 2) ? in2 : in3;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL sel=%0d out=%02h exp=%02h", sel, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
