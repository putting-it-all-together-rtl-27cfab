// tb_alu: checks pass, add and compare-X on the worked example
// (0x2A + 0xEB = 0x15 with carry) and on random operands, flags included.
module tb_alu;
  import cpu_pkg::*;
  int checks = 0, failures = 0;
  alu_op_t    op;
  logic [7:0] x, data, acca, result;
  logic       z, c;

  alu dut (.alu_ctl(op), .x, .data, .acca, .z, .c, .result);

  task automatic check(input logic [7:0] er, input logic ez, input logic ec, input logic chk_c);
    checks++;
    if (result !== er || z !== ez || (chk_c && c !== ec)) begin
      failures++;
      $display("FAIL op=%0d x=%02h d=%02h a=%02h -> %02h z=%b c=%b, exp %02h z=%b c=%b",
               op, x, data, acca, result, z, c, er, ez, ec);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    op = ALU_ADD; acca = 8'h2A; data = 8'hEB; x = 8'h00; #1;
    check(8'h15, 1'b0, 1'b1, 1'b1);
    op = ALU_CMPX; x = 8'h10; data = 8'h10; #1;
    check(8'h00, 1'b1, 1'b0, 1'b1);
    op = ALU_PASS; data = 8'h00; #1;
    check(8'h00, 1'b1, 1'b0, 1'b1);
    for (int i = 0; i < 3000; i++) begin
      x = 8'($urandom); data = 8'($urandom); acca = 8'($urandom);
      if (i % 7 == 0) data = x;
      unique case (i % 3)
        0: begin op = ALU_PASS; #1; check(data, data == 0, 1'b0, 1'b1); end
        1: begin op = ALU_ADD;  #1; s = int'(acca) + int'(data);
                 check(8'(s), 8'(s) == 0, s > 255, 1'b1); end
        default: begin op = ALU_CMPX; #1;
                 check(8'(int'(x) - int'(data)), x == data, x < data, 1'b1); end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
