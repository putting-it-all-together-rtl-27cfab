// tb_combina: all 64 input combinations of the strobe logic, compared with
// the intended behaviour written out case by case.
module tb_combina;
  int checks = 0, failures = 0;
  logic rst, ext_w, store, addr_ff, ext_r, read;
  logic m_w_n, m_r_n, inmux1, out_ld;
  logic e_w, e_r, e_in, e_out;

  combina dut (.rst, .ext_w, .store, .addr_ff, .ext_r, .read, .m_w_n, .m_r_n, .inmux1, .out_ld);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {rst, ext_w, store, addr_ff, ext_r, read} = 6'(v);
      #1;
      if (rst) begin
        // in reset only the external lines count
        e_w = !ext_w; e_r = !ext_r; e_in = 0; e_out = 0;
      end else begin
        e_w = !store; e_r = !read;
        e_in  = read && addr_ff;
        e_out = store && addr_ff;
      end
      checks++;
      if ({m_w_n, m_r_n, inmux1, out_ld} !== {e_w, e_r, e_in, e_out}) begin
        failures++;
        $display("FAIL in=%06b got=%04b exp=%04b", v, {m_w_n, m_r_n, inmux1, out_ld}, {e_w, e_r, e_in, e_out});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
