// tb_cond_mux: exhaustive check of the condition multiplexer over every
// condition number, both polarities and random condition vectors.
module tb_cond_mux;
  logic [15:0] cond; logic [4:0] cnr; logic y;
  int checks = 0, failures = 0;
  cond_mux dut (.cond, .cnr, .y);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      cond = 16'($urandom);
      for (int c = 0; c < 32; c++) begin
        cnr = 5'(c); #1;
        checks++;
        if (y !== (((cond >> (c % 16)) & 1) != 0) ^ (c >= 16)) begin
          failures++; $display("FAIL cnr=%0d cond=%h y=%b", c, cond, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
