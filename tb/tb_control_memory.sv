// tb_control_memory: fills the 4K x 32 control memory with a pattern, then
// reads it back in random order and checks every word.
module tb_control_memory;
  logic clk = 0; always #5 clk = ~clk;
  logic we; logic [11:0] wa, ra; logic [31:0] wd, rd;
  int checks = 0, failures = 0;

  control_memory dut (.clk, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rd));

  function automatic logic [31:0] pat(int a);
    return 32'(a) * 32'h9e3779b1 ^ 32'h5a5a0f0f;
  endfunction

  initial begin
    repeat (30000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0;
    for (int a = 0; a < 4096; a++) begin
      we = 1; wa = 12'(a); wd = pat(a); @(posedge clk); #1;
    end
    we = 0;
    for (int n = 0; n < 6000; n++) begin
      ra = 12'($urandom); #1;
      checks++;
      if (rd !== pat(int'(ra))) begin failures++; $display("FAIL addr %h: %h", ra, rd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
