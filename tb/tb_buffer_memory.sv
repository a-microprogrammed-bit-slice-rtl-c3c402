// tb_buffer_memory: host writes to all 1K bytes, host reads back with the
// one-cycle read latency, then the processor side loads base addresses (in
// 4-byte units) and fetches runs of bytes with the autoincrementing address
// register.
module tb_buffer_memory;
  logic clk = 0; always #5 clk = ~clk;
  logic rst, hwe, ld, rd; logic [9:0] ha, aa; logic [7:0] hwd, hrd, lv, ard;
  int checks = 0, failures = 0;

  buffer_memory dut (.clk, .rst, .host_addr(ha), .host_we(hwe), .host_wdata(hwd), .host_rdata(hrd),
    .ap_load(ld), .ap_load_val(lv), .ap_rd(rd), .ap_rdata(ard), .ap_addr(aa));

  function automatic logic [7:0] pat(int a);
    return 8'((a * 37 + (a >> 8) * 11) ^ 8'h3c);
  endfunction
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int base;
    rst = 1; hwe = 0; ld = 0; rd = 0; ha = 0; hwd = 0; lv = 0;
    @(posedge clk); #1; rst = 0;
    check("addr after reset", aa, 0);
    for (int a = 0; a < 1024; a++) begin
      hwe = 1; ha = 10'(a); hwd = pat(a); @(posedge clk); #1;
    end
    hwe = 0;
    for (int n = 0; n < 200; n++) begin
      ha = 10'($urandom); @(posedge clk); #1;
      check("host read", hrd, pat(int'(ha)));
    end
    for (int n = 0; n < 100; n++) begin
      lv = 8'($urandom); ld = 1; @(posedge clk); #1; ld = 0;
      base = int'(lv) * 4;
      check("base address", aa, base);
      for (int k = 0; k < 9; k++) begin
        rd = 1; #1;
        check("ap byte", ard, pat((base + k) % 1024));
        @(posedge clk); #1;
      end
      rd = 0;
      check("address after run", aa, (base + 9) % 1024);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
