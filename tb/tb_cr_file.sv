// tb_cr_file: random accesses from both sides of the control register file
// against a model; checks both read ports, the processor's priority on a
// same-register write, and the DMA request raised by each processor write to
// the output register and cleared by the acknowledge.
module tb_cr_file;
  logic clk = 0; always #5 clk = ~clk;
  logic rst, hwe, awe, ack, req; logic [3:0] ha, aa; logic [7:0] hwd, hrd, awd, ard;
  int checks = 0, failures = 0, n_req = 0;

  cr_file dut (.clk, .rst, .host_addr(ha), .host_we(hwe), .host_wdata(hwd), .host_rdata(hrd),
    .ap_addr(aa), .ap_we(awe), .ap_wdata(awd), .ap_rdata(ard), .dma_req(req), .dma_ack(ack));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] m[16]; logic mreq;
    rst = 1; hwe = 0; awe = 0; ack = 0; ha = 0; aa = 0; hwd = 0; awd = 0;
    @(posedge clk); #1; rst = 0;
    for (int k = 0; k < 16; k++) m[k] = 0;
    mreq = 0;
    for (int n = 0; n < 5000; n++) begin
      hwe = 1'($urandom); awe = 1'($urandom); ha = 4'($urandom); aa = 4'($urandom);
      if ($urandom_range(0, 3) == 0) aa = ha;
      hwd = 8'($urandom); awd = 8'($urandom);
      ack = mreq && ($urandom_range(0, 2) == 0);
      #1;
      check("host read", hrd, m[ha]);
      check("ap read", ard, m[aa]);
      check("dma_req", req, mreq);
      @(posedge clk); #1;
      if (hwe && !(awe && aa == ha)) m[ha] = hwd;
      if (awe) m[aa] = awd;
      if (awe && aa == 4'd15) begin mreq = 1; n_req++; end
      else if (ack) mreq = 0;
    end
    hwe = 0; awe = 0; ack = 0;
    if (n_req == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
