// tb_cond_flags: drives random slice status into the condition flag register
// and checks all sixteen conditions against a model of the stored flags,
// including that inactive slices and idle cycles leave the flags unchanged.
module tb_cond_flags;
  import ap_pkg::*;
  logic clk = 0; always #5 clk = ~clk;
  logic rst, pv, r0, r23, ofl, busy; logic [2:0] en;
  slice_status_t [2:0] st;
  logic [15:0] cond;
  int checks = 0, failures = 0;

  cond_flags dut (.clk, .rst, .proc_valid(pv), .slice_en(en), .status(st), .ram0(r0),
                  .ram23(r23), .ctr_ofl(ofl), .dma_busy(busy), .cond);

  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [2:0] s, c, o, z; logic m0, m23; logic [15:0] e;
    s = 0; c = 0; o = 0; z = 0; m0 = 0; m23 = 0;
    rst = 1; pv = 0; en = 0; st = '0; r0 = 0; r23 = 0; ofl = 0; busy = 0;
    @(posedge clk); #1; rst = 0;
    for (int n = 0; n < 3000; n++) begin
      pv = 1'($urandom); en = 3'($urandom); st = 12'($urandom);
      r0 = 1'($urandom); r23 = 1'($urandom); ofl = 1'($urandom); busy = 1'($urandom);
      @(posedge clk); #1;
      if (pv) begin
        for (int k = 0; k < 3; k++) if (en[k]) begin
          s[k] = st[k].sign; c[k] = st[k].carry; o[k] = st[k].ovr; z[k] = st[k].zero;
        end
        if (en[0]) m0 = r0;
        if (en[2]) m23 = r23;
      end
      e = {busy, ofl, m23, m0, !(z[0] && z[1] && z[2]), !(z[0] && z[1]),
           z[2], z[1], z[0], o[1], o[0], c[2], s[2], s[1], s[0], 1'b0};
      checks++;
      if (cond !== e) begin
        failures++; $display("FAIL cond=%b expected %b", cond, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
