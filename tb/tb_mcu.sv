// tb_mcu: runs a short microprogram through the microprogram control unit
// and checks the sequence of fetched addresses. The program covers a DOW
// repeated under counter control, a call that stacks the counter and a return
// that restores it, a conditional jump, the JEXT dispatch through the AP-bus,
// and an LSU/LOC loop counted by the iteration counter.
module tb_mcu;
  import ap_pkg::*;
  import ap_asm_pkg::*;
  logic clk = 0; always #5 clk = ~clk;
  logic rst, cm_we; logic [11:0] cm_waddr; logic [31:0] cm_wdata;
  logic [15:0] cond; logic [7:0] bus;
  uinstr_t ui; logic proc_valid, bm_load, bm_rd, cr_we, ctr_ofl, repeating, cond_true;
  bus_src_e bus_src; logic [7:0] bm_load_val, ctr_value; logic [11:0] uaddr;
  int checks = 0, failures = 0;

  mcu dut (.clk, .rst, .cm_we, .cm_waddr, .cm_wdata, .cond, .bus, .ui, .proc_valid, .bus_src,
    .bm_load, .bm_load_val, .bm_rd, .cr_we, .ctr_value, .ctr_ofl, .uaddr, .repeating, .cond_true);

  assign cond = {1'b0, ctr_ofl, 12'd0, 1'b1, 1'b0};   // SIGN1 true
  assign bus  = 8'hc6;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  task automatic put(int a, logic [31:0] w);
    cm_we = 1; cm_waddr = 12'(a); cm_wdata = w; @(posedge clk); #1; cm_we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_seq[$] = '{0, 1, 2, 3, 10, 11, 4, 7, 134, 135, 136, 137, 136, 137, 136, 137, 138, 138};
    int got_seq[$];
    int reps = 0, cycles = 0;
    rst = 1; cm_we = 0; cm_waddr = 0; cm_wdata = 0;
    for (int a = 0; a < 4096; a++) put(a, seqc(OP_JOC, ALWAYS, 12'(a)));  // parking loops
    put(0,   aux(OP_LDCTR, 8'd253));
    put(1,   proc(OP_DOW, DS_NOP, FN_ADD, SRC_AB, 0, 0, 3'b001, cnd(C_CTROFL, 1)));
    put(2,   aux(OP_LDCTR, 8'd77));
    put(3,   seqc(OP_COC, ALWAYS, 12'd10));
    put(4,   seqc(OP_JOC, cnd(C_SIGN1), 12'd7));
    put(5,   proc(OP_DO, DS_NOP, FN_ADD, SRC_AB, 0, 0, 3'b001));
    put(7,   fetch(6'd2, 4'd5));
    put(10,  aux(OP_LDCTR, 8'd250));
    put(11,  seqc(OP_ROC, ALWAYS, 12'd0));
    put(134, aux(OP_LDCTR, 8'd253));
    put(135, proc(OP_LSU, DS_NOP, FN_ADD, SRC_AB, 0, 0, 3'b001));
    put(136, proc(OP_DO, DS_NOP, FN_ADD, SRC_AB, 0, 0, 3'b001));
    put(137, proc(OP_LOC, DS_NOP, FN_ADD, SRC_AB, 0, 0, 3'b001, cnd(C_CTROFL, 1)));
    @(posedge clk); #1; rst = 0;
    while (got_seq.size() < exp_seq.size() && cycles < 100) begin
      if (repeating) reps++;
      else got_seq.push_back(int'(uaddr));
      if (ui.opc == OP_JEXT) check("JEXT reads the CR file", bus_src, BUS_CR);
      if (ui.opc == OP_JOC && ui[11:0] == 12'd7) check("counter restored by RET", ctr_value, 77);
      if (ui.opc == OP_DO) check("proc_valid", proc_valid, 1);
      if (ui.opc == OP_DOW) check("DOW executes only while its condition holds", proc_valid, !ctr_ofl);
      @(posedge clk); #1; cycles++;
    end
    check("sequence length", got_seq.size(), exp_seq.size());
    foreach (exp_seq[k]) check($sformatf("address %0d", k), got_seq[k], exp_seq[k]);
    check("DOW repeats", reps, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
