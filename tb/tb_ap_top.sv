// tb_ap_top: end-to-end test of the arithmetics processor at its default
// sizes (4K-word control memory, 1K-byte buffer memory).
//
// The testbench plays the host: it loads a small microprogram, writes operands
// into the buffer memory and a macrofunction code into CR0, and collects the
// result bytes that the processor writes to the CR output register through a
// modelled DMA channel (request, a few busy cycles, acknowledge). The
// microprogram polls CR0 and dispatches with JEXT through a jump table to:
//   macro 1: load a 24-bit mantissa (slices 1-3) and an exponent (slice 1)
//            from the buffer memory, normalise the mantissa with a DOW that
//            shifts left while bit 23 is 0, read the shift count from the
//            iteration counter and subtract it from the exponent; output
//            exponent and mantissa bytes, and the shift count in CR1.
//   macro 2: add K 16-bit integers (slices 1+2) from the buffer memory in an
//            LSU/LOC loop counted by the iteration counter; each operand is
//            read by a subroutine that overwrites the counter, which the
//            call/return stacking restores; on 16-bit overflow CR1 = 0xEE.
// Results are compared with values computed here. The test counts each
// mechanism (DOW repeat, LOC loop-back, call/return, JEXT, DMA request and
// DMA-busy wait, each slice configuration, overflow) and fails if one never
// happens. The DOW cycle count per normalisation is checked (one cycle per
// shift plus one).
module tb_ap_top;
  import ap_pkg::*;
  import ap_asm_pkg::*;
  logic clk = 0; always #5 clk = ~clk;
  logic rst, cm_we, bm_we, cr_we, dma_req, dma_ack, dma_busy;
  logic [11:0] cm_waddr, uaddr; logic [31:0] cm_wdata;
  logic [9:0] bm_addr; logic [7:0] bm_wdata, bm_rdata;
  logic [3:0] cr_addr, cr_addr_main; logic [7:0] cr_wdata, cr_rdata;
  int checks = 0, failures = 0;

  ap_top dut (.clk, .rst, .cm_we, .cm_waddr, .cm_wdata,
    .bm_host_addr(bm_addr), .bm_host_we(bm_we), .bm_host_wdata(bm_wdata), .bm_host_rdata(bm_rdata),
    .cr_host_addr(cr_addr), .cr_host_we(cr_we), .cr_host_wdata(cr_wdata), .cr_host_rdata(cr_rdata),
    .dma_req, .dma_ack, .dma_busy, .uaddr);

  // ---------------- DMA channel model ----------------
  int dma_cnt = 0;
  byte unsigned out_q[$];
  assign dma_ack  = (dma_cnt == 1);
  assign dma_busy = dma_req || (dma_cnt != 0);
  assign cr_addr  = dma_ack ? 4'd15 : cr_addr_main;
  always @(posedge clk) begin
    if (dma_ack) out_q.push_back(cr_rdata);
    if (dma_cnt != 0) dma_cnt <= dma_cnt - 1;
    else if (dma_req) dma_cnt <= 4;
  end

  // ---------------- mechanism counters ----------------
  int n_dow_rep = 0, n_loc_back = 0, n_call = 0, n_ret = 0, n_jext = 0, n_dma = 0,
      n_dma_wait = 0, n_cfg8 = 0, n_cfg16 = 0, n_cfg24 = 0, n_ofl = 0, n_rdmem = 0;
  always @(posedge clk) if (!rst) begin
    uinstr_t u;
    u = dut.ui;
    if (dut.u_mcu.repeating) n_dow_rep++;
    if (u.opc == OP_LOC && dut.u_mcu.cond_true) n_loc_back++;
    if (u.opc == OP_COC && dut.u_mcu.cond_true) n_call++;
    if (u.opc == OP_ROC && dut.u_mcu.cond_true) n_ret++;
    if (u.opc == OP_JEXT) n_jext++;
    if (u.opc == OP_RDMEM) n_rdmem++;
    if (u.opc == OP_JOC && u.cnr == cnd(C_DMABUSY) && dut.u_mcu.cond_true) n_dma_wait++;
    if (dut.proc_valid && u.sc == 3'b001) n_cfg8++;
    if (dut.proc_valid && u.sc == 3'b011) n_cfg16++;
    if (dut.proc_valid && u.sc == 3'b111) n_cfg24++;
    if (dma_ack) n_dma++;
    if (uaddr == 12'd240) n_ofl++;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic put(int a, logic [31:0] w);
    cm_we = 1; cm_waddr = 12'(a); cm_wdata = w; @(posedge clk); #1; cm_we = 0;
  endtask

  task automatic bm_write(int a, byte unsigned v);
    bm_we = 1; bm_addr = 10'(a); bm_wdata = v; @(posedge clk); #1; bm_we = 0;
  endtask

  task automatic cr_write(int a, byte unsigned v);
    cr_we = 1; cr_addr_main = 4'(a); cr_wdata = v; @(posedge clk); #1; cr_we = 0;
  endtask

  // run a macrofunction and wait until the processor clears CR0
  task automatic run_cmd(byte unsigned code, output int cycles);
    cr_write(0, code);
    cr_addr_main = 4'd0;
    cycles = 0;
    repeat (3) @(posedge clk);
    #1;
    while ((cr_rdata != 0 || dma_ack || dma_busy) && cycles < 5000) begin
      @(posedge clk); #1; cycles++;
    end
  endtask

  localparam logic [2:0] S1 = 3'b001, S2 = 3'b010, S3 = 3'b100, S12 = 3'b011, S123 = 3'b111;

  task automatic load_microprogram();
    for (int a = 0; a < 4096; a++) put(a, seqc(OP_JOC, ALWAYS, 12'(a)));   // park everywhere
    // command loop
    put(0,  proc(OP_RDCR, DS_RAMF, FN_OR, SRC_DZ, 4'd0, 4'd15, S1));       // R15.1 := CR0
    put(1,  seqc(OP_JOC, cnd(C_ZERO1), 12'd0));
    put(2,  fetch(6'd1, 4'd0));                                             // to 64 + CR0
    put(65, seqc(OP_JOC, ALWAYS, 12'd100));
    put(66, seqc(OP_JOC, ALWAYS, 12'd200));
    // macro 1: normalise, mantissa at BM 32..34, exponent at 35
    put(100, aux(OP_LABM, 8'd8));
    put(101, proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd0, S1));
    put(102, proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd0, S2));
    put(103, proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd0, S3));
    put(104, proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd1, S1));
    put(105, aux(OP_LDCTR, 8'd0));
    put(106, proc(OP_DO,  DS_RAMF, FN_OR, SRC_ZB, 0, 4'd0, S123));          // flags of R0
    put(107, proc(OP_DOW, DS_RAMU, FN_OR, SRC_ZB, 0, 4'd0, S123, cnd(C_RAM23, 1)));
    put(108, proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd2, S1));         // R2 := shifts
    put(109, proc(OP_DO,  DS_RAMF, FN_SUBR, SRC_AB, 4'd2, 4'd1, S1, 5'd0, 0, 1)); // R1 -= R2
    put(110, proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd1, S1));       // exponent
    put(111, seqc(OP_JOC, cnd(C_DMABUSY), 12'd111));
    put(112, proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd0, S1));
    put(113, seqc(OP_JOC, cnd(C_DMABUSY), 12'd113));
    put(114, proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd0, S2));
    put(115, seqc(OP_JOC, cnd(C_DMABUSY), 12'd115));
    put(116, proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd0, S3));
    put(117, seqc(OP_JOC, cnd(C_DMABUSY), 12'd117));
    put(118, proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd1, 4'd2, S1));        // CR1 := shifts
    put(119, proc(OP_WRCR, DS_NOP, FN_AND, SRC_ZA, 4'd0, 4'd0, S1));       // CR0 := 0
    put(120, seqc(OP_JOC, ALWAYS, 12'd0));
    // macro 2: sum of K = CR2 16-bit integers at BM 64..
    put(200, aux(OP_LABM, 8'd16));
    put(201, proc(OP_RDCR, DS_RAMF, FN_OR, SRC_DZ, 4'd2, 4'd5, S1));       // R5 := K
    put(202, proc(OP_WRCTR, DS_RAMF, FN_SUBS, SRC_ZA, 4'd5, 4'd6, S1, 5'd0, 0, 1)); // ctr := -K
    put(203, proc(OP_DO,  DS_RAMF, FN_AND, SRC_ZA, 4'd7, 4'd7, S12));      // R7 := 0
    put(204, proc(OP_LSU, DS_NOP, FN_OR, SRC_ZB, 0, 4'd7, S12));
    put(205, seqc(OP_COC, ALWAYS, 12'd250));
    put(206, proc(OP_LOC, DS_RAMF, FN_ADD, SRC_AB, 4'd8, 4'd7, S12, cnd(C_CTROFL, 1)));
    put(207, seqc(OP_JOC, cnd(C_OFL2), 12'd240));
    put(208, proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd7, S1));
    put(209, seqc(OP_JOC, cnd(C_DMABUSY), 12'd209));
    put(210, proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd7, S2));
    put(211, seqc(OP_JOC, cnd(C_DMABUSY), 12'd211));
    put(212, proc(OP_WRCR, DS_NOP, FN_AND, SRC_ZA, 4'd0, 4'd0, S1));       // CR0 := 0
    put(213, seqc(OP_JOC, ALWAYS, 12'd0));
    put(240, aux(OP_LDCTR, 8'hee));
    put(241, proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd9, S1));
    put(242, proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd1, 4'd9, S1));        // CR1 := EE
    put(243, seqc(OP_JOC, ALWAYS, 12'd208));
    put(250, proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd8, S1));
    put(251, proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd8, S2));
    put(252, aux(OP_LDCTR, 8'h55));
    put(253, seqc(OP_ROC, ALWAYS, 12'd0));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dow_cycles;
  always @(posedge clk) if (!rst && dut.ui.opc == OP_DOW) dow_cycles++;

  initial begin
    int cyc;
    rst = 1; cm_we = 0; cm_waddr = 0; cm_wdata = 0; bm_we = 0; bm_addr = 0; bm_wdata = 0;
    cr_we = 0; cr_addr_main = 0; cr_wdata = 0;
    load_microprogram();
    @(posedge clk); #1; rst = 0;
    repeat (5) @(posedge clk); #1;
    check("idle processor polls CR0", int'(uaddr <= 12'd2), 1);

    // ---- macro 1: normalisation ----
    for (int n = 0; n < 24; n++) begin
      int m, e, lz, em, ee;
      m = (n < 23) ? (1 << n) | int'($urandom_range(0, (1 << n) - 1)) : int'($urandom) & 24'hffffff | 24'h800000;
      e = $urandom_range(30, 200);
      lz = 0;
      while (((m << lz) & 24'h800000) == 0) lz++;
      em = (m << lz) & 24'hffffff;
      ee = (e - lz) & 8'hff;
      bm_write(32, byte'(m)); bm_write(33, byte'(m >> 8)); bm_write(34, byte'(m >> 16));
      bm_write(35, byte'(e));
      out_q.delete();
      dow_cycles = 0;
      run_cmd(8'd1, cyc);
      check("macro 1 finished", int'(cyc < 5000), 1);
      check("macro 1 output bytes", out_q.size(), 4);
      if (out_q.size() == 4) begin
        check("exponent", out_q[0], ee);
        check("mantissa", {out_q[3], out_q[2], out_q[1]}, em);
      end
      cr_addr_main = 4'd1; #1;
      check("shift count in CR1", cr_rdata, lz);
      check("DOW cycles = shifts + 1", dow_cycles, lz + 1);
    end

    // ---- macro 2: integer sums ----
    for (int n = 0; n < 12; n++) begin
      int k, sum, v, ovf; logic [15:0] s16;
      k = (n == 11) ? 2 : $urandom_range(1, 20);
      sum = 0; ovf = 0; s16 = 0;
      for (int j = 0; j < k; j++) begin
        logic [15:0] a; logic [15:0] r;
        v = (n < 9) ? $urandom_range(0, 3000) : $urandom_range(0, 65535);
        if (n == 11) v = 16'h6000 + j;      // the last additions overflow
        a = 16'(v);
        r = s16 + a;
        // signed overflow of the last addition only is what the flag shows
        ovf = (s16[15] == a[15]) && (r[15] != a[15]);
        s16 = r;
        bm_write(64 + 2 * j, byte'(v)); bm_write(65 + 2 * j, byte'(v >> 8));
      end
      cr_write(1, 8'h00);
      cr_write(2, byte'(k));
      out_q.delete();
      run_cmd(8'd2, cyc);
      check("macro 2 finished", int'(cyc < 5000), 1);
      check("macro 2 output bytes", out_q.size(), 2);
      if (out_q.size() == 2) check("sum", {out_q[1], out_q[0]}, s16);
      cr_addr_main = 4'd1; #1;
      check("overflow status", cr_rdata, ovf ? 8'hee : 8'h00);
    end

    // every mechanism must have occurred
    check("DOW repeats seen",      int'(n_dow_rep  > 0), 1);
    check("LOC loop-backs seen",   int'(n_loc_back > 0), 1);
    check("calls seen",            int'(n_call > 0), 1);
    check("returns match calls",   n_ret, n_call);
    check("JEXT dispatches seen",  int'(n_jext > 0), 1);
    check("DMA transfers seen",    int'(n_dma > 0), 1);
    check("DMA busy waits seen",   int'(n_dma_wait > 0), 1);
    check("8-bit ops seen",        int'(n_cfg8 > 0), 1);
    check("16-bit ops seen",       int'(n_cfg16 > 0), 1);
    check("24-bit ops seen",       int'(n_cfg24 > 0), 1);
    check("overflow path seen",    int'(n_ofl > 0), 1);
    check("buffer reads seen",     int'(n_rdmem > 0), 1);
    $display("mechanisms: dow_rep=%0d loc_back=%0d call=%0d ret=%0d jext=%0d dma=%0d dma_wait=%0d cfg8=%0d cfg16=%0d cfg24=%0d ofl=%0d rdmem=%0d",
             n_dow_rep, n_loc_back, n_call, n_ret, n_jext, n_dma, n_dma_wait, n_cfg8, n_cfg16, n_cfg24, n_ofl, n_rdmem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
