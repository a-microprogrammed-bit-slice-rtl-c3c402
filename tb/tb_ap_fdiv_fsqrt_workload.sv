// tb_ap_fdiv_fsqrt_workload: floating-point division FDIV (a / b) and square
// root FSQRT on the processor at its default sizes, as microprograms built
// from the shared subroutine library.
//
// FDIV: load both operands from the buffer memory, divide by restoring
// division (one quotient bit per pass of an LSU/LOC loop counted by the
// iteration counter; the bit shifted out of the remainder is caught in the
// SIGN3 flag of the shifting instruction), pack, and pass the four result
// bytes out through CR15 and the DMA channel.
//
// FSQRT: five Newton steps s := (a/s + s)/2, each a call of the FDIV and
// FADD subroutines, from a start value with the exponent of a halved.
//
// The host writes a in BM bytes 0-3 and b in bytes 4-7 and starts the
// operation with code 7 (FDIV) or 8 (FSQRT) in CR0; the processor clears CR0
// when it is done. FSQRT results are compared bit for bit with the model and
// with the real square root to 2^-21.
// Each result is compared bit for bit with a model of the same algorithm and
// with real division to a relative error of 2^-22. Cases include a = 0,
// equal mantissas, a mantissa below and above b's, and both signs. The
// cycle count from command to last result byte is reported.
module tb_ap_fdiv_fsqrt_workload;
  import ap_pkg::*;
  import ap_asm_pkg::*;
  import ap_fplib_pkg::*;
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

  // DMA channel: acknowledges a request after a few cycles and stores the byte
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

  // passes of the division loop that subtracted and that did not
  int n_bit1 = 0, n_bit0 = 0;
  always @(posedge clk) if (!rst && dut.u_mcu.ui.opc == OP_LOC) begin
    if (dut.u_mcu.ui.si) n_bit1++; else n_bit0++;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
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

  task automatic load_microprogram();
    logic [31:0] cs[4096];
    for (int a = 0; a < 4096; a++) cs[a] = jmp(a);
    fplib_load(cs);
    cs[0]   = proc(OP_RDCR, DS_RAMF, FN_OR, SRC_DZ, 4'd0, 4'd12, S1);
    cs[1]   = seqc(OP_JOC, cnd(C_ZERO1), 12'd0);
    cs[2]   = fetch(6'd1, 4'd0);
    cs[71]  = jmp(710);                                   // code 7: FDIV
    cs[710] = aux(OP_LDCTR, 8'h80);
    cs[711] = proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd15, S13);
    cs[712] = aux(OP_LABM, 8'd0);
    cs[713] = call(LDA);
    cs[714] = call(LDB);
    cs[715] = call(FDIV);
    cs[716] = call(OUTF);
    cs[717] = proc(OP_WRCR, DS_NOP, FN_AND, SRC_ZA, 4'd0, 4'd0, S1);   // CR0 := 0
    cs[718] = jmp(0);
    cs[72]  = jmp(730);                                   // code 8: FSQRT
    cs[730] = aux(OP_LDCTR, 8'h80);
    cs[731] = proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd15, S13);
    cs[732] = aux(OP_LABM, 8'd0);
    cs[733] = call(LDA);
    cs[734] = call(FSQRT);
    cs[735] = call(OUTF);
    cs[736] = proc(OP_WRCR, DS_NOP, FN_AND, SRC_ZA, 4'd0, 4'd0, S1);
    cs[737] = jmp(0);
    for (int a = 0; a < 4096; a++) put(a, cs[a]);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_fp(int emin, int emax);
    return {8'($urandom_range(emin, emax)), 1'($urandom_range(0, 1)), 23'($urandom)};
  endfunction

  initial begin
    localparam int NOPS = 200;
    int cmin, cmax;
    rst = 1; cm_we = 0; cm_waddr = 0; cm_wdata = 0; bm_we = 0; bm_addr = 0; bm_wdata = 0;
    cr_we = 0; cr_addr_main = 0; cr_wdata = 0;
    cmin = 1 << 30; cmax = 0;
    load_microprogram();
    @(posedge clk); #1; rst = 0;
    for (int n = 0; n < NOPS; n++) begin
      logic [31:0] a, b, got, exp;
      int cyc;
      real ra, rb, rq, rg, err;
      a = rand_fp(100, 156); b = rand_fp(100, 156);
      if (n == 0) a = 32'd0;
      if (n == 1) a = {a[31:24], b[23:0]};                  // equal mantissas, quotient 1
      if (n == 2) begin a = {8'd130, 1'b0, 23'h0}; b = {8'd129, 1'b1, 23'h7fffff}; end
      if (n == 3) begin a = {8'd130, 1'b1, 23'h7fffff}; b = {8'd129, 1'b0, 23'h0}; end
      for (int j = 0; j < 4; j++) begin bm_write(j, a[8*j +: 8]); bm_write(4 + j, b[8*j +: 8]); end
      out_q.delete();
      cr_write(0, 8'd7);
      cr_addr_main = 4'd0; #1;
      cyc = 1;
      while ((cr_rdata != 0 || dma_busy) && cyc < 100000) begin @(posedge clk); #1; cyc++; end
      check("FDIV finished", int'(cyc < 100000), 1);
      if (cyc >= 100000) $display("stuck at %0d", uaddr);
      check("result bytes", out_q.size(), 4);
      if (out_q.size() != 4) continue;
      got = {out_q[3], out_q[2], out_q[1], out_q[0]};
      exp = pack(fdiv(unpack(a), unpack(b)));
      check($sformatf("FDIV %h / %h bit-exact", a, b), got, exp);
      ra = to_real(unpack(a)); rb = to_real(unpack(b)); rq = ra / rb; rg = to_real(unpack(got));
      err = (rq == 0.0) ? rg : (rg - rq) / rq;
      if (err < 0) err = -err;
      check($sformatf("FDIV %h / %h = %h near %g", a, b, got, rq), int'(err <= 2.0 ** -22), 1);
      if (n != 0 && cyc < cmin) cmin = cyc;
      if (cyc > cmax) cmax = cyc;
    end
    $display("FDIV: %0d-%0d cycles from command to last result byte (a non-zero)", cmin, cmax);
    cmin = 1 << 30; cmax = 0;
    for (int n = 0; n < 60; n++) begin
      logic [31:0] a, got, exp;
      int cyc;
      real ra, rq, rg, err;
      a = {8'($urandom_range(60, 200)), 1'b0, 23'($urandom)};
      if (n == 0) a = 32'd0;
      if (n == 1) a = {8'd129, 24'd0};                      // 1.0
      if (n == 2) a = {8'd131, 24'd0};                      // 4.0
      if (n == 3) a = {8'd130, 1'b0, 23'h7fffff};           // just under 4
      for (int j = 0; j < 4; j++) bm_write(j, a[8*j +: 8]);
      out_q.delete();
      cr_write(0, 8'd8);
      cr_addr_main = 4'd0; #1;
      cyc = 1;
      while ((cr_rdata != 0 || dma_busy) && cyc < 100000) begin @(posedge clk); #1; cyc++; end
      check("FSQRT finished", int'(cyc < 100000), 1);
      check("result bytes", out_q.size(), 4);
      if (out_q.size() != 4) continue;
      got = {out_q[3], out_q[2], out_q[1], out_q[0]};
      exp = pack(fsqrt(unpack(a)));
      check($sformatf("FSQRT %h bit-exact", a), got, exp);
      ra = to_real(unpack(a)); rq = $sqrt(ra); rg = to_real(unpack(got));
      err = (rq == 0.0) ? rg : (rg - rq) / rq;
      if (err < 0) err = -err;
      check($sformatf("FSQRT %h = %h near %g", a, got, rq), int'(err <= 2.0 ** -21), 1);
      if (n != 0 && cyc < cmin) cmin = cyc;
      if (cyc > cmax) cmax = cyc;
    end
    $display("FSQRT: %0d-%0d cycles from command to last result byte (a non-zero)", cmin, cmax);
    check("division passes that subtracted", int'(n_bit1 > 0), 1);
    check("division passes that did not", int'(n_bit0 > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
