// tb_ap_fsin_fcos_workload: FSIN and FCOS on the processor at its default
// sizes, as microprograms built from the shared subroutine library: load the
// argument from the buffer memory, square it with FMUL, evaluate a Horner
// polynomial in the square by repeated FMUL, LDB and FADD calls over
// coefficients the host keeps in the buffer memory (Taylor coefficients up
// to the 11th power for the sine, the 12th for the cosine), multiply by the
// argument for the sine, pack, and pass the four result bytes out through
// CR15 and the DMA channel. The polynomial step count is held in a slice
// register, since FMUL occupies the LSU/LOC loop register. Arguments lie in
// [-pi/2, pi/2]; reduction of larger arguments is not part of this test.
//
// The host starts the operation with code 9 (FSIN) or 10 (FCOS) in CR0; the
// processor clears CR0 when it is done. Each result is compared bit for bit
// with a model of the same algorithm and with the real function to an
// absolute error of 2^-20. Cycle counts from command to last result byte and
// the largest error are reported.
module tb_ap_fsin_fcos_workload;
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
    for (int k = 0; k < 2; k++) begin                      // codes 9 FSIN, 10 FCOS
      cs[73 + k]      = jmp(740 + 10 * k);
      cs[740 + 10 * k] = aux(OP_LDCTR, 8'h80);
      cs[741 + 10 * k] = proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd15, S13);
      cs[742 + 10 * k] = aux(OP_LABM, 8'd0);
      cs[743 + 10 * k] = call(LDA);
      cs[744 + 10 * k] = call(k == 0 ? FSIN : FCOS);
      cs[745 + 10 * k] = call(OUTF);
      cs[746 + 10 * k] = proc(OP_WRCR, DS_NOP, FN_AND, SRC_ZA, 4'd0, 4'd0, S1);
      cs[747 + 10 * k] = jmp(0);
    end
    for (int a = 0; a < 4096; a++) put(a, cs[a]);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] st[], ct[];
    int cmin[2], cmax[2];
    real maxerr[2];
    rst = 1; cm_we = 0; cm_waddr = 0; cm_wdata = 0; bm_we = 0; bm_addr = 0; bm_wdata = 0;
    cr_we = 0; cr_addr_main = 0; cr_wdata = 0;
    load_microprogram();
    sin_cos_tables(st, ct);
    foreach (st[i]) for (int j = 0; j < 4; j++) bm_write(4 * SIN_TAB + 4 * i + j, st[i][8*j +: 8]);
    foreach (ct[i]) for (int j = 0; j < 4; j++) bm_write(4 * COS_TAB + 4 * i + j, ct[i][8*j +: 8]);
    @(posedge clk); #1; rst = 0;
    for (int f = 0; f < 2; f++) begin
      cmin[f] = 1 << 30; cmax[f] = 0; maxerr[f] = 0.0;
      for (int n = 0; n < 60; n++) begin
        logic [31:0] a, got, exp;
        int cyc;
        real x, rt, err;
        x = (real'($urandom_range(0, 200000)) / 100000.0 - 1.0) * 1.5707963;
        if (n == 0) x = 0.0;
        if (n == 1) x = 1.5707963;
        if (n == 2) x = -1.5707963;
        if (n == 3) x = 1.0e-3;
        a = from_real(x);
        for (int j = 0; j < 4; j++) bm_write(j, a[8*j +: 8]);
        out_q.delete();
        cr_write(0, 8'(9 + f));
        cr_addr_main = 4'd0; #1;
        cyc = 1;
        while ((cr_rdata != 0 || dma_busy) && cyc < 100000) begin @(posedge clk); #1; cyc++; end
        check(f == 0 ? "FSIN finished" : "FCOS finished", int'(cyc < 100000), 1);
        check("result bytes", out_q.size(), 4);
        if (out_q.size() != 4) continue;
        got = {out_q[3], out_q[2], out_q[1], out_q[0]};
        exp = pack(f == 0 ? fsin(unpack(a), st) : fcos(unpack(a), ct));
        check($sformatf("%s(%h) bit-exact", f == 0 ? "FSIN" : "FCOS", a), got, exp);
        x = to_real(unpack(a));
        rt = (f == 0) ? $sin(x) : $cos(x);
        err = to_real(unpack(got)) - rt;
        if (err < 0) err = -err;
        if (err > maxerr[f]) maxerr[f] = err;
        check($sformatf("%s(%g) = %h near %g", f == 0 ? "FSIN" : "FCOS", x, got, rt), int'(err <= 2.0 ** -20), 1);
        if (cyc < cmin[f]) cmin[f] = cyc;
        if (cyc > cmax[f]) cmax[f] = cyc;
      end
    end
    $display("FSIN: %0d-%0d cycles, largest error %g", cmin[0], cmax[0], maxerr[0]);
    $display("FCOS: %0d-%0d cycles, largest error %g", cmin[1], cmax[1], maxerr[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
