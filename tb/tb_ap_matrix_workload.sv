// tb_ap_matrix_workload: the matrix calculations of the processor, as
// microprograms built from the shared subroutine library, at the default
// sizes. All values are 32-bit floating point in the buffer memory; results
// go out through CR15 and the DMA channel, four bytes each.
//
//   code 11  workstation transformation from window (wx0, wx1, wy0, wy1) and
//            viewport (vx0, vx1, vy0, vy1): sx = (vx1 - vx0) / (wx1 - wx0),
//            tx = vx0 - sx * wx0, likewise sy, ty; output sx, tx, sy, ty
//   code 12  its inverse from (sx, tx, sy, ty): 1/sx, -tx/sx, 1/sy, -ty/sy
//   code 13  accumulation of two transformations P (applied last) and Q,
//            both [A B C; D E F]: the six elements of P*Q in the order
//            A B C D E F, e.g. C = Pa*Qc + Pb*Qf + Pc
//   code 14  clipping boundaries from the clipping rectangle (cx0, cx1, cy0,
//            cy1) and the workstation window: x0 = max(cx0, wx0),
//            x1 = min(cx1, wx1), likewise y0, y1, each compared through the
//            sign of a subtraction; output in device coordinates,
//            sx * x0 + tx, sx * x1 + tx, sy * y0 + ty, sy * y1 + ty
//
// BM layout in 4-byte units: window 0-3, viewport 4-7, (sx, tx, sy, ty) 8-11,
// P 16-21, Q 24-29, clipping rectangle 32-35. Each result is compared bit for bit with a model of the
// same operation sequence and with real arithmetic.
module tb_ap_matrix_workload;
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
    int p;
    for (int a = 0; a < 4096; a++) cs[a] = jmp(a);
    fplib_load(cs);
    cs[0]  = proc(OP_RDCR, DS_RAMF, FN_OR, SRC_DZ, 4'd0, 4'd12, S1);
    cs[1]  = seqc(OP_JOC, cnd(C_ZERO1), 12'd0);
    cs[2]  = fetch(6'd1, 4'd0);
    cs[75] = jmp(1000);
    cs[76] = jmp(1100);
    cs[77] = jmp(1200);
    cs[78] = jmp(1400);
    for (int a = 0; a < 4096; a++) put(a, cs[a]);
    for (int code = 0; code < 4; code++) begin
      p = (code == 3) ? 1400 : 1000 + 100 * code;
      put(p++, aux(OP_LDCTR, 8'h80));
      put(p++, proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd15, S13));
      if (code == 0) begin                                 // workstation matrix
        for (int k = 0; k < 2; k++) begin
          put(p++, aux(OP_LABM, 8'(5 + 2 * k))); put(p++, call(LDA));                      // vx1
          put(p++, aux(OP_LABM, 8'(4 + 2 * k))); put(p++, call(LDB));                      // vx0
          put(p++, op2(FN_XOR, S3, 15, 3));
          put(p++, call(FADD));
          put(p++, mov(S123, 0, 13)); put(p++, mov(S13, 1, 14));
          put(p++, aux(OP_LABM, 8'(1 + 2 * k))); put(p++, call(LDA));                      // wx1
          put(p++, aux(OP_LABM, 8'(2 * k))); put(p++, call(LDB));                          // wx0
          put(p++, op2(FN_XOR, S3, 15, 3));
          put(p++, call(FADD));
          put(p++, mov(S123, 0, 2)); put(p++, mov(S13, 1, 3));
          put(p++, mov(S123, 13, 0)); put(p++, mov(S13, 14, 1));
          put(p++, call(FDIV));                            // sx
          put(p++, mov(S123, 0, 4)); put(p++, mov(S13, 1, 5));
          put(p++, call(OUTF));
          put(p++, mov(S123, 4, 0)); put(p++, mov(S13, 5, 1));
          put(p++, aux(OP_LABM, 8'(2 * k))); put(p++, call(LDB));
          put(p++, call(FMUL));                            // sx * wx0
          put(p++, op2(FN_XOR, S3, 15, 1));
          put(p++, aux(OP_LABM, 8'(4 + 2 * k))); put(p++, call(LDB));
          put(p++, call(FADD));                            // vx0 - sx * wx0
          put(p++, call(OUTF));
        end
      end else if (code == 1) begin                        // inverse
        for (int k = 0; k < 2; k++) begin
          put(p++, clr(S123, 0));
          put(p++, op2(FN_OR, S3, 15, 0));
          put(p++, clr(S3, 1));
          put(p++, aux(OP_LDCTR, 8'd129));
          put(p++, proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd1, S1));   // a = 1.0
          put(p++, aux(OP_LABM, 8'(8 + 2 * k))); put(p++, call(LDB));
          put(p++, call(FDIV));
          put(p++, mov(S123, 0, 4)); put(p++, mov(S13, 1, 5));
          put(p++, call(OUTF));
          put(p++, mov(S123, 4, 0)); put(p++, mov(S13, 5, 1));
          put(p++, aux(OP_LABM, 8'(9 + 2 * k))); put(p++, call(LDB));
          put(p++, call(FMUL));
          put(p++, op2(FN_XOR, S3, 15, 1));
          put(p++, call(OUTF));
        end
      end else if (code == 3) begin                        // clipping boundaries
        for (int k = 0; k < 4; k++) begin
          int c = 32 + k, w = k, t;
          put(p++, aux(OP_LABM, 8'(c))); put(p++, call(LDA));
          put(p++, aux(OP_LABM, 8'(w))); put(p++, call(LDB));
          put(p++, op2(FN_XOR, S3, 15, 3));
          put(p++, call(FADD));                            // c - w
          put(p++, tst(S3, 1));
          // not negative: take the first, negative: take the second
          // (max for the lower bounds, min for the upper bounds)
          t = p;
          put(p++, seqc(OP_JOC, cnd(C_SIGN3), 12'(t + 4)));
          put(p++, aux(OP_LABM, 8'(k % 2 == 0 ? c : w))); put(p++, call(LDA));
          put(p++, jmp(t + 6));
          put(p++, aux(OP_LABM, 8'(k % 2 == 0 ? w : c))); put(p++, call(LDA));
          put(p++, aux(OP_LABM, 8'(8 + 2 * (k / 2)))); put(p++, call(LDB));
          put(p++, call(FMUL));
          put(p++, aux(OP_LABM, 8'(9 + 2 * (k / 2)))); put(p++, call(LDB));
          put(p++, call(FADD));
          put(p++, call(OUTF));
        end
      end else begin                                       // accumulation
        for (int r = 0; r < 2; r++)
          for (int c = 0; c < 3; c++) begin
            put(p++, aux(OP_LABM, 8'(16 + 3 * r))); put(p++, call(LDA));
            put(p++, aux(OP_LABM, 8'(24 + c))); put(p++, call(LDB));
            put(p++, call(FMUL));
            put(p++, mov(S123, 0, 13)); put(p++, mov(S13, 1, 14));
            put(p++, aux(OP_LABM, 8'(17 + 3 * r))); put(p++, call(LDA));
            put(p++, aux(OP_LABM, 8'(27 + c))); put(p++, call(LDB));
            put(p++, call(FMUL));
            put(p++, mov(S123, 13, 2)); put(p++, mov(S13, 14, 3));
            put(p++, call(FADD));
            if (c == 2) begin
              put(p++, aux(OP_LABM, 8'(18 + 3 * r))); put(p++, call(LDB));
              put(p++, call(FADD));
            end
            put(p++, call(OUTF));
          end
      end
      put(p++, proc(OP_WRCR, DS_NOP, FN_AND, SRC_ZA, 4'd0, 4'd0, S1));
      put(p++, jmp(0));
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp_t neg(fp_t v);
    v.s = !v.s;
    return v;
  endfunction

  task automatic bm_put(int unit, logic [31:0] w);
    for (int j = 0; j < 4; j++) bm_write(4 * unit + j, w[8*j +: 8]);
  endtask

  // run a command, then compare its outputs with the model values and
  // with real values r within tol[i]
  task automatic run(int code, string name, logic [31:0] expv[], real r[], real tol[]);
    int cyc;
    out_q.delete();
    cr_write(0, 8'(code));
    cr_addr_main = 4'd0; #1;
    cyc = 1;
    while ((cr_rdata != 0 || dma_busy) && cyc < 100000) begin @(posedge clk); #1; cyc++; end
    check({name, " finished"}, int'(cyc < 100000), 1);
    check({name, " result bytes"}, out_q.size(), 4 * expv.size());
    if (out_q.size() != 4 * expv.size()) return;
    foreach (expv[i]) begin
      logic [31:0] got; real e;
      got = {out_q[4*i+3], out_q[4*i+2], out_q[4*i+1], out_q[4*i]};
      check($sformatf("%s value %0d bit-exact", name, i), got, expv[i]);
      e = to_real(unpack(got)) - r[i];
      if (e < 0) e = -e;
      check($sformatf("%s value %0d = %g near %g", name, i, to_real(unpack(got)), r[i]), int'(e <= tol[i]), 1);
    end
    cyc_total[code - 11] += cyc;
  endtask

  int cyc_total[4];
  int n_below = 0;       // compares with the clipping rectangle value below the window value

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  initial begin
    localparam int NSETS = 20;
    rst = 1; cm_we = 0; cm_waddr = 0; cm_wdata = 0; bm_we = 0; bm_addr = 0; bm_wdata = 0;
    cr_we = 0; cr_addr_main = 0; cr_wdata = 0;
    cyc_total = '{0, 0, 0, 0};
    load_microprogram();
    @(posedge clk); #1; rst = 0;
    for (int n = 0; n < NSETS; n++) begin
      logic [31:0] w[4], v[4], m[4], pw[6], qw[6];
      logic [31:0] ev[];
      real rr[], tl[];
      fp_t f[4];
      // window inside [0,1] (NDC), viewport in device units
      w[0] = from_real(rnd(0.0, 0.4)); w[1] = from_real(rnd(0.6, 1.0));
      w[2] = from_real(rnd(0.0, 0.4)); w[3] = from_real(rnd(0.6, 1.0));
      v[0] = from_real(rnd(0.0, 500.0)); v[1] = from_real(rnd(2000.0, 4095.0));
      v[2] = from_real(rnd(0.0, 500.0)); v[3] = from_real(rnd(2000.0, 4095.0));
      if (n == 0) begin w[0] = 32'd0; v[0] = 32'd0; end        // zero operands
      for (int k = 0; k < 4; k++) begin bm_put(k, w[k]); bm_put(4 + k, v[k]); end
      ev = new[4]; rr = new[4]; tl = new[4];
      for (int k = 0; k < 2; k++) begin
        fp_t sx, tx;
        real rs, rt;
        sx = fdiv(fadd(unpack(v[2*k+1]), neg(unpack(v[2*k]))), fadd(unpack(w[2*k+1]), neg(unpack(w[2*k]))));
        tx = fadd(neg(fmul(sx, unpack(w[2*k]))), unpack(v[2*k]));
        ev[2*k] = pack(sx); ev[2*k+1] = pack(tx);
        rs = (to_real(unpack(v[2*k+1])) - to_real(unpack(v[2*k]))) /
             (to_real(unpack(w[2*k+1])) - to_real(unpack(w[2*k])));
        rt = to_real(unpack(v[2*k])) - rs * to_real(unpack(w[2*k]));
        rr[2*k] = rs; rr[2*k+1] = rt;
        tl[2*k] = rs * (2.0 ** -18); tl[2*k+1] = (rs + 4096.0) * (2.0 ** -18);
        f[2*k] = sx; f[2*k+1] = tx;
      end
      run(11, "workstation matrix", ev, rr, tl);
      // inverse of the values just computed, as the host would store them
      for (int k = 0; k < 4; k++) begin m[k] = ev[k]; bm_put(8 + k, m[k]); end
      for (int k = 0; k < 2; k++) begin
        fp_t one, inv, t;
        real rs, rt;
        one.s = 0; one.e = 129; one.m = 64'h800000;
        inv = fdiv(one, unpack(m[2*k]));
        t = neg(fmul(inv, unpack(m[2*k+1])));
        ev[2*k] = pack(inv); ev[2*k+1] = pack(t);
        rs = 1.0 / to_real(unpack(m[2*k])); rt = -to_real(unpack(m[2*k+1])) * rs;
        rr[2*k] = rs; rr[2*k+1] = rt;
        tl[2*k] = rs * (2.0 ** -20); tl[2*k+1] = (rt < 0 ? -rt : rt) * (2.0 ** -19) + 1.0e-30;
      end
      run(12, "inverse matrix", ev, rr, tl);
      // accumulation of two transformations with rotation, scaling, displacement
      for (int k = 0; k < 6; k++) begin
        pw[k] = from_real(rnd(-3.0, 3.0)); qw[k] = from_real(rnd(-3.0, 3.0));
      end
      if (n == 1) begin pw[1] = 32'd0; pw[3] = 32'd0; qw[2] = 32'd0; end  // no rotation
      for (int k = 0; k < 6; k++) begin bm_put(16 + k, pw[k]); bm_put(24 + k, qw[k]); end
      ev = new[6]; rr = new[6]; tl = new[6];
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 3; c++) begin
          fp_t t;
          real a1, a2, a3;
          t = fadd(fmul(unpack(pw[3*r+1]), unpack(qw[3+c])), fmul(unpack(pw[3*r]), unpack(qw[c])));
          if (c == 2) t = fadd(t, unpack(pw[3*r+2]));
          ev[3*r+c] = pack(t);
          a1 = to_real(unpack(pw[3*r])) * to_real(unpack(qw[c]));
          a2 = to_real(unpack(pw[3*r+1])) * to_real(unpack(qw[3+c]));
          a3 = (c == 2) ? to_real(unpack(pw[3*r+2])) : 0.0;
          rr[3*r+c] = a1 + a2 + a3;
          tl[3*r+c] = ((a1 < 0 ? -a1 : a1) + (a2 < 0 ? -a2 : a2) + (a3 < 0 ? -a3 : a3)) * (2.0 ** -20) + 1.0e-30;
        end
      run(13, "accumulated matrix", ev, rr, tl);
      // clipping boundaries: the clipping rectangle against the window of
      // this set, through the workstation transformation stored at 8-11
      ev = new[4]; rr = new[4]; tl = new[4];
      for (int k = 0; k < 4; k++) begin
        logic [31:0] cw;
        fp_t d, sel, t;
        real rc, rw, rx, a1, a3;
        cw = from_real(k % 2 == 0 ? rnd(0.0, 0.5) : rnd(0.5, 1.0));
        if (n == 2) cw = w[k];                                   // equal bounds
        bm_put(32 + k, cw);
        d = fadd(unpack(cw), neg(unpack(w[k])));
        if (d.s) n_below++;
        if (k % 2 == 0) sel = d.s ? unpack(w[k]) : unpack(cw);
        else            sel = d.s ? unpack(cw) : unpack(w[k]);
        t = fadd(fmul(sel, unpack(m[2 * (k / 2)])), unpack(m[2 * (k / 2) + 1]));
        ev[k] = pack(t);
        rc = to_real(unpack(cw)); rw = to_real(unpack(w[k]));
        rx = (k % 2 == 0) ? (rc > rw ? rc : rw) : (rc < rw ? rc : rw);
        a1 = to_real(unpack(m[2 * (k / 2)])) * rx;
        a3 = to_real(unpack(m[2 * (k / 2) + 1]));
        rr[k] = a1 + a3;
        tl[k] = ((a1 < 0 ? -a1 : a1) + (a3 < 0 ? -a3 : a3)) * (2.0 ** -20) + 1.0e-30;
      end
      run(14, "clipping boundaries", ev, rr, tl);
    end
    check("clipping compares taken both ways", int'(n_below > 0 && n_below < 4 * NSETS), 1);
    $display("mean cycles: workstation matrix %0d, inverse %0d, accumulation %0d, clipping boundaries %0d",
             cyc_total[0] / NSETS, cyc_total[1] / NSETS, cyc_total[2] / NSETS, cyc_total[3] / NSETS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
