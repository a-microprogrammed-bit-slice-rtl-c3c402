// tb_ap_transform_workload: the processor's main job, run as a microprogram
// at the default sizes: transform POLYLINE points given as floating point
// coordinates with the matrix [A B C; D E F],
//     X1 = A*X + B*Y + C,   Y1 = D*X + E*Y + F,
// convert X1 and Y1 to 16-bit two's complement device coordinates and pass
// them out byte by byte through the CR output register and DMA channel.
//
// The host (this testbench) keeps the six matrix values at buffer memory
// byte 64 (four bytes each, layout as in tb_ap_fp_workload) and splits the
// points into portions that it writes alternately into two buffer areas
// (bytes 128 and 256): while the processor transforms one portion, the host
// writes the next one into the other area. A portion is started with code 6
// in CR0, the number of points in CR2 and the area base (in 4-byte units) in
// CR3.
//
// Microprogram structure: each point calls load, FMUL, FADD and
// convert/output subroutines. The multiply uses the single LSU/LOC loop
// register and the counter, so the point loop counts down in a slice
// register and closes with a conditional jump. The point address is kept in slice 1 and loaded into the BM
// address register with LABMP. Values are kept unpacked: mantissa with
// hidden bit in one register (24 bits), exponent in slice 1 and sign in bit 7
// of slice 3 of a second register; zero is exponent 0. The conversion shifts
// the mantissa right by 152 - exponent places with a counted DOW (truncation
// toward zero) and negates on slices 1+2 for negative values.
//
// Code 7 handles a POLYMARKER portion the same way, but outputs a point only
// if X1 and Y1 lie inside the marker clipping viewport (xmin, xmax, ymin,
// ymax at BM byte 88, device coordinates). The test is made on the
// floating-point values before conversion, by subtracting each bound with
// FADD and looking at the sign of the difference; a bound itself counts as
// inside. The last two portions of each matrix set are run again as markers.
//
// Each output is compared bit for bit with a model of the same algorithms
// and, within 2 units, with real arithmetic. Cycles per point are reported.
module tb_ap_transform_workload;
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

  // microprogram paths taken (fetch addresses of the path entries)
  int n_mul_zero = 0, n_add_zero = 0, n_add_sub = 0, n_neg_out = 0, n_labmp = 0;
  always @(posedge clk) if (!rst) begin
    if (uaddr == 12'd520) n_mul_zero++;
    if (uaddr == 12'd404) n_add_zero++;
    if (uaddr == 12'd440) n_add_sub++;
    if (uaddr == 12'd609) n_neg_out++;
    if (dut.u_mcu.ui.opc == OP_LABMP) n_labmp++;
  end

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


  // register use: a = (R0 mantissa, R1 exp/sign), b = (R2, R3), T = (R13, R14),
  // R11.1 point pointer, R15 = 0x80 in slices 1 and 3
  localparam int CLIP = 960;
  task automatic load_microprogram();
    int p;
    for (int a = 0; a < 4096; a++) put(a, jmp(a));
    put(0,  proc(OP_RDCR, DS_RAMF, FN_OR, SRC_DZ, 4'd0, 4'd12, S1));
    put(1,  seqc(OP_JOC, cnd(C_ZERO1), 12'd0));
    put(2,  fetch(6'd1, 4'd0));
    put(70, jmp(700));                        // code 6: transform a portion
    begin
      logic [31:0] cs[4096];
      for (int a = 0; a < 4096; a++) cs[a] = jmp(a);
      fplib_load(cs);
      for (int a = 300; a < 700; a++) put(a, cs[a]);
    end
    // row subroutines: a := M[i]*X + M[i+1]*Y + M[i+2] for the X1 row (720)
    // and the Y1 row (750); point pointer in R11.1, R5.1 = pointer + 1
    for (int row = 0; row < 2; row++) begin
      p = (row == 0) ? 720 : 750;
      put(p++, aux(OP_LABM, 8'(16 + 3 * row)));          // A or D
      put(p++, call(LDA));
      put(p++, proc(OP_LABMP, DS_NOP, FN_OR, SRC_ZB, 0, 4'd11, S1));  // X
      put(p++, call(LDB));
      put(p++, call(FMUL));
      put(p++, mov(S123, 0, 13)); put(p++, mov(S13, 1, 14));
      put(p++, aux(OP_LABM, 8'(17 + 3 * row)));          // B or E
      put(p++, call(LDA));
      put(p++, proc(OP_LABMP, DS_NOP, FN_OR, SRC_ZB, 0, 4'd5, S1));   // Y
      put(p++, call(LDB));
      put(p++, call(FMUL));
      put(p++, mov(S123, 13, 2)); put(p++, mov(S13, 14, 3));
      put(p++, call(FADD));
      put(p++, aux(OP_LABM, 8'(18 + 3 * row)));          // C or F
      put(p++, call(LDB));
      put(p++, jmp(FADD));                                // FADD returns
    end
    // code 6, POLYLINE portion: N points from area CR3, every point output
    put(700, aux(OP_LDCTR, 8'h80));
    put(701, proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd15, S13));
    put(702, proc(OP_RDCR, DS_RAMF, FN_OR, SRC_DZ, 4'd3, 4'd11, S1));   // pointer
    put(703, proc(OP_RDCR, DS_RAMF, FN_OR, SRC_DZ, 4'd2, 4'd12, S1));   // N
    put(704, proc(OP_DO, DS_RAMF, FN_ADD, SRC_ZA, 4'd11, 4'd5, S1, 5'd0, 0, 1));  // R5 = ptr+1
    put(705, call(720));
    put(706, call(CONV));
    put(707, call(750));
    put(708, call(CONV));
    put(709, jmp(780));
    put(780, proc(OP_DO, DS_RAMF, FN_ADD, SRC_ZB, 0, 4'd11, S1, 5'd0, 0, 1));     // ptr + 1
    put(781, proc(OP_DO, DS_RAMF, FN_ADD, SRC_ZB, 0, 4'd11, S1, 5'd0, 0, 1));     // ptr + 2
    put(782, proc(OP_DO, DS_RAMF, FN_SUBR, SRC_ZB, 0, 4'd12, S1));               // N - 1
    put(783, seqc(OP_JOC, cnd(C_ZERO1, 1), 12'd704));
    put(784, proc(OP_WRCR, DS_NOP, FN_AND, SRC_ZA, 4'd0, 4'd0, S1));   // CR0 := 0
    put(785, jmp(0));
    // code 7, POLYMARKER portion: as code 6, but a point is output only if
    // X1 and Y1 lie inside the marker clipping viewport, tested on the
    // floating-point values before conversion; the 16-bit X1 waits in R4
    put(71, jmp(900));
    put(900, aux(OP_LDCTR, 8'h80));
    put(901, proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd15, S13));
    put(902, proc(OP_RDCR, DS_RAMF, FN_OR, SRC_DZ, 4'd3, 4'd11, S1));
    put(903, proc(OP_RDCR, DS_RAMF, FN_OR, SRC_DZ, 4'd2, 4'd12, S1));
    put(904, proc(OP_DO, DS_RAMF, FN_ADD, SRC_ZA, 4'd11, 4'd5, S1, 5'd0, 0, 1));
    put(905, call(720));
    put(906, aux(OP_LABM, 8'd22));                        // xmin, xmax
    put(907, call(CLIP));
    put(908, seqc(OP_JOC, cnd(C_SIGN3), 12'd940));        // outside: next point
    put(909, mov(S123, 13, 0));
    put(910, mov(S13, 14, 1));
    put(911, call(CVT));
    put(912, mov(S12, 0, 4));
    put(913, call(750));
    put(914, aux(OP_LABM, 8'd24));                        // ymin, ymax
    put(915, call(CLIP));
    put(916, seqc(OP_JOC, cnd(C_SIGN3), 12'd940));
    put(917, mov(S123, 13, 0));
    put(918, mov(S13, 14, 1));
    put(919, call(CVT));
    put(920, proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd4, S1));
    put(921, seqc(OP_JOC, cnd(C_DMABUSY), 12'd921));
    put(922, proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd4, S2));
    put(923, seqc(OP_JOC, cnd(C_DMABUSY), 12'd923));
    put(924, call(OUT2));
    put(925, jmp(940));
    put(940, proc(OP_DO, DS_RAMF, FN_ADD, SRC_ZB, 0, 4'd11, S1, 5'd0, 0, 1));
    put(941, proc(OP_DO, DS_RAMF, FN_ADD, SRC_ZB, 0, 4'd11, S1, 5'd0, 0, 1));
    put(942, proc(OP_DO, DS_RAMF, FN_SUBR, SRC_ZB, 0, 4'd12, S1));
    put(943, seqc(OP_JOC, cnd(C_ZERO1, 1), 12'd904));
    put(944, proc(OP_WRCR, DS_NOP, FN_AND, SRC_ZA, 4'd0, 4'd0, S1));
    put(945, jmp(0));
    // CLIP: is a inside [lo, hi], the two values at the BM address register?
    // Returns SIGN3 set if not. a is saved in (R13, R14).
    put(CLIP+0, mov(S123, 0, 13));
    put(CLIP+1, mov(S13, 1, 14));
    put(CLIP+2, call(LDB));
    put(CLIP+3, op2(FN_XOR, S3, 15, 3));                  // -lo
    put(CLIP+4, call(FADD));
    put(CLIP+5, tst(S3, 1));
    put(CLIP+6, seqc(OP_ROC, cnd(C_SIGN3), 12'd0));       // a < lo
    put(CLIP+7, call(LDA));
    put(CLIP+8, mov(S123, 13, 2));
    put(CLIP+9, mov(S13, 14, 3));
    put(CLIP+10, op2(FN_XOR, S3, 15, 3));                 // -a
    put(CLIP+11, call(FADD));
    put(CLIP+12, tst(S3, 1));                             // hi - a < 0?
    put(CLIP+13, ret());
  endtask


  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp_t neg(fp_t v);
    v.s = !v.s;
    return v;
  endfunction

  initial begin
    logic [31:0] mw[6], vw[4];
    int n_clipped, n_accepted, n_clipped_x;
    real mr[6];
    localparam int PORTIONS = 6, NPT = 5;
    logic [31:0] px[PORTIONS][NPT], py[PORTIONS][NPT];
    int total_cycles, n_points, n_overlap;
    total_cycles = 0; n_points = 0; n_overlap = 0; n_clipped = 0; n_accepted = 0; n_clipped_x = 0;
    rst = 1; cm_we = 0; cm_waddr = 0; cm_wdata = 0; bm_we = 0; bm_addr = 0; bm_wdata = 0;
    cr_we = 0; cr_addr_main = 0; cr_wdata = 0;
    load_microprogram();
    @(posedge clk); #1; rst = 0;
    // marker clipping viewport in device coordinates: xmin, xmax, ymin, ymax
    vw[0] = from_real(800.0); vw[1] = from_real(2500.0); vw[2] = from_real(300.0); vw[3] = from_real(2000.0);
    for (int k = 0; k < 4; k++) for (int j = 0; j < 4; j++) bm_write(88 + 4 * k + j, vw[k][8*j +: 8]);
    // points in normalized device coordinates [0,1], some exactly 0 or 1
    foreach (px[q, i]) begin
      px[q][i] = from_real((i == 0 && q == 1) ? 0.0 : real'($urandom_range(0, 65535)) / 65535.0);
      py[q][i] = from_real((i == 1 && q == 2) ? 1.0 : real'($urandom_range(0, 65535)) / 65535.0);
    end
    for (int mset = 0; mset < 2; mset++) begin
      // scaling, rotation and displacement to a 4K x 4K device area;
      // the second set has no rotation (B = D = 0)
      real ang;
      ang = (mset == 0) ? 0.5 : 0.0;
      mr[0] = 3000.0 * $cos(ang); mr[1] = -3000.0 * $sin(ang); mr[2] = 500.25;
      mr[3] = 2500.0 * $sin(ang); mr[4] = 2500.0 * $cos(ang);  mr[5] = -120.5;
      for (int k = 0; k < 6; k++) begin
        mw[k] = from_real(mr[k]);
        for (int j = 0; j < 4; j++) bm_write(64 + 4 * k + j, mw[k][8*j +: 8]);
      end
      // first portion into area 0
      for (int i = 0; i < NPT; i++)
        for (int j = 0; j < 4; j++) begin
          bm_write(128 + 8 * i + j, px[0][i][8*j +: 8]);
          bm_write(132 + 8 * i + j, py[0][i][8*j +: 8]);
        end
      for (int q = 0; q < PORTIONS; q++) begin
        int area, cyc; bit busy_seen;
        area = (q % 2 == 0) ? 32 : 64;        // 4-byte units: byte 128 or 256
        out_q.delete();
        cr_write(2, 8'(NPT));
        cr_write(3, 8'(area));
        cr_write(0, 8'd6);
        cyc = 3;
        // while the processor works, write the next portion into the other area
        if (q + 1 < PORTIONS) begin
          int nb;
          nb = (q % 2 == 0) ? 256 : 128;
          for (int i = 0; i < NPT; i++)
            for (int j = 0; j < 4; j++) begin
              bm_write(nb + 8 * i + j, px[q+1][i][8*j +: 8]);
              bm_write(nb + 4 + 8 * i + j, py[q+1][i][8*j +: 8]);
              cyc += 2;
            end
          cr_addr_main = 4'd0; #1;
          if (cr_rdata != 0) n_overlap++;
        end
        cr_addr_main = 4'd0;
        #1;
        while ((cr_rdata != 0 || dma_busy) && cyc < 200000) begin @(posedge clk); #1; cyc++; end
        check("portion finished", cyc < 200000, 1);
        if (cyc >= 200000) $display("stuck at %0d ctr=%0d", uaddr, dut.u_mcu.ctr_value);
        check("output bytes", out_q.size(), 4 * NPT);
        total_cycles += cyc; n_points += NPT;
        for (int i = 0; i < NPT && out_q.size() == 4 * NPT; i++) begin
          fp_t x, y, t; int ex, ey, gx, gy; real rx, ry;
          x = unpack(px[q][i]); y = unpack(py[q][i]);
          t = fmul(unpack(mw[0]), x); t = fadd(fmul(unpack(mw[1]), y), t); t = fadd(t, unpack(mw[2]));
          ex = to_fix(t);
          t = fmul(unpack(mw[3]), x); t = fadd(fmul(unpack(mw[4]), y), t); t = fadd(t, unpack(mw[5]));
          ey = to_fix(t);
          gx = int'(16'({out_q[4*i+1], out_q[4*i]}));
          gy = int'(16'({out_q[4*i+3], out_q[4*i+2]}));
          gx = (gx >= 32768) ? gx - 65536 : gx;
          gy = (gy >= 32768) ? gy - 65536 : gy;
          ex = (ex >= 32768) ? ex - 65536 : ex;
          ey = (ey >= 32768) ? ey - 65536 : ey;
          check($sformatf("portion %0d point %0d X1 bit-exact", q, i), gx, ex);
          check($sformatf("portion %0d point %0d Y1 bit-exact", q, i), gy, ey);
          rx = to_real(unpack(mw[0])) * to_real(x) + to_real(unpack(mw[1])) * to_real(y) + to_real(unpack(mw[2]));
          ry = to_real(unpack(mw[3])) * to_real(x) + to_real(unpack(mw[4])) * to_real(y) + to_real(unpack(mw[5]));
          check($sformatf("X1 %0d near %f", gx, rx), (real'(gx) - rx <= 2.0) && (rx - real'(gx) <= 2.0), 1);
          check($sformatf("Y1 %0d near %f", gy, ry), (real'(gy) - ry <= 2.0) && (ry - real'(gy) <= 2.0), 1);
        end
      end
      // POLYMARKER on the last two portions, still in the two areas
      for (int q = PORTIONS - 2; q < PORTIONS; q++) begin
        int cyc, k;
        out_q.delete();
        cr_write(2, 8'(NPT));
        cr_write(3, 8'((q % 2 == 0) ? 32 : 64));
        cr_write(0, 8'd7);
        cr_addr_main = 4'd0; #1;
        cyc = 1;
        while ((cr_rdata != 0 || dma_busy) && cyc < 200000) begin @(posedge clk); #1; cyc++; end
        check("marker portion finished", int'(cyc < 200000), 1);
        k = 0;
        for (int i = 0; i < NPT; i++) begin
          fp_t x, y, tx, ty; bit in_vp; int gx, gy;
          x = unpack(px[q][i]); y = unpack(py[q][i]);
          tx = fmul(unpack(mw[0]), x); tx = fadd(fmul(unpack(mw[1]), y), tx); tx = fadd(tx, unpack(mw[2]));
          ty = fmul(unpack(mw[3]), x); ty = fadd(fmul(unpack(mw[4]), y), ty); ty = fadd(ty, unpack(mw[5]));
          in_vp = !fadd(tx, neg(unpack(vw[0]))).s && !fadd(unpack(vw[1]), neg(tx)).s &&
                   !fadd(ty, neg(unpack(vw[2]))).s && !fadd(unpack(vw[3]), neg(ty)).s;
          if (fadd(tx, neg(unpack(vw[0]))).s || fadd(unpack(vw[1]), neg(tx)).s) n_clipped_x++;
          if (!in_vp) begin n_clipped++; continue; end
          n_accepted++;
          if (out_q.size() < 4 * k + 4) begin check("marker output present", 0, 1); break; end
          gx = int'(16'({out_q[4*k+1], out_q[4*k]}));
          gy = int'(16'({out_q[4*k+3], out_q[4*k+2]}));
          check($sformatf("marker %0d.%0d X1", q, i), gx, int'(16'(to_fix(tx))));
          check($sformatf("marker %0d.%0d Y1", q, i), gy, int'(16'(to_fix(ty))));
          k++;
        end
        check("marker output bytes", out_q.size(), 4 * k);
      end
    end
    check("markers clipped", n_clipped > 0, 1);
    check("markers accepted", n_accepted > 0, 1);
    check("FMUL with zero operand", n_mul_zero > 0, 1);
    check("FADD with zero operand", n_add_zero > 0, 1);
    check("FADD with opposite signs", n_add_sub > 0, 1);
    check("negative device coordinate", n_neg_out > 0, 1);
    // two per row: both rows for every POLYLINE point and every marker whose
    // X1 is inside, the X1 row only for the others
    check("LABMP pointer loads", n_labmp, 4 * (2 * 6 * 5 + 2 * 2 * 5) - 2 * n_clipped_x);
    check("host wrote the next portion while the processor was busy", n_overlap > 0, 1);
    $display("%0d markers accepted, %0d clipped", n_accepted, n_clipped);
    $display("%0d points transformed, mean %0d cycles per point (two FMUL+FADD rows, conversion, 4 output bytes)",
             n_points, total_cycles / n_points);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
