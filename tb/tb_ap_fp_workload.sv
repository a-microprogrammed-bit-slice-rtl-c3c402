// tb_ap_fp_workload: floating point workload on the arithmetics processor at
// its default sizes: FADD, FSUB and FMUL on 32-bit floating point numbers,
// written as microprograms and run on random operands.
//
// Number format used by these microprograms: 24-bit mantissa with a hidden
// leading one (value = 0.1mmm...m x 2^(e-128)), 8-bit exponent in excess 128,
// one sign bit. In the buffer memory a number takes four bytes: mantissa
// bits 7-0, mantissa bits 15-8, {sign, mantissa bits 22-16}, exponent.
// Operand a is at byte 32, operand b at byte 36. The result comes back as
// four bytes through the CR output register and the modelled DMA channel.
//
// The routines: a shared unpack subroutine (sign bytes kept in slice 3,
// hidden bit set with a constant 0x80 loaded through the counter); FADD
// aligns the smaller operand with a DOW counted by the exponent difference,
// adds or subtracts the mantissas on all three slices, and normalises with a
// DOW on RAM23 whose shift count, read from the counter, corrects the
// exponent; FSUB flips b's sign and continues in FADD; FMUL adds exponents on
// slice 1 and forms the mantissa product by shift-and-add in an LSU/LOC loop
// run 24 times by the counter. The mantissas are truncated (no guard bits)
// and the multiplicand is pre-shifted one place so that no sum overflows 24
// bits, since the slices' shift-in bit is a constant of the microword. Each
// result is compared bit for bit with a model of exactly these algorithms,
// written here independently of the RTL, and with real arithmetic within a
// relative error of 2^-20. Operands are non-zero with exponents that keep the
// results in range; cycle counts per operation are reported.
module tb_ap_fp_workload;
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

  // DMA channel model: request, four busy cycles, acknowledge with read of CR15
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

  localparam logic [2:0] S1 = 3'b001, S2 = 3'b010, S3 = 3'b100, S13 = 3'b101, S123 = 3'b111;
  localparam logic [4:0] NOT_CTROFL = {1'b1, C_CTROFL};

  // DO-type helpers: move, and two-operand operations B := A op B
  function automatic logic [31:0] mov(logic [2:0] sc, int src, int dst);
    return proc(OP_DO, DS_RAMF, FN_OR, SRC_ZA, 4'(src), 4'(dst), sc);
  endfunction
  function automatic logic [31:0] op2(logic [2:0] fn, logic [2:0] sc, int a, int b, bit ci = 0);
    return proc(OP_DO, DS_RAMF, fn, SRC_AB, 4'(a), 4'(b), sc, 5'd0, 0, ci);
  endfunction

  task automatic load_microprogram();
    for (int a = 0; a < 4096; a++) put(a, seqc(OP_JOC, ALWAYS, 12'(a)));
    put(0,  proc(OP_RDCR, DS_RAMF, FN_OR, SRC_DZ, 4'd0, 4'd15, S1));
    put(1,  seqc(OP_JOC, cnd(C_ZERO1), 12'd0));
    put(2,  fetch(6'd1, 4'd0));
    put(67, seqc(OP_JOC, ALWAYS, 12'd400));   // code 3: FADD
    put(68, seqc(OP_JOC, ALWAYS, 12'd410));   // code 4: FSUB
    put(69, seqc(OP_JOC, ALWAYS, 12'd500));   // code 5: FMUL
    // unpack a -> R0 (mantissa), R1 (exponent), R4.3 (sign byte);
    //        b -> R2, R3, R5.3; R15 := 0x80 in slices 1 and 3
    put(300, aux(OP_LABM, 8'd8));
    put(301, proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd0, S1));
    put(302, proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd0, S2));
    put(303, proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd0, S3));
    put(304, proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd1, S1));
    put(305, proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd2, S1));
    put(306, proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd2, S2));
    put(307, proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd2, S3));
    put(308, proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd3, S1));
    put(309, aux(OP_LDCTR, 8'h80));
    put(310, proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd15, S13));
    put(311, mov(S3, 0, 4));
    put(312, mov(S3, 2, 5));
    put(313, op2(FN_OR, S3, 15, 0));
    put(314, op2(FN_OR, S3, 15, 2));
    put(315, seqc(OP_ROC, ALWAYS, 12'd0));
    // FADD / FSUB
    put(400, seqc(OP_COC, ALWAYS, 12'd300));
    put(401, seqc(OP_JOC, ALWAYS, 12'd420));
    put(410, seqc(OP_COC, ALWAYS, 12'd300));
    put(411, op2(FN_XOR, S3, 15, 5));                        // flip sign of b
    put(412, seqc(OP_JOC, ALWAYS, 12'd420));
    put(420, mov(S1, 1, 8));                                  // R8 := ea
    put(421, op2(FN_SUBR, S1, 3, 8, 1));                      // R8 := ea - eb
    put(422, seqc(OP_JOC, cnd(C_SIGN1, 1), 12'd440));
    put(423, mov(S123, 0, 9)); put(424, mov(S123, 2, 0)); put(425, mov(S123, 9, 2));
    put(426, mov(S1, 1, 9));   put(427, mov(S1, 3, 1));   put(428, mov(S1, 9, 3));
    put(429, mov(S3, 4, 9));   put(430, mov(S3, 5, 4));   put(431, mov(S3, 9, 5));
    put(432, proc(OP_DO, DS_RAMF, FN_SUBS, SRC_ZA, 4'd8, 4'd8, S1, 5'd0, 0, 1)); // R8 := -R8
    put(433, seqc(OP_JOC, ALWAYS, 12'd440));
    put(440, proc(OP_WRCTR, DS_NOP, FN_XNOR, SRC_ZA, 4'd8, 4'd0, S1));          // ctr := 255 - d
    put(441, proc(OP_DOW, DS_RAMD, FN_OR, SRC_ZB, 0, 4'd2, S123, NOT_CTROFL));  // align b
    put(442, mov(S3, 4, 9));
    put(443, op2(FN_XOR, S3, 5, 9));                         // SIGN3: signs differ
    put(444, seqc(OP_JOC, cnd(C_SIGN3), 12'd460));
    put(445, op2(FN_ADD, S123, 2, 0));
    put(446, seqc(OP_JOC, cnd(C_CARRY3, 1), 12'd600));
    put(447, proc(OP_DO, DS_RAMD, FN_OR, SRC_ZB, 0, 4'd0, S123, 5'd0, 1, 0));   // >>1, 1 in
    put(448, proc(OP_DO, DS_RAMF, FN_ADD, SRC_ZB, 0, 4'd1, S1, 5'd0, 0, 1));    // exp + 1
    put(449, seqc(OP_JOC, ALWAYS, 12'd600));
    put(460, op2(FN_SUBR, S123, 2, 0, 1));                   // R0 := R0 - R2
    put(461, seqc(OP_JOC, cnd(C_NOZERO, 1), 12'd470));
    put(462, seqc(OP_JOC, cnd(C_CARRY3), 12'd550));
    put(463, proc(OP_DO, DS_RAMF, FN_SUBS, SRC_ZA, 4'd0, 4'd0, S123, 5'd0, 0, 1)); // negate
    put(464, mov(S3, 5, 4));
    put(465, seqc(OP_JOC, ALWAYS, 12'd550));
    put(470, proc(OP_DO, DS_RAMF, FN_AND, SRC_ZA, 4'd0, 4'd0, S123));
    put(471, proc(OP_DO, DS_RAMF, FN_AND, SRC_ZA, 4'd1, 4'd1, S1));
    put(472, proc(OP_DO, DS_RAMF, FN_AND, SRC_ZA, 4'd4, 4'd4, S3));
    put(473, seqc(OP_JOC, ALWAYS, 12'd600));
    // FMUL
    put(500, seqc(OP_COC, ALWAYS, 12'd300));
    put(501, op2(FN_ADD, S1, 3, 1, 1));                      // R1 := ea + eb + 1
    put(502, op2(FN_SUBR, S1, 15, 1, 1));                    // R1 -= 128
    put(503, op2(FN_XOR, S3, 5, 4));                         // sign
    put(504, proc(OP_DO, DS_RAMD, FN_OR, SRC_ZA, 4'd0, 4'd6, S123));   // R6 := ma >> 1
    put(505, proc(OP_DO, DS_RAMF, FN_AND, SRC_ZA, 4'd7, 4'd7, S123));  // R7 := 0
    put(506, aux(OP_LDCTR, 8'd232));                         // 24 passes
    put(507, proc(OP_LSU, DS_RAMF, FN_OR, SRC_ZB, 0, 4'd2, S123));     // RAM0 := mb[0]
    put(508, seqc(OP_JOC, cnd(C_RAM0, 1), 12'd510));
    put(509, op2(FN_ADD, S123, 6, 7));
    put(510, proc(OP_DO, DS_RAMD, FN_OR, SRC_ZB, 0, 4'd7, S123));
    put(511, proc(OP_LOC, DS_RAMD, FN_OR, SRC_ZB, 0, 4'd2, S123, NOT_CTROFL));
    put(512, mov(S123, 7, 0));
    put(513, seqc(OP_JOC, ALWAYS, 12'd550));
    // normalise
    put(550, aux(OP_LDCTR, 8'd0));
    put(551, proc(OP_DO, DS_RAMF, FN_OR, SRC_ZB, 0, 4'd0, S123));
    put(552, proc(OP_DOW, DS_RAMU, FN_OR, SRC_ZB, 0, 4'd0, S123, {1'b1, C_RAM23}));
    put(553, proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd10, S1));
    put(554, op2(FN_SUBR, S1, 10, 1, 1));
    put(555, seqc(OP_JOC, ALWAYS, 12'd600));
    // pack and output
    put(600, op2(FN_NOTRS, S3, 15, 0));                      // clear hidden bit
    put(601, op2(FN_AND, S3, 15, 4));
    put(602, op2(FN_OR, S3, 4, 0));                          // insert sign
    put(603, proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd0, S1));
    put(604, seqc(OP_JOC, cnd(C_DMABUSY), 12'd604));
    put(605, proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd0, S2));
    put(606, seqc(OP_JOC, cnd(C_DMABUSY), 12'd606));
    put(607, proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd0, S3));
    put(608, seqc(OP_JOC, cnd(C_DMABUSY), 12'd608));
    put(609, proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd1, S1));
    put(610, seqc(OP_JOC, cnd(C_DMABUSY), 12'd610));
    put(611, proc(OP_WRCR, DS_NOP, FN_AND, SRC_ZA, 4'd0, 4'd0, S1));  // CR0 := 0
    put(612, seqc(OP_JOC, ALWAYS, 12'd0));
  endtask

  // ---------------- reference models ----------------
  typedef struct { bit s; int e; int m; } fp_t;   // m includes the hidden bit

  function automatic logic [31:0] pack(fp_t x);
    if (x.m == 0) return 32'd0;
    return {8'(x.e), x.s, 7'(x.m >> 16), 8'(x.m >> 8), 8'(x.m)};
  endfunction
  function automatic fp_t unpack(logic [31:0] w);
    fp_t x;
    x.s = w[23]; x.e = int'(w[31:24]); x.m = int'({1'b1, w[22:0]});
    return x;
  endfunction
  function automatic real to_real(logic [31:0] w);
    fp_t x; real v;
    if (w == 0) return 0.0;
    x = unpack(w);
    v = real'(x.m) / 16777216.0 * (2.0 ** (x.e - 128));
    return x.s ? -v : v;
  endfunction
  function automatic fp_t normalise(fp_t x);
    while ((x.m & 24'h800000) == 0) begin x.m = x.m << 1; x.e--; end
    x.e = x.e & 8'hff;
    return x;
  endfunction

  function automatic logic [31:0] model_fadd(logic [31:0] aw, logic [31:0] bw, bit sub);
    fp_t a, b, r; int d;
    a = unpack(aw); b = unpack(bw);
    if (sub) b.s = !b.s;
    d = a.e - b.e;
    if (d < 0) begin r = a; a = b; b = r; d = -d; end
    b.m = (d >= 24) ? 0 : (b.m >> d);
    r.e = a.e; r.s = a.s;
    if (a.s == b.s) begin
      r.m = a.m + b.m;
      if (r.m >= 32'h1000000) begin r.m = r.m >> 1; r.e++; end
      return pack(r);
    end
    r.m = a.m - b.m;
    if (r.m == 0) return 32'd0;
    if (r.m < 0) begin r.m = -r.m; r.s = b.s; end
    return pack(normalise(r));
  endfunction

  function automatic logic [31:0] model_fmul(logic [31:0] aw, logic [31:0] bw);
    fp_t a, b, r; longint acc, ma2;
    a = unpack(aw); b = unpack(bw);
    ma2 = a.m >> 1; acc = 0;
    for (int i = 0; i < 24; i++) begin
      if ((b.m >> i) & 1) acc += ma2;
      acc = acc >> 1;
    end
    r.s = a.s ^ b.s; r.e = a.e + b.e - 128 + 1; r.m = int'(acc);
    return pack(normalise(r));
  endfunction

  function automatic logic [31:0] rand_fp(int emin, int emax);
    return {8'($urandom_range(emin, emax)), 1'($urandom), 23'($urandom)};
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names[3] = '{"FADD", "FSUB", "FMUL"};
    int cyc_min[3] = '{99999, 99999, 99999}, cyc_max[3] = '{0, 0, 0};
    longint cyc_sum[3] = '{0, 0, 0};
    int nrun[3] = '{0, 0, 0};
    int n_negate = 0, n_carry = 0, n_cancel = 0;
    rst = 1; cm_we = 0; cm_waddr = 0; cm_wdata = 0; bm_we = 0; bm_addr = 0; bm_wdata = 0;
    cr_we = 0; cr_addr_main = 0; cr_wdata = 0;
    load_microprogram();
    @(posedge clk); #1; rst = 0;
    repeat (5) @(posedge clk); #1;

    for (int n = 0; n < 300; n++) begin
      int op, cyc; logic [31:0] a, b, exp_w, got_w; real ra, rb, rr, rg, tol;
      op = n % 3;
      a = rand_fp(100, 156);
      b = rand_fp(100, 156);
      if (op != 2 && n % 7 == 0) b[31:24] = a[31:24];                 // equal exponents
      if (op != 2 && n % 30 == 1) b = {a[31:24], ~a[23], a[22:0]} ^ (op == 1 ? 32'h800000 : 32'h0); // cancel
      exp_w = (op == 2) ? model_fmul(a, b) : model_fadd(a, b, op == 1);
      for (int k = 0; k < 4; k++) begin
        bm_write(32 + k, a[8*k +: 8]);
        bm_write(36 + k, b[8*k +: 8]);
      end
      out_q.delete();
      cr_write(0, 8'(3 + op));
      cr_addr_main = 4'd0;
      cyc = 1;
      repeat (2) @(posedge clk);
      #1;
      while ((cr_rdata != 0 || dma_busy) && cyc < 5000) begin @(posedge clk); #1; cyc++; end
      check({names[op], " finished"}, cyc < 5000, 1);
      check({names[op], " result bytes"}, out_q.size(), 4);
      if (out_q.size() == 4) begin
        got_w = {out_q[3], out_q[2], out_q[1], out_q[0]};
        check($sformatf("%s %h %h bit-exact", names[op], a, b), got_w, exp_w);
        ra = to_real(a); rb = to_real(b);
        rr = (op == 0) ? ra + rb : (op == 1) ? ra - rb : ra * rb;
        rg = to_real(got_w);
        tol = ((rr < 0) ? -rr : rr) * (2.0 ** -20) + ((op == 2) ? 0.0 :
              (((ra < 0) ? -ra : ra) + ((rb < 0) ? -rb : rb)) * (2.0 ** -22));
        check($sformatf("%s %h %h value %g vs %g", names[op], a, b, rg, rr),
              ((rg - rr) <= tol) && ((rr - rg) <= tol), 1);
        if (got_w == 0) n_cancel++;
      end
      if (op != 2) begin
        fp_t fa, fb; fa = unpack(a); fb = unpack(b);
        if (op == 1) fb.s = !fb.s;
        if (fa.s == fb.s && fa.e == fb.e) n_carry++;
        if (fa.s != fb.s && fa.e == fb.e && fb.m > fa.m) n_negate++;
      end
      cyc_sum[op] += cyc; nrun[op]++;
      if (cyc < cyc_min[op]) cyc_min[op] = cyc;
      if (cyc > cyc_max[op]) cyc_max[op] = cyc;
    end
    check("cases with mantissa carry", n_carry > 0, 1);
    check("cases with negated difference", n_negate > 0, 1);
    check("cases cancelling to zero", n_cancel > 0, 1);
    for (int op = 0; op < 3; op++)
      $display("%s: %0d runs, cycles from command to last result byte: min %0d mean %0d max %0d",
               names[op], nrun[op], cyc_min[op], int'(cyc_sum[op] / nrun[op]), cyc_max[op]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
