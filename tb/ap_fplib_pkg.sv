// ap_fplib_pkg: floating-point subroutine library and reference model shared
// by the workload testbenches of the arithmetics processor.
//
// The subroutines are microcode for this design. Numbers are 32-bit
// PDP-11 style floating point: sign, exponent excess 128 and a 24-bit
// mantissa in [0.5, 1) whose leading 1 is not stored. In the buffer memory a
// value is four bytes: mantissa low, middle, high (sign in bit 7), exponent.
// Values are kept unpacked in register pairs: the mantissa with its leading
// 1 in one register (all three slices), the exponent in slice 1 and the sign
// in bit 7 of slice 3 of a second register; zero is mantissa 0 (exponent
// byte 0 in memory).
//   a = (R0, R1), b = (R2, R3); R15 holds 0x80 in slices 1 and 3;
//   R6-R10 are scratch; FSQRT, FSIN and FCOS also use R4, R5 and R11-R13.
//   Results are left in a.
//   LDA / LDB   read four bytes at the BM address register into a / b
//   FADD, FMUL, FDIV   a := a op b, truncated (FDIV needs b non-zero)
//   FSQRT       a := sqrt(|a|), Newton steps through NSTEP, FDIV and FADD
//   FSIN, FCOS  a := sin a, cos a for |a| <= pi/2, polynomials through POLY
//   NORM        normalises a
//   CVT         a to 16-bit two's complement in slices 1-2 of R0
//   OUT2        slices 1-2 of R0 out through CR15; CONV = CVT then OUT2
//   OUTF        a packed, four bytes out through CR15
// fplib_load() writes the library into a control-store image. The functions
// unpack, fadd, fmul, fdiv, fsqrt, fsin, fcos, to_fix and pack compute the same
// algorithms on integers, bit for bit.
package ap_fplib_pkg;
  import ap_pkg::*;
  import ap_asm_pkg::*;

  localparam logic [2:0] S1 = 3'b001, S2 = 3'b010, S3 = 3'b100, S12 = 3'b011, S13 = 3'b101, S123 = 3'b111;
  localparam logic [4:0] NOT_CTROFL = {1'b1, C_CTROFL};

  function automatic logic [31:0] mov(logic [2:0] sc, int src, int dst);
    return proc(OP_DO, DS_RAMF, FN_OR, SRC_ZA, 4'(src), 4'(dst), sc);
  endfunction
  function automatic logic [31:0] op2(logic [2:0] fn, logic [2:0] sc, int a, int b, bit ci = 0);
    return proc(OP_DO, DS_RAMF, fn, SRC_AB, 4'(a), 4'(b), sc, 5'd0, 0, ci);
  endfunction
  function automatic logic [31:0] clr(logic [2:0] sc, int r);
    return proc(OP_DO, DS_RAMF, FN_AND, SRC_ZA, 4'(r), 4'(r), sc);
  endfunction
  function automatic logic [31:0] tst(logic [2:0] sc, int r);
    return proc(OP_DO, DS_NOP, FN_OR, SRC_ZB, 4'd0, 4'(r), sc);
  endfunction
  function automatic logic [31:0] call(int a);
    return seqc(OP_COC, ALWAYS, 12'(a));
  endfunction
  function automatic logic [31:0] jmp(int a);
    return seqc(OP_JOC, ALWAYS, 12'(a));
  endfunction
  function automatic logic [31:0] ret();
    return seqc(OP_ROC, ALWAYS, 12'd0);
  endfunction

  // subroutine entry points
  localparam int LDA = 300, LDB = 320, FMUL = 500, FADD = 400, NORM = 550, CVT = 600,
                 OUT2 = 615, CONV = 625,
                 OUTF = 630, FDIV = 650, FSQRT = 800, NSTEP = 820,
                 FSIN = 840, FCOS = 860, POLY = 880;
  // BM tables of polynomial coefficients, in 4-byte units, highest power first
  localparam int SIN_TAB = 4, COS_TAB = 12;
  function automatic void fplib_load(inout logic [31:0] cs[4096]);
    // load a from the BM address register
    cs[LDA+0] = proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd0, S1);
    cs[LDA+1] = proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd0, S2);
    cs[LDA+2] = proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd0, S3);
    cs[LDA+3] = proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd1, S1);
    cs[LDA+4] = seqc(OP_JOC, cnd(C_ZERO1), 12'(LDA+8));
    cs[LDA+5] = mov(S3, 0, 1);                // sign byte
    cs[LDA+6] = op2(FN_OR, S3, 15, 0);        // hidden bit
    cs[LDA+7] = ret();
    cs[LDA+8] = clr(S123, 0); cs[LDA+9] = clr(S13, 1); cs[LDA+10] = ret();
    // load b
    cs[LDB+0] = proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd2, S1);
    cs[LDB+1] = proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd2, S2);
    cs[LDB+2] = proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd2, S3);
    cs[LDB+3] = proc(OP_RDMEM, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd3, S1);
    cs[LDB+4] = seqc(OP_JOC, cnd(C_ZERO1), 12'(LDB+8));
    cs[LDB+5] = mov(S3, 2, 3);
    cs[LDB+6] = op2(FN_OR, S3, 15, 2);
    cs[LDB+7] = ret();
    cs[LDB+8] = clr(S123, 2); cs[LDB+9] = clr(S13, 3); cs[LDB+10] = ret();
    // FADD: a := a + b
    cs[400] = tst(S123, 2);
    cs[401] = seqc(OP_ROC, cnd(C_NOZERO, 1), 12'd0);       // b = 0
    cs[402] = tst(S123, 0);
    cs[403] = seqc(OP_JOC, cnd(C_NOZERO), 12'd407);
    cs[404] = mov(S123, 2, 0); cs[405] = mov(S13, 3, 1); cs[406] = ret();   // a = 0
    cs[407] = mov(S1, 1, 8);
    cs[408] = op2(FN_SUBR, S1, 3, 8, 1);                   // d = ea - eb
    cs[409] = seqc(OP_JOC, cnd(C_SIGN1, 1), 12'd420);
    cs[410] = mov(S123, 0, 9); cs[411] = mov(S123, 2, 0); cs[412] = mov(S123, 9, 2);
    cs[413] = mov(S13, 1, 9);  cs[414] = mov(S13, 3, 1);  cs[415] = mov(S13, 9, 3);
    cs[416] = proc(OP_DO, DS_RAMF, FN_SUBS, SRC_ZA, 4'd8, 4'd8, S1, 5'd0, 0, 1);
    cs[417] = jmp(420);
    cs[420] = proc(OP_WRCTR, DS_NOP, FN_XNOR, SRC_ZA, 4'd8, 4'd0, S1);
    cs[421] = proc(OP_DOW, DS_RAMD, FN_OR, SRC_ZB, 0, 4'd2, S123, NOT_CTROFL);
    cs[422] = mov(S3, 1, 9);
    cs[423] = op2(FN_XOR, S3, 3, 9);
    cs[424] = seqc(OP_JOC, cnd(C_SIGN3), 12'd440);
    cs[425] = op2(FN_ADD, S123, 2, 0);
    cs[426] = seqc(OP_ROC, cnd(C_CARRY3, 1), 12'd0);
    cs[427] = proc(OP_DO, DS_RAMD, FN_OR, SRC_ZB, 0, 4'd0, S123, 5'd0, 1, 0);
    cs[428] = proc(OP_DO, DS_RAMF, FN_ADD, SRC_ZB, 0, 4'd1, S1, 5'd0, 0, 1);
    cs[429] = ret();
    cs[440] = op2(FN_SUBR, S123, 2, 0, 1);
    cs[441] = seqc(OP_JOC, cnd(C_NOZERO, 1), 12'd446);
    cs[442] = seqc(OP_JOC, cnd(C_CARRY3), 12'(NORM));
    cs[443] = proc(OP_DO, DS_RAMF, FN_SUBS, SRC_ZA, 4'd0, 4'd0, S123, 5'd0, 0, 1);
    cs[444] = mov(S3, 3, 1);
    cs[445] = jmp(NORM);
    cs[446] = clr(S123, 0); cs[447] = clr(S13, 1); cs[448] = ret();
    // FMUL: a := a * b
    cs[500] = tst(S123, 0);
    cs[501] = seqc(OP_ROC, cnd(C_NOZERO, 1), 12'd0);       // a = 0
    cs[502] = tst(S123, 2);
    cs[503] = seqc(OP_JOC, cnd(C_NOZERO, 1), 12'd520);
    cs[504] = op2(FN_ADD, S1, 3, 1, 1);
    cs[505] = op2(FN_SUBR, S1, 15, 1, 1);
    cs[506] = op2(FN_XOR, S3, 3, 1);
    cs[507] = proc(OP_DO, DS_RAMD, FN_OR, SRC_ZA, 4'd0, 4'd6, S123);
    cs[508] = clr(S123, 7);
    cs[509] = aux(OP_LDCTR, 8'd232);
    cs[510] = proc(OP_LSU, DS_RAMF, FN_OR, SRC_ZB, 0, 4'd2, S123);
    cs[511] = seqc(OP_JOC, cnd(C_RAM0, 1), 12'd513);
    cs[512] = op2(FN_ADD, S123, 6, 7);
    cs[513] = proc(OP_DO, DS_RAMD, FN_OR, SRC_ZB, 0, 4'd7, S123);
    cs[514] = proc(OP_LOC, DS_RAMD, FN_OR, SRC_ZB, 0, 4'd2, S123, NOT_CTROFL);
    cs[515] = mov(S123, 7, 0);
    cs[516] = jmp(NORM);
    cs[520] = clr(S123, 0); cs[521] = clr(S13, 1); cs[522] = ret();
    // normalise a (non-zero) and return
    cs[NORM+0] = aux(OP_LDCTR, 8'd0);
    cs[NORM+1] = tst(S123, 0);
    cs[NORM+2] = proc(OP_DOW, DS_RAMU, FN_OR, SRC_ZB, 0, 4'd0, S123, {1'b1, C_RAM23});
    cs[NORM+3] = proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd10, S1);
    cs[NORM+4] = op2(FN_SUBR, S1, 10, 1, 1);
    cs[NORM+5] = ret();
    // convert a to a 16-bit integer and output two bytes
    cs[CVT+0] = tst(S123, 0);
    cs[CVT+1] = seqc(OP_ROC, cnd(C_NOZERO, 1), 12'd0);
    cs[CVT+2] = aux(OP_LDCTR, 8'd152);
    cs[CVT+3] = proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd10, S1);
    cs[CVT+4] = op2(FN_SUBR, S1, 1, 10, 1);                 // k = 152 - e
    cs[CVT+5] = proc(OP_WRCTR, DS_NOP, FN_XNOR, SRC_ZA, 4'd10, 4'd0, S1);
    cs[CVT+6] = proc(OP_DOW, DS_RAMD, FN_OR, SRC_ZB, 0, 4'd0, S123, NOT_CTROFL);
    cs[CVT+7] = tst(S3, 1);
    cs[CVT+8] = seqc(OP_ROC, cnd(C_SIGN3, 1), 12'd0);
    cs[CVT+9] = proc(OP_DO, DS_RAMF, FN_SUBS, SRC_ZA, 4'd0, 4'd0, S12, 5'd0, 0, 1);
    cs[CVT+10] = ret();
    // output slices 1 and 2 of R0
    cs[OUT2+0] = proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd0, S1);
    cs[OUT2+1] = seqc(OP_JOC, cnd(C_DMABUSY), 12'(OUT2+1));
    cs[OUT2+2] = proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd0, S2);
    cs[OUT2+3] = seqc(OP_JOC, cnd(C_DMABUSY), 12'(OUT2+3));
    cs[OUT2+4] = ret();
    cs[CONV+0] = call(CVT);
    cs[CONV+1] = jmp(OUT2);
    // pack a and output four bytes
    cs[OUTF+0] = tst(S123, 0);
    cs[OUTF+1] = seqc(OP_JOC, cnd(C_NOZERO), 12'(OUTF+4));
    cs[OUTF+2] = clr(S13, 1);
    cs[OUTF+3] = jmp(OUTF+8);
    cs[OUTF+4] = mov(S3, 1, 8);
    cs[OUTF+5] = op2(FN_AND, S3, 15, 8);                 // sign bit
    cs[OUTF+6] = op2(FN_XOR, S3, 15, 0);                 // drop hidden bit
    cs[OUTF+7] = op2(FN_OR, S3, 8, 0);
    cs[OUTF+8] = proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd0, S1);
    cs[OUTF+9] = seqc(OP_JOC, cnd(C_DMABUSY), 12'(OUTF+9));
    cs[OUTF+10] = proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd0, S2);
    cs[OUTF+11] = seqc(OP_JOC, cnd(C_DMABUSY), 12'(OUTF+11));
    cs[OUTF+12] = proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd0, S3);
    cs[OUTF+13] = seqc(OP_JOC, cnd(C_DMABUSY), 12'(OUTF+13));
    cs[OUTF+14] = proc(OP_WRCR, DS_NOP, FN_OR, SRC_ZB, 4'd15, 4'd1, S1);
    cs[OUTF+15] = seqc(OP_JOC, cnd(C_DMABUSY), 12'(OUTF+15));
    cs[OUTF+16] = ret();
    // FDIV: a := a / b (b non-zero), restoring division, one quotient bit
    // per LSU/LOC pass; R6 remainder, R7 quotient
    cs[FDIV+0] = tst(S123, 0);
    cs[FDIV+1] = seqc(OP_ROC, cnd(C_NOZERO, 1), 12'd0);       // a = 0
    cs[FDIV+2] = op2(FN_SUBR, S1, 3, 1, 1);                   // ea - eb
    cs[FDIV+3] = op2(FN_ADD, S1, 15, 1);                      // + 128
    cs[FDIV+4] = op2(FN_XOR, S3, 3, 1);
    cs[FDIV+5] = mov(S123, 0, 6);
    cs[FDIV+6] = clr(S123, 7);
    cs[FDIV+7] = mov(S123, 6, 8);
    cs[FDIV+8] = op2(FN_SUBR, S123, 2, 8, 1);                 // ma - mb
    cs[FDIV+9] = seqc(OP_JOC, cnd(C_CARRY3), 12'(FDIV+21));
    cs[FDIV+10] = aux(OP_LDCTR, 8'd232);                      // 24 bits to go
    cs[FDIV+11] = jmp(FDIV+25);
    cs[FDIV+21] = mov(S123, 8, 6);                            // ma >= mb: first bit 1
    cs[FDIV+22] = proc(OP_DO, DS_RAMF, FN_ADD, SRC_ZB, 0, 4'd7, S123, 5'd0, 0, 1);
    cs[FDIV+23] = proc(OP_DO, DS_RAMF, FN_ADD, SRC_ZB, 0, 4'd1, S1, 5'd0, 0, 1);
    cs[FDIV+24] = aux(OP_LDCTR, 8'd233);                      // 23 bits to go
    cs[FDIV+25] = proc(OP_LSU, DS_NOP, FN_OR, SRC_ZB, 0, 4'd6, S123);
    cs[FDIV+26] = proc(OP_DO, DS_RAMU, FN_OR, SRC_ZB, 0, 4'd6, S123);   // r := 2r
    cs[FDIV+27] = seqc(OP_JOC, cnd(C_SIGN3), 12'(FDIV+34));   // bit 24 out: r > mb
    cs[FDIV+28] = mov(S123, 6, 8);
    cs[FDIV+29] = op2(FN_SUBR, S123, 2, 8, 1);
    cs[FDIV+30] = seqc(OP_JOC, cnd(C_CARRY3), 12'(FDIV+34));
    cs[FDIV+31] = proc(OP_LOC, DS_RAMU, FN_OR, SRC_ZB, 0, 4'd7, S123, NOT_CTROFL, 0, 0);
    cs[FDIV+32] = jmp(FDIV+36);
    cs[FDIV+34] = op2(FN_SUBR, S123, 2, 6, 1);
    cs[FDIV+35] = proc(OP_LOC, DS_RAMU, FN_OR, SRC_ZB, 0, 4'd7, S123, NOT_CTROFL, 1, 0);
    cs[FDIV+36] = mov(S123, 7, 0);
    cs[FDIV+37] = ret();
    // FSQRT: a := sqrt(|a|) by five Newton steps s := (x/s + s)/2 from the
    // start value s = a with its exponent halved; x kept in (R11, R12),
    // s in (R4, R5)
    cs[FSQRT+0] = tst(S123, 0);
    cs[FSQRT+1] = seqc(OP_ROC, cnd(C_NOZERO, 1), 12'd0);      // sqrt(0) = 0
    cs[FSQRT+2] = clr(S3, 1);                                 // |a|
    cs[FSQRT+3] = mov(S123, 0, 11);
    cs[FSQRT+4] = mov(S13, 1, 12);
    cs[FSQRT+5] = proc(OP_DO, DS_RAMD, FN_OR, SRC_ZA, 4'd15, 4'd9, S1);  // R9.1 = 64
    cs[FSQRT+6] = proc(OP_DO, DS_RAMD, FN_OR, SRC_ZB, 0, 4'd1, S1);      // e >> 1
    cs[FSQRT+7] = op2(FN_ADD, S1, 9, 1);                      // + 64
    cs[FSQRT+8] = mov(S123, 0, 4);
    cs[FSQRT+9] = mov(S13, 1, 5);
    for (int k = 0; k < 5; k++) cs[FSQRT+10+k] = call(NSTEP);
    cs[FSQRT+15] = ret();
    cs[NSTEP+0] = mov(S123, 11, 0);
    cs[NSTEP+1] = mov(S13, 12, 1);
    cs[NSTEP+2] = mov(S123, 4, 2);
    cs[NSTEP+3] = mov(S13, 5, 3);
    cs[NSTEP+4] = call(FDIV);                                 // x / s
    cs[NSTEP+5] = call(FADD);                                 // + s
    cs[NSTEP+6] = proc(OP_DO, DS_RAMF, FN_SUBR, SRC_ZB, 0, 4'd1, S1);   // / 2
    cs[NSTEP+7] = mov(S123, 0, 4);
    cs[NSTEP+8] = mov(S13, 1, 5);
    cs[NSTEP+9] = ret();
    // FSIN, FCOS for |a| <= pi/2: Horner polynomials in y = a*a through
    // POLY, whose coefficients the host keeps in the BM (sin: 6 values from
    // -1/11! up to 1, then times a; cos: 7 values from 1/12! up to 1).
    // x is kept in (R11, R12), y in (R4, R5), the step count in R13.1
    cs[FSIN+0] = mov(S123, 0, 11);
    cs[FSIN+1] = mov(S13, 1, 12);
    cs[FSIN+2] = mov(S123, 0, 2);
    cs[FSIN+3] = mov(S13, 1, 3);
    cs[FSIN+4] = call(FMUL);                                  // y = x*x
    cs[FSIN+5] = mov(S123, 0, 4);
    cs[FSIN+6] = mov(S13, 1, 5);
    cs[FSIN+7] = aux(OP_LABM, 8'(SIN_TAB));
    cs[FSIN+8] = aux(OP_LDCTR, 8'd5);
    cs[FSIN+9] = proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd13, S1);
    cs[FSIN+10] = call(POLY);
    cs[FSIN+11] = mov(S123, 11, 2);
    cs[FSIN+12] = mov(S13, 12, 3);
    cs[FSIN+13] = jmp(FMUL);                                  // times x, FMUL returns
    cs[FCOS+0] = mov(S123, 0, 2);
    cs[FCOS+1] = mov(S13, 1, 3);
    cs[FCOS+2] = call(FMUL);
    cs[FCOS+3] = mov(S123, 0, 4);
    cs[FCOS+4] = mov(S13, 1, 5);
    cs[FCOS+5] = aux(OP_LABM, 8'(COS_TAB));
    cs[FCOS+6] = aux(OP_LDCTR, 8'd6);
    cs[FCOS+7] = proc(OP_RDCTR, DS_RAMF, FN_OR, SRC_DZ, 0, 4'd13, S1);
    cs[FCOS+8] = jmp(POLY);
    cs[POLY+0] = call(LDA);                                   // highest coefficient
    cs[POLY+1] = mov(S123, 4, 2);
    cs[POLY+2] = mov(S13, 5, 3);
    cs[POLY+3] = call(FMUL);                                  // a * y
    cs[POLY+4] = call(LDB);
    cs[POLY+5] = call(FADD);                                  // + next coefficient
    cs[POLY+6] = proc(OP_DO, DS_RAMF, FN_SUBR, SRC_ZB, 0, 4'd13, S1);
    cs[POLY+7] = seqc(OP_JOC, cnd(C_ZERO1, 1), 12'(POLY+1));
    cs[POLY+8] = ret();
  endfunction

  // ---------------- reference model ----------------
  typedef struct { bit s; int e; longint m; } fp_t;   // m = 0 means zero

  function automatic fp_t unpack(logic [31:0] w);
    fp_t x;
    x.s = w[23]; x.e = int'(w[31:24]);
    x.m = (x.e == 0) ? 0 : longint'({1'b1, w[22:0]});
    if (x.e == 0) x.s = 0;
    return x;
  endfunction
  function automatic real to_real(fp_t x);
    real v;
    if (x.m == 0) return 0.0;
    v = real'(x.m) / 16777216.0 * (2.0 ** (x.e - 128));
    return x.s ? -v : v;
  endfunction
  function automatic logic [31:0] from_real(real r);
    int e; real a; longint m;
    if (r == 0.0) return 32'd0;
    a = (r < 0) ? -r : r;
    e = 128;
    while (a >= 1.0) begin a = a / 2.0; e++; end
    while (a < 0.5) begin a = a * 2.0; e--; end
    m = longint'($floor(a * 16777216.0));
    return {8'(e), r < 0, 23'(m)};
  endfunction
  function automatic fp_t normalise(fp_t x);
    while ((x.m & 64'h800000) == 0) begin x.m = x.m << 1; x.e--; end
    return x;
  endfunction
  function automatic fp_t fadd(fp_t a, fp_t b);
    fp_t r; int d;
    if (b.m == 0) return a;
    if (a.m == 0) return b;
    d = a.e - b.e;
    if (d < 0) begin r = a; a = b; b = r; d = -d; end
    b.m = (d >= 24) ? 0 : (b.m >> d);
    r = a;
    if (a.s == b.s) begin
      r.m = a.m + b.m;
      if (r.m >= 64'h1000000) begin r.m = r.m >> 1; r.e++; end
      return r;
    end
    r.m = a.m - b.m;
    if (r.m == 0) begin r.s = 0; r.e = 0; return r; end
    if (r.m < 0) begin r.m = -r.m; r.s = b.s; end
    return normalise(r);
  endfunction
  function automatic fp_t fmul(fp_t a, fp_t b);
    fp_t r; longint acc;
    if (a.m == 0) return a;
    if (b.m == 0) begin r.m = 0; r.e = 0; r.s = 0; return r; end
    acc = 0;
    for (int i = 0; i < 24; i++) begin
      if ((b.m >> i) & 1) acc += a.m >> 1;
      acc = acc >> 1;
    end
    r.s = a.s ^ b.s; r.e = a.e + b.e - 127; r.m = acc;
    return normalise(r);
  endfunction
  function automatic int to_fix(fp_t x);
    int k; longint v;
    if (x.m == 0) return 0;
    k = 152 - x.e;
    v = (k >= 64) ? 0 : (x.m >> k);
    return int'(16'(x.s ? -v : v));
  endfunction
  function automatic fp_t fdiv(fp_t a, fp_t b);
    fp_t r; longint rem, q; int n;
    if (a.m == 0) return a;
    r.s = a.s ^ b.s; r.e = a.e - b.e + 128;
    rem = a.m; q = 0; n = 24;
    if (rem >= b.m) begin rem -= b.m; q = 1; r.e++; n = 23; end
    repeat (n) begin
      rem = rem << 1; q = q << 1;
      if (rem >= b.m) begin rem -= b.m; q |= 1; end
    end
    r.m = q;
    return r;
  endfunction
  function automatic logic [31:0] pack(fp_t x);
    if (x.m == 0) return 32'd0;
    return {8'(x.e), x.s, 23'(x.m)};
  endfunction
  function automatic fp_t fsqrt(fp_t a);
    fp_t x, s, t;
    if (a.m == 0) return a;
    x = a; x.s = 0;
    s = x; s.e = (x.e >> 1) + 64;
    repeat (5) begin
      t = fadd(fdiv(x, s), s);
      t.e--;
      s = t;
    end
    return s;
  endfunction
  function automatic fp_t fpoly(fp_t y, logic [31:0] c[], int n);
    fp_t a;
    a = unpack(c[0]);
    for (int i = 1; i <= n; i++) a = fadd(fmul(a, y), unpack(c[i]));
    return a;
  endfunction
  // coefficient tables as the host stores them
  function automatic void sin_cos_tables(output logic [31:0] st[], output logic [31:0] ct[]);
    real f;
    st = new[6]; ct = new[7];
    f = 1.0;
    for (int k = 1; k <= 12; k++) begin
      f = f * k;
      if (k % 2 == 1 && k >= 3) st[(11 - k) / 2] = from_real(((k / 2) % 2 == 1 ? -1.0 : 1.0) / f);
      if (k % 2 == 0) ct[(12 - k) / 2] = from_real(((k / 2) % 2 == 1 ? -1.0 : 1.0) / f);
    end
    st[5] = from_real(1.0); ct[6] = from_real(1.0);
  endfunction
  function automatic fp_t fsin(fp_t x, logic [31:0] st[]);
    return fmul(fpoly(fmul(x, x), st, 5), x);
  endfunction
  function automatic fp_t fcos(fp_t x, logic [31:0] ct[]);
    return fpoly(fmul(x, x), ct, 6);
  endfunction
endpackage
