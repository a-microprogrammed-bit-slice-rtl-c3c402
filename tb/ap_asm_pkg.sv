// ap_asm_pkg: helpers that assemble 32-bit microinstructions for the
// arithmetics processor testbenches, in the field layout of ap_pkg.
package ap_asm_pkg;
  import ap_pkg::*;

  // S/F/D field values (Am2901 I8..I0)
  localparam logic [2:0] SRC_AQ = 3'd0, SRC_AB = 3'd1, SRC_ZQ = 3'd2, SRC_ZB = 3'd3,
                         SRC_ZA = 3'd4, SRC_DA = 3'd5, SRC_DQ = 3'd6, SRC_DZ = 3'd7;
  localparam logic [2:0] FN_ADD = 3'd0, FN_SUBR = 3'd1, FN_SUBS = 3'd2, FN_OR = 3'd3,
                         FN_AND = 3'd4, FN_NOTRS = 3'd5, FN_XOR = 3'd6, FN_XNOR = 3'd7;
  localparam logic [2:0] DS_QREG = 3'd0, DS_NOP = 3'd1, DS_RAMA = 3'd2, DS_RAMF = 3'd3,
                         DS_RAMQD = 3'd4, DS_RAMD = 3'd5, DS_RAMQU = 3'd6, DS_RAMU = 3'd7;
  localparam logic [4:0] ALWAYS = 5'b1_0000;   // inverted FALSE

  function automatic logic [4:0] cnd(cond_e c, bit inv = 0);
    return {inv, c};
  endfunction

  // PROC format
  function automatic logic [31:0] proc(opc_e op, logic [2:0] dst, logic [2:0] fn, logic [2:0] src,
                                       logic [3:0] a, logic [3:0] b, logic [2:0] sc,
                                       logic [4:0] cn = 5'd0, bit si = 0, bit ci = 0);
    uinstr_t u;
    u.opc = op; u.sfd = {dst, fn, src}; u.cnr = cn; u.si = si; u.ci = ci;
    u.sc = sc; u.rsv = 1'b0; u.ramb = b; u.rama = a;
    return u;
  endfunction

  // SEQC format
  function automatic logic [31:0] seqc(opc_e op, logic [4:0] cn, logic [11:0] addr);
    return {op, 9'd0, cn, 2'd0, addr};
  endfunction

  // FETCH format
  function automatic logic [31:0] fetch(logic [5:0] offset, logic [3:0] crn);
    return {OP_JEXT, 9'd0, 5'd0, 4'd0, offset, crn};
  endfunction

  // AUX format
  function automatic logic [31:0] aux(opc_e op, logic [7:0] k, logic [2:0] cc = 3'd0);
    return {op, 9'd0, 5'd0, 2'd0, cc, 1'b0, k};
  endfunction
endpackage
