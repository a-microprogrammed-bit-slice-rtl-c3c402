// ap_pkg: types and constants shared by the arithmetics processor (AP).
//
// The 32-bit microinstruction has four formats (PROC, SEQC, FETCH, AUX). The
// first four bits (OPC) tell how the rest is read. Field positions follow the
// format chart of the design: OPC 31-28, S/F/D 27-19, CNR 18-14, SI/CI 13-12,
// SC or CC 11-9, jump address 11-0, constant in the low bits, CR number in
// the low four bits. The placement of RAMB (7-4) and RAMA (3-0), the sharing of
// RAMA with the CR number, and the numeric opcode values are this design's
// own choices.
package ap_pkg;

  // Operation codes. JMP, CALL and RET are JOC, COC and ROC with the always-
  // true condition (CNR = inverted FALSE).
  typedef enum logic [3:0] {
    OP_JOC   = 4'd0,   // jump on condition            (SEQC)
    OP_COC   = 4'd1,   // call on condition            (SEQC)
    OP_ROC   = 4'd2,   // return on condition          (SEQC)
    OP_JEXT  = 4'd3,   // jump to {OFFSET, CR[n][5:0]} (FETCH)
    OP_DO    = 4'd4,   // processor op, continue       (PROC)
    OP_DOW   = 4'd5,   // processor op while condition (PROC)
    OP_LSU   = 4'd6,   // processor op, store loop entry (PROC)
    OP_LOC   = 4'd7,   // processor op, loop on condition (PROC)
    OP_LABM  = 4'd8,   // BM address from constant     (AUX)
    OP_LDCTR = 4'd9,   // counter from constant        (AUX)
    OP_LABMP = 4'd10,  // BM address from slice        (PROC)
    OP_WRCTR = 4'd11,  // counter from slice           (PROC)
    OP_RDMEM = 4'd12,  // slice from BM, address + 1   (PROC)
    OP_RDCTR = 4'd13,  // slice from counter           (PROC)
    OP_RDCR  = 4'd14,  // slice from CR file           (PROC)
    OP_WRCR  = 4'd15   // CR file from slice           (PROC)
  } opc_e;

  // Condition numbers (CNR[3:0]); CNR[4] inverts the selected condition.
  typedef enum logic [3:0] {
    C_FALSE = 4'd0,  C_SIGN1 = 4'd1,  C_SIGN2 = 4'd2,   C_SIGN3 = 4'd3,
    C_CARRY3 = 4'd4, C_OFL1 = 4'd5,   C_OFL2 = 4'd6,    C_ZERO1 = 4'd7,
    C_ZERO2 = 4'd8,  C_ZERO3 = 4'd9,  C_NOZERO21 = 4'd10, C_NOZERO = 4'd11,
    C_RAM0 = 4'd12,  C_RAM23 = 4'd13, C_CTROFL = 4'd14, C_DMABUSY = 4'd15
  } cond_e;

  // PROC-format view of a microinstruction.
  typedef struct packed {
    opc_e        opc;   // 31-28
    logic [8:0]  sfd;   // 27-19 Am2901 I8..I0 (destination, function, source)
    logic [4:0]  cnr;   // 18-14 {invert, condition number}
    logic        si;    // 13    shift input bit
    logic        ci;    // 12    carry input
    logic [2:0]  sc;    // 11-9  slice control {slice3, slice2, slice1}
    logic        rsv;   // 8     unused
    logic [3:0]  ramb;  // 7-4   B address
    logic [3:0]  rama;  // 3-0   A address, also CR number
  } uinstr_t;

  localparam int unsigned UADDR_W = 12;   // three 4-bit sequencer elements
  localparam int unsigned UWORD_W = 32;

  // True for the opcodes that run an operation in the bit-slices.
  function automatic logic is_proc(opc_e o);
    return (o inside {OP_DO, OP_DOW, OP_LSU, OP_LOC, OP_LABMP, OP_WRCTR,
                      OP_RDMEM, OP_RDCTR, OP_RDCR, OP_WRCR});
  endfunction

  // Driver of the 8-bit AP-bus.
  typedef enum logic [1:0] {
    BUS_SLICE = 2'd0,  // lowest active slice's Y output
    BUS_BM    = 2'd1,  // buffer memory byte
    BUS_CTR   = 2'd2,  // iteration counter
    BUS_CR    = 2'd3   // control register file
  } bus_src_e;

  // Status of one slice after an operation.
  typedef struct packed {
    logic sign;
    logic carry;
    logic ovr;
    logic zero;
  } slice_status_t;

endpackage
