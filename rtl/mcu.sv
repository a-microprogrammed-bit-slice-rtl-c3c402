// mcu: microprogram control unit of the arithmetics processor.
//
// Holds the sequencer, the A MUX in front of its address input, the control
// memory, the 32-bit pipeline register, the condition multiplexer, the
// iteration counter and the decoders that turn the operation code (the first
// four bits of the microinstruction) into control signals for the sequencer,
// the slices, the buffer memory, the counter and the control register file.
//
// One microinstruction runs per clock. While the instruction in the pipeline
// register executes, the sequencer works out the next address from it and the
// selected condition, and the word at that address is loaded into the
// pipeline register at the clock edge, so a taken jump costs no extra cycle.
// Sequence control instructions: JOC/COC/ROC jump, call or return when the
// condition is true (with CNR = inverted FALSE they are JMP, CALL, RET); a
// call also pushes the iteration counter and a return pops it. JEXT jumps to
// {OFFSET, low six bits of a CR register}, the dispatch to a macrofunction.
// Processor instructions: DO continues; DOW works like a DO WHILE statement:
// each cycle it tests its condition first; while true it executes its
// processor operation, counts, and stays (pipeline register and uPC held);
// the first cycle the condition is false it executes nothing and continues.
// LSU stores the address after itself as loop entry; LOC executes, counts and
// jumps to the loop entry when its condition is true. Conditions come from
// the flags stored by the previous processor operation, so a DOW that shifts
// a register while RAM23 is false stops exactly when bit 23 has become 1. The instruction set,
// formats and mechanisms follow the design; the opcode values, the decoding
// as plain logic instead of PROMs, and the exact DOW and LOC timing are this
// design's choices.
//
// Reset: the pipeline register is cleared to an all-zero word (JOC FALSE, a
// no-operation) and the sequencer to address 0, so execution starts at 0.
module mcu
  import ap_pkg::*;
#(
  parameter int unsigned CS_DEPTH  = 4096,
  parameter int unsigned STACK_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  // control memory load port
  input  logic                 cm_we,
  input  logic [UADDR_W-1:0]   cm_waddr,
  input  logic [UWORD_W-1:0]   cm_wdata,
  // conditions and AP-bus
  input  logic [15:0]          cond,
  input  logic [7:0]           bus,
  // pipeline register and decoded controls
  output uinstr_t              ui,
  output logic                 proc_valid,
  output bus_src_e             bus_src,
  output logic                 bm_load,
  output logic [7:0]           bm_load_val,
  output logic                 bm_rd,
  output logic                 cr_we,
  output logic [7:0]           ctr_value,
  output logic                 ctr_ofl,
  output logic [UADDR_W-1:0]   uaddr,      // address being fetched
  output logic                 repeating,  // DOW repeats this cycle
  output logic                 cond_true
);
  logic [1:0]          sel;
  logic                hold, push, pop, loop_set;
  logic [UADDR_W-1:0]  d_addr, upc;
  logic [UWORD_W-1:0]  cm_rdata;
  logic                ctr_load, ctr_inc;
  logic [7:0]          ctr_load_val;

  cond_mux u_cmux (.cond(cond), .cnr(ui.cnr), .y(cond_true));

  // A MUX: jump address field or {OFFSET, six bits from the AP-bus}
  assign d_addr = (ui.opc == OP_JEXT) ? UADDR_W'({ui[9:4], bus[5:0]}) : ui[11:0];

  always_comb begin
    sel          = 2'd0;
    hold         = 1'b0;
    push         = 1'b0;
    pop          = 1'b0;
    loop_set     = 1'b0;
    ctr_load     = 1'b0;
    ctr_load_val = ui[7:0];
    ctr_inc      = 1'b0;
    bm_load      = 1'b0;
    bm_load_val  = ui[7:0];
    bm_rd        = 1'b0;
    cr_we        = 1'b0;
    bus_src      = BUS_SLICE;
    unique case (ui.opc)
      OP_JOC:  if (cond_true) sel = 2'd1;
      OP_COC:  if (cond_true) begin sel = 2'd1; push = 1'b1; end
      OP_ROC:  if (cond_true) begin sel = 2'd2; pop = 1'b1; end
      OP_JEXT: begin sel = 2'd1; bus_src = BUS_CR; end
      OP_DO:   ;
      OP_DOW:  begin ctr_inc = cond_true; hold = cond_true; end
      OP_LSU:  loop_set = 1'b1;
      OP_LOC:  begin ctr_inc = 1'b1; if (cond_true) sel = 2'd3; end
      OP_LABM: bm_load = 1'b1;
      OP_LDCTR: ctr_load = 1'b1;
      OP_LABMP: begin bm_load = 1'b1; bm_load_val = bus; end
      OP_WRCTR: begin ctr_load = 1'b1; ctr_load_val = bus; end
      OP_RDMEM: begin bm_rd = 1'b1; bus_src = BUS_BM; end
      OP_RDCTR: bus_src = BUS_CTR;
      OP_RDCR:  bus_src = BUS_CR;
      OP_WRCR:  cr_we = 1'b1;
      default: ;
    endcase
  end

  // a DOW whose condition is false executes nothing
  assign proc_valid = is_proc(ui.opc) && !(ui.opc == OP_DOW && !cond_true);
  assign repeating  = hold;

  sequencer #(.AW(UADDR_W), .DEPTH(STACK_DEPTH)) u_seq (
    .clk, .rst, .sel, .d(d_addr), .hold, .push, .pop, .loop_set,
    .y(uaddr), .upc(upc)
  );

  control_memory #(.DEPTH(CS_DEPTH), .W(UWORD_W)) u_cm (
    .clk, .we(cm_we), .waddr($clog2(CS_DEPTH)'(cm_waddr)), .wdata(cm_wdata),
    .raddr($clog2(CS_DEPTH)'(uaddr)), .rdata(cm_rdata)
  );

  iter_counter #(.W(8), .DEPTH(STACK_DEPTH)) u_ctr (
    .clk, .rst, .load(ctr_load), .load_val(ctr_load_val), .inc(ctr_inc),
    .push, .pop, .count(ctr_value), .ofl(ctr_ofl)
  );

  // pipeline register
  always_ff @(posedge clk) begin
    if (rst)       ui <= '0;
    else if (!hold) ui <= uinstr_t'(cm_rdata);
  end
endmodule
