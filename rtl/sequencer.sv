// sequencer: microinstruction sequence control (MSC) of the MCU.
//
// The design builds it from three 4-bit Am2911 sequencer elements, giving a
// 12-bit microprogram address. This module models the three as one 12-bit
// unit: a microprogram counter (uPC), a last-in first-out stack for return
// addresses (DEPTH words, four in the Am2911) and a loop entry register that
// the LSU instruction writes and the LOC instruction jumps to. The next
// address is chosen by sel: the uPC (continue), the D input (jump address from
// the A MUX), the top of the stack (return) or the loop register. The uPC is
// loaded with the chosen address plus one, so the uPC always holds the
// address following the instruction being fetched. hold freezes the uPC,
// which together with a held pipeline register repeats the current
// instruction (DOW). A push stores the uPC, i.e. the address after the
// calling instruction. The loop register holds the address following the
// LSU instruction. Modelling the three Am2911 as one unit and keeping the
// loop register next to it are this design's choices.
//
// Timing: y is combinational; uPC, stack and loop register change at the
// rising clock edge. Synchronous reset sets everything to 0, so the first
// instruction fetched is at address 0.
module sequencer #(
  parameter int unsigned AW    = 12,
  parameter int unsigned DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [1:0]    sel,        // 0 uPC, 1 D, 2 stack, 3 loop register
  input  logic [AW-1:0] d,
  input  logic          hold,
  input  logic          push,
  input  logic          pop,
  input  logic          loop_set,
  output logic [AW-1:0] y,
  output logic [AW-1:0] upc
);
  localparam int unsigned SPW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [AW-1:0]  stk [DEPTH];
  logic [SPW-1:0] sp;           // next free entry
  logic [AW-1:0]  loop_reg;

  always_comb begin
    unique case (sel)
      2'd0: y = upc;
      2'd1: y = d;
      2'd2: y = stk[SPW'(sp - 1'b1)];
      default: y = loop_reg;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      upc      <= '0;
      sp       <= '0;
      loop_reg <= '0;
      for (int k = 0; k < int'(DEPTH); k++) stk[k] <= '0;
    end else begin
      if (!hold) upc <= y + 1'b1;
      if (loop_set) loop_reg <= upc;
      if (push && !pop) begin
        stk[sp] <= upc;
        sp      <= SPW'(sp + 1'b1);
      end else if (pop && !push)
        sp <= SPW'(sp - 1'b1);
    end
  end
endmodule
