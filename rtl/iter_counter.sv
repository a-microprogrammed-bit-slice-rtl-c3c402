// iter_counter: iteration counter of the microprogram control unit.
//
// An 8-bit up counter used for iterative microinstructions. It is loaded from
// the MCU (a microinstruction constant, LDCTR) or from a processor slice over
// the AP-bus (WRCTR), counts up by one every time a DOW or LOC instruction
// executes, and can be read back by the slices (RDCTR), for example to correct
// the exponent by the number of normalization shifts. Its overflow condition
// CTROFL lets a loop run a preset number of times: load 256-N, repeat while
// CTROFL is false, and the instruction runs N times. On a subroutine call the
// count is pushed onto a stack as deep as the address stack (DEPTH), and a
// return restores it. The loading, counting, overflow condition and stacking
// follow the design. The 8-bit width, taking CTROFL as "count is all ones"
// (the next increment overflows) and the stack depth are this design's
// choices.
//
// Timing: all updates at the rising clock edge; load wins over inc; pop
// restores the stacked value and wins over both. Synchronous reset to 0.
module iter_counter #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] load_val,
  input  logic         inc,
  input  logic         push,
  input  logic         pop,
  output logic [W-1:0] count,
  output logic         ofl
);
  localparam int unsigned SPW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0]   stk [DEPTH];
  logic [SPW-1:0] sp;           // next free entry

  assign ofl = (count == '1);

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      sp    <= '0;
      for (int k = 0; k < int'(DEPTH); k++) stk[k] <= '0;
    end else begin
      if (pop) begin
        count <= stk[SPW'(sp - 1'b1)];
        sp    <= SPW'(sp - 1'b1);
      end else if (load)
        count <= load_val;
      else if (inc)
        count <= count + 1'b1;
      if (push && !pop) begin
        stk[sp] <= count;
        sp      <= SPW'(sp + 1'b1);
      end
    end
  end
endmodule
