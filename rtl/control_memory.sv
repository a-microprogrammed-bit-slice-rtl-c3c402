// control_memory: microprogram store of the MCU.
//
// DEPTH words of W bits (4096 x 32: the full 12-bit address range of the
// sequencer and the 32-bit microinstruction). The design shows it as a
// read-only memory addressed by the sequencer. Its contents, the microcode,
// are not part of this RTL, so the store here is writable through a load
// port, which is this design's choice; a mask-programmed version would drop
// the write port and initialise the array instead.
//
// Timing: asynchronous read, so the word at the sequencer address is at the
// pipeline register input in the same cycle; the write port writes at the
// rising clock edge.
module control_memory #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
