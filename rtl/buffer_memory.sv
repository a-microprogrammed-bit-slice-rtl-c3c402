// buffer_memory: buffer memory (BM) between the host and the arithmetics
// processor.
//
// A byte-wide memory of DEPTH bytes (1K in the design) holding the
// transformation parameters, coordinate blocks and, for the host, a stack of
// transformation matrices. The host side (internal bus, written by the DMA
// unit or the CPU) reads and writes any byte. The processor side only reads,
// through an address register: LABM (from a microinstruction constant) and
// LABMP (from a slice over the AP-bus) load it with a base address, and every
// byte fetched with RDMEM increments it. The 1K size, the autoincrementing
// address register and its two load sources follow the design. Since the
// load value is eight bits wide and the address ten, the value is taken as
// the base address in units of four bytes, one 32-bit floating point value
// (address = value * 4); this scaling, the host port timing and the
// read-only processor side are this design's choices.
//
// Timing: host port writes at the rising clock edge and has a registered read
// (data one cycle after the address). The processor read is combinational
// from the address register; the register loads or increments at the edge.
// Synchronous reset clears the address register.
module buffer_memory #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  // host side (internal bus)
  input  logic [AW-1:0] host_addr,
  input  logic          host_we,
  input  logic [7:0]    host_wdata,
  output logic [7:0]    host_rdata,
  // processor side (AP-bus)
  input  logic          ap_load,     // LABM / LABMP
  input  logic [7:0]    ap_load_val, // base address in 4-byte units
  input  logic          ap_rd,       // RDMEM: fetch and increment
  output logic [7:0]    ap_rdata,
  output logic [AW-1:0] ap_addr
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
    host_rdata <= mem[host_addr];
  end

  assign ap_rdata = mem[ap_addr];

  always_ff @(posedge clk) begin
    if (rst)          ap_addr <= '0;
    else if (ap_load) ap_addr <= AW'({ap_load_val, 2'b00});
    else if (ap_rd)   ap_addr <= ap_addr + 1'b1;
  end
endmodule
