// cr_file: control register (CR) file shared by the host CPU and the
// arithmetics processor.
//
// Sixteen 8-bit registers with a port for each side, both usable in the same
// cycle. The host writes the code of a macrofunction and its parameters into
// agreed registers; the processor reads them (RDCR, and JEXT for the jump to
// the macrofunction), and writes back status (WRCR). One register, OUT_REG,
// is the output buffer for transformed data: each byte the processor writes
// there raises a request to a DMA channel, which moves the byte to common
// memory and acknowledges. The size, the dual-port access, the output
// register and the request per written byte follow the design. Which register
// is the output buffer (15), the request/acknowledge handshake and the
// processor winning a same-cycle write to one register are this design's
// choices.
//
// Timing: both reads are combinational, writes happen at the rising clock
// edge. dma_req rises the cycle after a processor write to OUT_REG and stays
// high until dma_ack. Synchronous reset clears the registers and the request.
module cr_file #(
  parameter int unsigned N       = 16,
  parameter int unsigned OUT_REG = 15,
  localparam int unsigned AW     = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  // host side
  input  logic [AW-1:0] host_addr,
  input  logic          host_we,
  input  logic [7:0]    host_wdata,
  output logic [7:0]    host_rdata,
  // processor side
  input  logic [AW-1:0] ap_addr,
  input  logic          ap_we,
  input  logic [7:0]    ap_wdata,
  output logic [7:0]    ap_rdata,
  // DMA channel for the output register
  output logic          dma_req,
  input  logic          dma_ack
);
  logic [7:0] regs [N];

  assign host_rdata = regs[host_addr];
  assign ap_rdata   = regs[ap_addr];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(N); k++) regs[k] <= '0;
      dma_req <= 1'b0;
    end else begin
      if (host_we && !(ap_we && ap_addr == host_addr)) regs[host_addr] <= host_wdata;
      if (ap_we) regs[ap_addr] <= ap_wdata;
      if (ap_we && ap_addr == AW'(OUT_REG)) dma_req <= 1'b1;
      else if (dma_ack)                     dma_req <= 1'b0;
    end
  end

  // The DMA channel acknowledges only a pending request.
  a_ack_only_when_req: assert property (@(posedge clk) disable iff (rst) dma_ack |-> dma_req);
endmodule
