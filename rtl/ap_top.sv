// ap_top: microprogrammed bit-slice arithmetics processor (AP).
//
// The AP sits on the internal bus of the host microcomputer of the arithmetics
// module and does its floating point and graphics transformation work. Three
// 8-bit Am2901-type slices (slice 1 least significant) form, under the slice
// control field of each microinstruction, an 8-bit unit (exponent, slice 1), a
// 16-bit unit (integers, slices 1+2) or a 24-bit unit (mantissa, all three).
// The microprogram control unit fetches one 32-bit microinstruction per clock
// from a 4K-word control memory and sequences it with conditions taken from
// the condition flags, an iteration counter, a subroutine stack and a loop
// register. All data moves over the 8-bit AP-bus: bytes from the 1K buffer
// memory (through an autoincrementing address register), from the iteration
// counter, from and to the 16-byte control register file, and the slice
// results. The host writes parameters and coordinates into the buffer memory
// and macrofunction codes into the CR file; the AP writes results into the CR
// output register, each byte raising a DMA request.
//
// The block structure, widths and sizes follow the design. Host side signals
// (internal bus of the I8080 microcomputer, DMA channel, DMA busy line) are
// brought out as plain ports. The control memory load port is this design's
// addition, as the microcode is not part of the RTL.
//
// Timing: one microinstruction per rising clock edge; synchronous reset; after
// reset execution starts at microprogram address 0.
module ap_top
  import ap_pkg::*;
#(
  parameter int unsigned CS_DEPTH = 4096,   // control memory words
  parameter int unsigned BM_DEPTH = 1024,   // buffer memory bytes
  parameter int unsigned CR_OUT   = 15      // CR output buffer register
) (
  input  logic                         clk,
  input  logic                         rst,
  // control memory load port
  input  logic                         cm_we,
  input  logic [UADDR_W-1:0]           cm_waddr,
  input  logic [UWORD_W-1:0]           cm_wdata,
  // host side of the buffer memory
  input  logic [$clog2(BM_DEPTH)-1:0]  bm_host_addr,
  input  logic                         bm_host_we,
  input  logic [7:0]                   bm_host_wdata,
  output logic [7:0]                   bm_host_rdata,
  // host side of the control register file
  input  logic [3:0]                   cr_host_addr,
  input  logic                         cr_host_we,
  input  logic [7:0]                   cr_host_wdata,
  output logic [7:0]                   cr_host_rdata,
  // DMA
  output logic                         dma_req,
  input  logic                         dma_ack,
  input  logic                         dma_busy,
  // observation
  output logic [UADDR_W-1:0]           uaddr
);
  uinstr_t             ui;
  logic                proc_valid, bm_load, bm_rd, cr_we, ctr_ofl, repeating, cond_true;
  bus_src_e            bus_src;
  logic [7:0]          bm_load_val, ctr_value, bm_rdata, cr_rdata;
  logic [15:0]         cond;
  logic [7:0]          bus, bus_ext, slice_y_bus;
  logic [$clog2(BM_DEPTH)-1:0] bm_ap_addr;

  // slices
  logic [2:0]          en, cin, ram_lsb_in, ram_msb_in, q_lsb_in, q_msb_in;
  logic [2:0]          cout, ram_lsb_out, ram_msb_out, q_lsb_out, q_msb_out;
  logic [2:0]          ovr, fz, fs, sh_lsb, sh_msb;
  logic [7:0]          y [3];
  logic                carry_top;
  slice_status_t [2:0] status;

  mcu #(.CS_DEPTH(CS_DEPTH)) u_mcu (
    .clk, .rst, .cm_we, .cm_waddr, .cm_wdata, .cond, .bus,
    .ui, .proc_valid, .bus_src, .bm_load, .bm_load_val, .bm_rd, .cr_we,
    .ctr_value, .ctr_ofl, .uaddr, .repeating, .cond_true
  );

  config_ctrl u_cfg (
    .sc(proc_valid ? ui.sc : 3'b000), .dest(ui.sfd[8:6]), .si(ui.si), .ci(ui.ci),
    .cout, .ram_lsb_out, .ram_msb_out, .q_lsb_out, .q_msb_out,
    .en, .cin, .ram_lsb_in, .ram_msb_in, .q_lsb_in, .q_msb_in, .carry_top
  );

  for (genvar k = 0; k < 3; k++) begin : g_slice
    am2901_slice #(.W(8)) u_slice (
      .clk, .en(en[k]), .i(ui.sfd), .a_addr(ui.rama), .b_addr(ui.ramb), .d(bus_ext),
      .cin(cin[k]), .ram_lsb_in(ram_lsb_in[k]), .ram_msb_in(ram_msb_in[k]),
      .q_lsb_in(q_lsb_in[k]), .q_msb_in(q_msb_in[k]),
      .y(y[k]), .cout(cout[k]), .ovr(ovr[k]), .f_zero(fz[k]), .f_sign(fs[k]),
      .ram_lsb_out(ram_lsb_out[k]), .ram_msb_out(ram_msb_out[k]),
      .q_lsb_out(q_lsb_out[k]), .q_msb_out(q_msb_out[k]),
      .sh_lsb(sh_lsb[k]), .sh_msb(sh_msb[k])
    );
    assign status[k] = '{sign: fs[k], carry: cout[k], ovr: ovr[k], zero: fz[k]};
  end

  cond_flags u_flags (
    .clk, .rst, .proc_valid, .slice_en(en), .status,
    .ram0(sh_lsb[0]), .ram23(sh_msb[2]),
    .ctr_ofl, .dma_busy, .cond
  );

  // AP-bus: the lowest active slice drives it unless a transfer instruction
  // selects the buffer memory, the counter or the CR file. The slices' D
  // inputs see only those other sources, so no slice output feeds back.
  always_comb begin
    if (ui.sc[0])      slice_y_bus = y[0];
    else if (ui.sc[1]) slice_y_bus = y[1];
    else               slice_y_bus = y[2];
    unique case (bus_src)
      BUS_BM:  bus_ext = bm_rdata;
      BUS_CTR: bus_ext = ctr_value;
      BUS_CR:  bus_ext = cr_rdata;
      default: bus_ext = 8'h00;
    endcase
    bus = (bus_src == BUS_SLICE) ? slice_y_bus : bus_ext;
  end

  buffer_memory #(.DEPTH(BM_DEPTH)) u_bm (
    .clk, .rst, .host_addr(bm_host_addr), .host_we(bm_host_we),
    .host_wdata(bm_host_wdata), .host_rdata(bm_host_rdata),
    .ap_load(bm_load), .ap_load_val(bm_load_val), .ap_rd(bm_rd),
    .ap_rdata(bm_rdata), .ap_addr(bm_ap_addr)
  );

  cr_file #(.N(16), .OUT_REG(CR_OUT)) u_cr (
    .clk, .rst, .host_addr(cr_host_addr), .host_we(cr_host_we),
    .host_wdata(cr_host_wdata), .host_rdata(cr_host_rdata),
    .ap_addr(ui.rama), .ap_we(cr_we), .ap_wdata(bus), .ap_rdata(cr_rdata),
    .dma_req, .dma_ack
  );
endmodule
