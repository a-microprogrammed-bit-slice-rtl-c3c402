// cond_flags: condition flag register of the arithmetics processor.
//
// After every cycle in which the slices execute an operation, the status of
// each active slice (sign, carry out, overflow, zero) is stored, together with
// the RAM shifter end bits: bit 0 (shifter output bit 0 of slice 1) and bit 23
// (shifter output bit 7 of slice 3), i.e. the end bits of the value written
// back, after any shift. The stored flags of inactive slices keep their old values. From
// the stored flags and two live signals (the counter overflow and the DMA-busy
// line) the block forms the sixteen MCU conditions in the order of the
// condition table: FALSE, SIGN1..3, CARRY3, OFL1, OFL2, ZERO1..3, NOZERO21
// (slices 1 and 2 not both zero), NOZERO (the three slices not all zero),
// RAM0, RAM23, CTROFL, DMABUSY. The condition list is the design's; storing
// the flags in a register so that an instruction tests the result of the
// instruction before it is this design's choice.
//
// Timing: flags are written at the rising clock edge when proc_valid is high;
// the condition vector is combinational from the register and the live inputs.
// A synchronous reset clears the flags.
module cond_flags
  import ap_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                proc_valid,   // slices executed an operation
  input  logic [2:0]          slice_en,
  input  slice_status_t [2:0] status,       // index 0 = slice 1
  input  logic                ram0,         // shifter bit 0 of slice 1
  input  logic                ram23,        // shifter bit 7 of slice 3
  input  logic                ctr_ofl,
  input  logic                dma_busy,
  output logic [15:0]         cond
);
  slice_status_t [2:0] st_q;
  logic ram0_q, ram23_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q    <= '0;
      ram0_q  <= 1'b0;
      ram23_q <= 1'b0;
    end else if (proc_valid) begin
      for (int k = 0; k < 3; k++)
        if (slice_en[k]) st_q[k] <= status[k];
      if (slice_en[0]) ram0_q  <= ram0;
      if (slice_en[2]) ram23_q <= ram23;
    end
  end

  always_comb begin
    cond             = '0;
    cond[C_FALSE]    = 1'b0;
    cond[C_SIGN1]    = st_q[0].sign;
    cond[C_SIGN2]    = st_q[1].sign;
    cond[C_SIGN3]    = st_q[2].sign;
    cond[C_CARRY3]   = st_q[2].carry;
    cond[C_OFL1]     = st_q[0].ovr;
    cond[C_OFL2]     = st_q[1].ovr;
    cond[C_ZERO1]    = st_q[0].zero;
    cond[C_ZERO2]    = st_q[1].zero;
    cond[C_ZERO3]    = st_q[2].zero;
    cond[C_NOZERO21] = !(st_q[0].zero && st_q[1].zero);
    cond[C_NOZERO]   = !(st_q[0].zero && st_q[1].zero && st_q[2].zero);
    cond[C_RAM0]     = ram0_q;
    cond[C_RAM23]    = ram23_q;
    cond[C_CTROFL]   = ctr_ofl;
    cond[C_DMABUSY]  = dma_busy;
  end
endmodule
