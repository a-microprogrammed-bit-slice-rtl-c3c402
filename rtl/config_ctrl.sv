// config_ctrl: configuration control of the three processor slices.
//
// The SC field of a processor microinstruction names the slices that take
// part in the operation (bit 0 slice 1, bit 1 slice 2, bit 2 slice 3; slice 1
// is the least significant byte, slice 3 the most significant). So one
// microinstruction can work on the exponent byte alone (slice 1), a 16-bit
// integer (slices 1+2) or the 24-bit mantissa (all three). This block enables
// the chosen slices and links them into one wider unit: the carry ripples from
// each active slice into the next active one above it, and the RAM and Q shift
// lines pass between active neighbours in the same way. At the ends of the
// chain: CI enters the lowest active slice; SI enters the RAM at the top on a
// down shift and the Q at the bottom on an up shift. For the double-length
// shifts (RAMQD, RAMQU) the RAM and Q form one {RAM,Q} register: on a down
// shift the bit leaving the RAM at the bottom enters Q at the top, on an up
// shift the bit leaving Q at the top enters the RAM at the bottom, which is
// what shift-and-add multiply and shift-and-subtract divide need. On a single
// RAM up shift SI enters the RAM bottom. The slice selection follows the
// design; the exact chaining rules are this design's own choice.
//
// Purely combinational.
module config_ctrl (
  input  logic [2:0] sc,          // active slices {3,2,1}
  input  logic [2:0] dest,        // I8..6 of the S/F/D code
  input  logic       si,
  input  logic       ci,
  input  logic [2:0] cout,        // per slice, index 0 = slice 1
  input  logic [2:0] ram_lsb_out,
  input  logic [2:0] ram_msb_out,
  input  logic [2:0] q_lsb_out,
  input  logic [2:0] q_msb_out,
  output logic [2:0] en,
  output logic [2:0] cin,
  output logic [2:0] ram_lsb_in,
  output logic [2:0] ram_msb_in,
  output logic [2:0] q_lsb_in,
  output logic [2:0] q_msb_in,
  output logic       carry_top    // carry out of the highest active slice
);
  // index of the lowest / highest active slice
  logic [1:0] lo, hi;
  always_comb begin
    lo = 2'd0;
    hi = 2'd0;
    if (sc[0]) lo = 2'd0; else if (sc[1]) lo = 2'd1; else lo = 2'd2;
    if (sc[2]) hi = 2'd2; else if (sc[1]) hi = 2'd1; else hi = 2'd0;
  end

  logic bottom;   // bit entering the RAM at the bottom on an up shift

  always_comb begin
    en = sc;
    // carry chain, lowest slice first
    cin[0] = ci;
    cin[1] = sc[0] ? cout[0] : ci;
    cin[2] = sc[1] ? cout[1] : (sc[0] ? cout[0] : ci);
    carry_top = cout[hi];

    // down shift: each slice takes the bit leaving the next active one above
    ram_msb_in[2] = si;
    ram_msb_in[1] = sc[2] ? ram_lsb_out[2] : si;
    ram_msb_in[0] = sc[1] ? ram_lsb_out[1] : (sc[2] ? ram_lsb_out[2] : si);
    q_msb_in[2]   = ram_lsb_out[lo];
    q_msb_in[1]   = sc[2] ? q_lsb_out[2] : ram_lsb_out[lo];
    q_msb_in[0]   = sc[1] ? q_lsb_out[1] : (sc[2] ? q_lsb_out[2] : ram_lsb_out[lo]);

    // up shift: each slice takes the bit leaving the next active one below
    q_lsb_in[0]   = si;
    q_lsb_in[1]   = sc[0] ? q_msb_out[0] : si;
    q_lsb_in[2]   = sc[1] ? q_msb_out[1] : (sc[0] ? q_msb_out[0] : si);
    bottom = (dest == 3'd6) ? q_msb_out[hi] : si;
    ram_lsb_in[0] = bottom;
    ram_lsb_in[1] = sc[0] ? ram_msb_out[0] : bottom;
    ram_lsb_in[2] = sc[1] ? ram_msb_out[1] : (sc[0] ? ram_msb_out[0] : bottom);
  end
endmodule
