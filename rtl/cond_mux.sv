// cond_mux: condition multiplexer (CMUX) of the microprogram control unit.
//
// Selects one of the sixteen conditions by the low four bits of the 5-bit CNR
// field; the fifth bit inverts it, so every condition is also available in
// inverted form and the inverted FALSE condition serves as "always". The
// five-bit select and the inverted forms follow the design; putting the
// invert bit at CNR[4] is this design's choice. Combinational.
module cond_mux (
  input  logic [15:0] cond,
  input  logic [4:0]  cnr,
  output logic        y
);
  assign y = cond[cnr[3:0]] ^ cnr[4];
endmodule
