// am2901_slice: one 8-bit processor slice of the arithmetics processor.
//
// The design builds each slice from two Am2901 4-bit elements; this module
// models the pair as one 8-bit (parameter W) Am2901-compatible slice. It holds
// a 16-word dual-port register file (A and B read ports, B write port), a Q
// register, an ALU source selector, an eight-function ALU and the RAM and Q
// shifters. The 9-bit I field is the S/F/D code of the microinstruction:
// I2..0 source (AQ AB ZQ ZB ZA DA DQ DZ), I5..3 function (R+S, S-R, R-S, OR,
// AND, ~R&S, XOR, XNOR), I8..6 destination (QREG NOP RAMA RAMF RAMQD RAMD
// RAMQU RAMU). Subtraction adds the complement and the carry input, as the
// Am2901 does. For the logic functions this model gives carry and overflow 0
// (the Am2901 defines them by generate/propagate terms; they carry no meaning
// there). The RAM and Q shift pins are split into separate inputs and
// outputs; the configuration control chains them. sh_lsb and sh_msb give the
// end bits of the RAM shifter output (the value written to register B), from
// which the processor forms its RAM0 and RAM23 conditions.
//
// Timing: A/B read, ALU and Y are combinational; the register file and Q are
// written at the rising clock edge when en is high. en low makes the slice
// idle (no register or Q write), which is how inactive slices are switched off.
module am2901_slice #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         en,        // slice active in this cycle
  input  logic [8:0]   i,         // I8..I0
  input  logic [3:0]   a_addr,
  input  logic [3:0]   b_addr,
  input  logic [W-1:0] d,         // direct data input (from the AP-bus)
  input  logic         cin,
  input  logic         ram_lsb_in,  // shifted into F bit 0 on up shift
  input  logic         ram_msb_in,  // shifted into F bit W-1 on down shift
  input  logic         q_lsb_in,
  input  logic         q_msb_in,
  output logic [W-1:0] y,
  output logic         cout,
  output logic         ovr,
  output logic         f_zero,
  output logic         f_sign,
  output logic         ram_lsb_out, // F bit 0 (leaves on down shift)
  output logic         ram_msb_out, // F bit W-1 (leaves on up shift)
  output logic         q_lsb_out,
  output logic         q_msb_out,
  output logic         sh_lsb,      // bit 0 of the RAM shifter output
  output logic         sh_msb       // bit W-1 of the RAM shifter output
);
  logic [W-1:0] ram [16];
  logic [W-1:0] q;
  logic [W-1:0] a_d, b_d, r, s, f;
  logic [W:0]   sum;
  logic [W-1:0] sh;     // RAM shifter output, the value written to B

  assign a_d = ram[a_addr];
  assign b_d = ram[b_addr];

  // ALU source operands R and S
  always_comb begin
    unique case (i[2:0])
      3'd0: begin r = a_d;     s = q;       end
      3'd1: begin r = a_d;     s = b_d;     end
      3'd2: begin r = '0;      s = q;       end
      3'd3: begin r = '0;      s = b_d;     end
      3'd4: begin r = '0;      s = a_d;     end
      3'd5: begin r = d;       s = a_d;     end
      3'd6: begin r = d;       s = q;       end
      default: begin r = d;    s = '0;      end
    endcase
  end

  // ALU
  always_comb begin
    sum = '0;
    f   = '0;
    ovr = 1'b0;
    unique case (i[5:3])
      3'd0: sum = {1'b0, r} + {1'b0, s} + (W+1)'(cin);
      3'd1: sum = {1'b0, s} + {1'b0, ~r} + (W+1)'(cin);
      3'd2: sum = {1'b0, r} + {1'b0, ~s} + (W+1)'(cin);
      3'd3: f = r | s;
      3'd4: f = r & s;
      3'd5: f = ~r & s;
      3'd6: f = r ^ s;
      default: f = ~(r ^ s);
    endcase
    if (i[5:3] <= 3'd2) begin
      f = sum[W-1:0];
      unique case (i[5:3])
        3'd0: ovr = (r[W-1] == s[W-1]) && (f[W-1] != r[W-1]);
        3'd1: ovr = (s[W-1] != r[W-1]) && (f[W-1] != s[W-1]);
        default: ovr = (r[W-1] != s[W-1]) && (f[W-1] != r[W-1]);
      endcase
    end
  end

  assign cout        = (i[5:3] <= 3'd2) ? sum[W] : 1'b0;
  assign f_zero      = (f == '0);
  assign f_sign      = f[W-1];
  assign ram_lsb_out = f[0];
  assign ram_msb_out = f[W-1];
  assign q_lsb_out   = q[0];
  assign q_msb_out   = q[W-1];
  assign y           = (i[8:6] == 3'd2) ? a_d : f;

  // RAM shifter
  always_comb begin
    unique case (i[8:6])
      3'd4, 3'd5: sh = {ram_msb_in, f[W-1:1]};
      3'd6, 3'd7: sh = {f[W-2:0], ram_lsb_in};
      default:    sh = f;
    endcase
  end
  assign sh_lsb = sh[0];
  assign sh_msb = sh[W-1];

  always_ff @(posedge clk) begin
    if (en) begin
      unique case (i[8:6])
        3'd0: q <= f;
        3'd1: ;
        3'd4: begin ram[b_addr] <= sh; q <= {q_msb_in, q[W-1:1]}; end
        3'd6: begin ram[b_addr] <= sh; q <= {q[W-2:0], q_lsb_in}; end
        default: ram[b_addr] <= sh;
      endcase
    end
  end
endmodule
