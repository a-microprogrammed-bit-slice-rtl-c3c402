// tb_am2901_slice: random self-checking test of one 8-bit processor slice.
// A reference model (register file, Q, and the Am2901 source, function and
// destination tables written out independently) runs beside the slice; every
// cycle the combinational outputs are compared, and the register file is
// compared at the end.
module tb_am2901_slice;
  localparam int W = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic en; logic [8:0] i; logic [3:0] a, b; logic [W-1:0] d;
  logic cin, rli, rmi, qli, qmi;
  logic [W-1:0] y; logic cout, ovr, fz, fs, rlo, rmo, qlo, qmo, shl, shm;
  int checks = 0, failures = 0;

  am2901_slice dut (.clk, .en, .i, .a_addr(a), .b_addr(b), .d, .cin,
    .ram_lsb_in(rli), .ram_msb_in(rmi), .q_lsb_in(qli), .q_msb_in(qmi),
    .y, .cout, .ovr, .f_zero(fz), .f_sign(fs), .ram_lsb_out(rlo), .ram_msb_out(rmo),
    .q_lsb_out(qlo), .q_msb_out(qmo), .sh_lsb(shl), .sh_msb(shm));

  logic [W-1:0] m_ram [16];
  logic [W-1:0] m_q;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (i=%o)", what, got, exp, i);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned rr, ss, ff, fw; bit c, v;
    // initialise every register (destination RAMF, source DZ, function OR: B := D)
    en = 1; cin = 0; rli = 0; rmi = 0; qli = 0; qmi = 0; a = 0;
    for (int k = 0; k < 16; k++) begin
      i = {3'd3, 3'd3, 3'd7}; b = 4'(k); d = 8'(k * 17 + 3);
      m_ram[k] = d;
      @(posedge clk); #1;
    end
    i = {3'd0, 3'd3, 3'd7}; d = 8'h5a; m_q = 8'h5a; @(posedge clk); #1;

    for (int n = 0; n < 4000; n++) begin
      en = ($urandom_range(0, 7) != 0);
      i = 9'($urandom); a = 4'($urandom); b = 4'($urandom); d = 8'($urandom);
      cin = 1'($urandom); rli = 1'($urandom); rmi = 1'($urandom);
      qli = 1'($urandom); qmi = 1'($urandom);
      #1;
      // reference source operands
      case (i[2:0])
        0: begin rr = m_ram[a]; ss = m_q; end
        1: begin rr = m_ram[a]; ss = m_ram[b]; end
        2: begin rr = 0; ss = m_q; end
        3: begin rr = 0; ss = m_ram[b]; end
        4: begin rr = 0; ss = m_ram[a]; end
        5: begin rr = d; ss = m_ram[a]; end
        6: begin rr = d; ss = m_q; end
        default: begin rr = d; ss = 0; end
      endcase
      c = 0; v = 0;
      case (i[5:3])
        0: fw = rr + ss + cin;
        1: fw = ss + (~rr & 8'hff) + cin;
        2: fw = rr + (~ss & 8'hff) + cin;
        3: fw = rr | ss;
        4: fw = rr & ss;
        5: fw = (~rr & 8'hff) & ss;
        6: fw = rr ^ ss;
        default: fw = (~(rr ^ ss)) & 8'hff;
      endcase
      ff = fw & 8'hff;
      if (i[5:3] <= 2) begin
        int sr, sssum;
        c = fw[8];
        // signed overflow from signed arithmetic
        case (i[5:3])
          0: sssum = $signed(8'(rr)) + $signed(8'(ss));
          1: sssum = $signed(8'(ss)) - $signed(8'(rr));
          default: sssum = $signed(8'(rr)) - $signed(8'(ss));
        endcase
        // with carry in the ideal result is off by one; overflow is whether
        // the 8-bit result differs from the true signed result
        sr = sssum + ((i[5:3] == 0) ? int'(cin) : int'(cin) - 1);
        v = (sr > 127 || sr < -128);
      end
      check("y", y, (i[8:6] == 2) ? m_ram[a] : ff);
      check("f_zero", fz, ff == 0);
      check("f_sign", fs, ff[7]);
      check("cout", cout, c);
      check("ovr", ovr, v);
      check("ram_lsb_out", rlo, ff[0]);
      check("ram_msb_out", rmo, ff[7]);
      check("q_lsb_out", qlo, m_q[0]);
      check("q_msb_out", qmo, m_q[7]);
      begin
        logic [7:0] esh;
        case (i[8:6])
          4, 5: esh = 8'((ff >> 1) | (int'(rmi) << 7));
          6, 7: esh = 8'((ff << 1) | rli);
          default: esh = 8'(ff);
        endcase
        check("sh_lsb", shl, esh[0]);
        check("sh_msb", shm, esh[7]);
      end
      // reference state update
      if (en) begin
        case (i[8:6])
          0: m_q = 8'(ff);
          1: ;
          2, 3: m_ram[b] = 8'(ff);
          4: begin m_ram[b] = 8'((ff >> 1) | (int'(rmi) << 7)); m_q = {qmi, m_q[7:1]}; end
          5: m_ram[b] = 8'((ff >> 1) | (int'(rmi) << 7));
          6: begin m_ram[b] = 8'((ff << 1) | rli); m_q = {m_q[6:0], qli}; end
          default: m_ram[b] = 8'((ff << 1) | rli);
        endcase
      end
      @(posedge clk); #1;
    end
    // read back every register through Y (destination RAMA shows A)
    en = 0;
    for (int k = 0; k < 16; k++) begin
      i = {3'd2, 3'd3, 3'd4}; a = 4'(k); #1;
      check("ram readback", y, m_ram[k]);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
