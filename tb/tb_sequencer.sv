// tb_sequencer: random next-address selections, holds, pushes, pops and loop
// register writes against a model of the 12-bit sequencer; checks the
// output address and the uPC every cycle.
module tb_sequencer;
  logic clk = 0; always #5 clk = ~clk;
  logic rst, hold, push, pop, ls; logic [1:0] sel; logic [11:0] d, y, upc;
  int checks = 0, failures = 0;

  sequencer dut (.clk, .rst, .sel, .d, .hold, .push, .pop, .loop_set(ls), .y, .upc);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [11:0] m_upc, m_loop, ey; logic [11:0] stk[4]; int sp;
    rst = 1; sel = 0; d = 0; hold = 0; push = 0; pop = 0; ls = 0;
    @(posedge clk); #1; rst = 0;
    m_upc = 0; m_loop = 0; sp = 0; for (int k = 0; k < 4; k++) stk[k] = 0;
    for (int n = 0; n < 5000; n++) begin
      sel = 2'($urandom); d = 12'($urandom); hold = ($urandom_range(0, 5) == 0);
      push = ($urandom_range(0, 5) == 0); pop = ($urandom_range(0, 5) == 0);
      ls = ($urandom_range(0, 7) == 0);
      #1;
      case (sel)
        0: ey = m_upc;
        1: ey = d;
        2: ey = stk[(sp + 3) % 4];
        default: ey = m_loop;
      endcase
      check("y", y, ey);
      check("upc", upc, m_upc);
      @(posedge clk); #1;
      if (ls) m_loop = m_upc;
      if (push && !pop) begin stk[sp] = m_upc; sp = (sp + 1) % 4; end
      else if (pop && !push) sp = (sp + 3) % 4;
      if (!hold) m_upc = ey + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
