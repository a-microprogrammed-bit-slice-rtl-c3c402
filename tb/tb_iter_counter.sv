// tb_iter_counter: random loads, increments, pushes and pops of the iteration
// counter against a model with its own stack; checks the count and the
// overflow condition every cycle, and that a preset count of 256-N gives N
// increments until overflow.
module tb_iter_counter;
  logic clk = 0; always #5 clk = ~clk;
  logic rst, load, inc, push, pop; logic [7:0] lv, count; logic ofl;
  int checks = 0, failures = 0;

  iter_counter dut (.clk, .rst, .load, .load_val(lv), .inc, .push, .pop, .count, .ofl);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] m; logic [7:0] stk[4]; int sp; int n_inc; logic [7:0] old;
    rst = 1; load = 0; inc = 0; push = 0; pop = 0; lv = 0;
    @(posedge clk); #1; rst = 0; m = 0; sp = 0;
    for (int k = 0; k < 4; k++) stk[k] = 0;
    for (int n = 0; n < 5000; n++) begin
      load = ($urandom_range(0, 9) == 0); lv = 8'($urandom); inc = 1'($urandom);
      push = ($urandom_range(0, 7) == 0); pop = ($urandom_range(0, 7) == 0);
      @(posedge clk); #1;
      old = m;
      if (pop) begin sp = (sp + 3) % 4; m = stk[sp]; end
      else if (load) m = lv;
      else if (inc) m = m + 1;
      if (push && !pop) begin stk[sp] = old; sp = (sp + 1) % 4; end
      check("count", count, m);
      check("ofl", ofl, m == 8'hff);
    end
    // preset loop: 256-N then count increments until overflow
    load = 1; lv = 8'(256 - 13); inc = 0; push = 0; pop = 0;
    @(posedge clk); #1; load = 0; n_inc = 1;
    while (!ofl && n_inc < 300) begin
      inc = 1; @(posedge clk); #1; n_inc++;
    end
    inc = 0;
    check("executions until CTROFL", n_inc, 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
