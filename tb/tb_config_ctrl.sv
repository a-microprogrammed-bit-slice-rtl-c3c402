// tb_config_ctrl: checks the slice chaining of the configuration control for
// every slice selection and destination with random link values. The
// expected links are computed from an explicit list of the active slices,
// ordered from slice 1 upwards.
module tb_config_ctrl;
  logic [2:0] sc, dest, cout, rlo, rmo, qlo, qmo;
  logic si, ci;
  logic [2:0] en, cin, rli, rmi, qli, qmi;
  logic carry_top;
  int checks = 0, failures = 0;

  config_ctrl dut (.sc, .dest, .si, .ci, .cout, .ram_lsb_out(rlo), .ram_msb_out(rmo),
    .q_lsb_out(qlo), .q_msb_out(qmo), .en, .cin, .ram_lsb_in(rli), .ram_msb_in(rmi),
    .q_lsb_in(qli), .q_msb_in(qmi), .carry_top);

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (sc=%b dest=%0d)", what, got, exp, sc, dest);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int act[$];
    for (int n = 0; n < 3000; n++) begin
      sc = 3'($urandom_range(1, 7)); dest = 3'($urandom);
      si = 1'($urandom); ci = 1'($urandom);
      cout = 3'($urandom); rlo = 3'($urandom); rmo = 3'($urandom);
      qlo = 3'($urandom); qmo = 3'($urandom);
      #1;
      act.delete();
      for (int k = 0; k < 3; k++) if (sc[k]) act.push_back(k);
      check("en", en == sc, 1'b1);
      check("carry_top", carry_top, cout[act[act.size()-1]]);
      for (int p = 0; p < act.size(); p++) begin
        int k, below, above;
        k = act[p];
        below = (p > 0) ? act[p-1] : -1;
        above = (p < act.size() - 1) ? act[p+1] : -1;
        check("cin", cin[k], (below >= 0) ? cout[below] : ci);
        // down shift
        check("ram_msb_in", rmi[k], (above >= 0) ? rlo[above] : si);
        check("q_msb_in", qmi[k], (above >= 0) ? qlo[above] : rlo[act[0]]);
        // up shift
        check("q_lsb_in", qli[k], (below >= 0) ? qmo[below] : si);
        check("ram_lsb_in", rli[k], (below >= 0) ? rmo[below] :
                                     ((dest == 3'd6) ? qmo[act[act.size()-1]] : si));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
