// sc_node_nbrs_tb: checks a node with three neighbour status pairs and 4-bit
// modules. All 64 combinations of the three neighbour pairs are applied, each
// with matching and with mismatching module words; the interrupt must be high
// exactly when at least one neighbour pair is 00 or 11, and reset, failure
// indicator and functional output must follow the module words as in the
// single-neighbour node.
module sc_node_nbrs_tb;
  import trc_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [3:0] a_out, b_out, func_out;
  tr_pair_t   nbr_status [3];
  tr_pair_t   fail_ind;
  logic       mod_reset, mod_int;

  sc_node #(.N(4), .NBRS(3)) dut (
    .mod_a_out (a_out), .mod_b_out (b_out), .nbr_status (nbr_status),
    .func_out, .fail_ind, .mod_reset, .mod_int
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int s = 0; s < 64; s++) begin
      for (int t = 0; t < 16; t++) begin
        logic any_bad;
        a_out = 4'(t);
        b_out = (s % 2 == 0) ? a_out : a_out ^ (4'd1 << (t % 4));
        any_bad = 1'b0;
        for (int i = 0; i < 3; i++) begin
          nbr_status[i] = 2'((s >> (2 * i)) & 3);
          if (nbr_status[i] == 2'b00 || nbr_status[i] == 2'b11) any_bad = 1'b1;
        end
        #1;
        check(mod_int == any_bad, $sformatf("interrupt, status %0d", s));
        check(func_out == a_out, "functional output");
        check(mod_reset == (a_out != b_out), "reset on mismatch");
        if (a_out == b_out) check(fail_ind == {^a_out, ~^a_out}, "code on match");
        else                check(fail_ind[1] == fail_ind[0], "noncode on mismatch");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
