// trc_tree_tb: self-checking testbench for the two-rail checker tree.
//
// The reference is the code definition, worked out directly from the inputs:
// if every pair (a[i], b[i]) has b[i] = ~a[i] the output must be
// {^a, ~^a}; otherwise it must be 00 or 11. The eight-pair tree (the default)
// is tested on all 2^16 input words. A 16-pair and a 5-pair tree (a width
// that is not a power of two) get random words, both valid ones and words
// with one or more broken pairs.
module trc_tree_tb;
  import trc_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] a16, b16;
  logic [4:0]  a5, b5;
  tr_pair_t    c8, c16, c5;

  trc_tree              dut8  (.a(a8),  .b(b8),  .c(c8));
  trc_tree #(.N(16))    dut16 (.a(a16), .b(b16), .c(c16));
  trc_tree #(.N(5))     dut5  (.a(a5),  .b(b5),  .c(c5));

  function automatic tr_pair_t expect_c(logic [15:0] a, logic [15:0] b, int n);
    logic valid = 1'b1;
    logic par   = 1'b0;
    for (int i = 0; i < n; i++) begin
      if (a[i] == b[i]) valid = 1'b0;
      par ^= a[i];
    end
    return valid ? {par, ~par} : 2'b00;   // 00 stands for "any noncode"
  endfunction

  task automatic check_out(tr_pair_t got, tr_pair_t exp, string what);
    checks++;
    if (exp == 2'b00 ? (got[1] != got[0]) : (got != exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %b expected %s", what, got,
                                  exp == 2'b00 ? "noncode" : $sformatf("%b", exp));
    end
  endtask

  initial begin
    // exhaustive, 8 pairs
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      check_out(c8, expect_c({8'h0, a8}, {8'h0, b8}, 8), $sformatf("N=8 a=%h b=%h", a8, b8));
    end
    // random, 16 and 5 pairs
    for (int t = 0; t < 4000; t++) begin
      int nerr;
      a16 = 16'($urandom);
      b16 = ~a16;
      a5  = 5'($urandom);
      b5  = ~a5;
      nerr = int'($urandom_range(0, 2));
      for (int e = 0; e < nerr; e++) begin
        b16[$urandom_range(0, 15)] ^= 1'b1;
        b5[$urandom_range(0, 4)]   ^= 1'b1;
      end
      #1;
      check_out(c16, expect_c(a16, b16, 16), $sformatf("N=16 a=%h b=%h", a16, b16));
      check_out(c5, expect_c({11'h0, a5}, {11'h0, b5}, 5), $sformatf("N=5 a=%h b=%h", a5, b5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
