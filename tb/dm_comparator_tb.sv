// dm_comparator_tb: self-checking testbench for the duplication-and-matching
// comparator.
//
// Drives pairs of module words: equal words, words differing in one bit (every
// bit position in turn) and random words. The reference, computed from the
// inputs only: no_match = (x != y); for equal words the output pair must be
// {^x, ~^x}, for different words it must be 00 or 11. Checks the default
// 16-bit comparator and a 3-bit one.
module dm_comparator_tb;
  import trc_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [15:0] x, y;
  logic [2:0]  xs, ys;
  tr_pair_t    c, cs;
  logic        nm, nms;

  dm_comparator           dut  (.x(x),  .y(y),  .c(c),  .no_match(nm));
  dm_comparator #(.N(3))  dut3 (.x(xs), .y(ys), .c(cs), .no_match(nms));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(logic [15:0] xv, logic [15:0] yv);
    x  = xv;
    y  = yv;
    xs = xv[2:0];
    ys = yv[2:0];
    #1;
    check(nm == (xv != yv), $sformatf("N=16 no_match x=%h y=%h", xv, yv));
    if (xv == yv) check(c == {^xv, ~^xv}, $sformatf("N=16 match code x=%h c=%b", xv, c));
    else          check(c[1] == c[0], $sformatf("N=16 mismatch noncode x=%h y=%h c=%b", xv, yv, c));
    check(nms == (xv[2:0] != yv[2:0]), $sformatf("N=3 no_match x=%h y=%h", xv[2:0], yv[2:0]));
    if (xv[2:0] == yv[2:0])
      check(cs == {^xv[2:0], ~^xv[2:0]}, "N=3 match code");
    else
      check(cs[1] == cs[0], "N=3 mismatch noncode");
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [15:0] v;
      v = 16'($urandom);
      apply(v, v);
      for (int i = 0; i < 16; i++) apply(v, v ^ (16'd1 << i));
      apply(v, 16'($urandom));
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
