// trc_selftest_tb: four-word self-test of a 16-pair checker tree (the
// comparator for two 16-bit modules).
//
// A tree of two-pair cells is fully exercised when every cell receives each
// of its four code inputs, whatever the width of the tree. This testbench
// builds four input words that do that and checks it on every cell inside a
// 16-pair tree, then shows that these four words expose single faults in any
// cell of the tree.
//
// Construction of the words: over the four words, the 'a' rail of every node
// of the tree carries a 4-bit sequence of weight two, one of 0011, 0101, 0110
// or a complement. Any two of these three classes XOR to the third, and a
// cell whose two inputs carry sequences of two different classes sees all
// four combinations (00, 01, 10, 11). Starting from 0011 at the root, each
// cell gives its (a1,b1) input the next class and its (a0,b0) input the XOR
// of the two, down to the input pairs.
//
// Checks: (1) the root output is a code word for all four words; (2) every
// cell sees all four code inputs; (3) with each cell output line forced to 0
// and to 1 in turn (a stuck-at fault on an internal line), at least one of the
// four words gives a noncode root output.
module trc_selftest_tb;
  import trc_pkg::*;

  localparam int N = 16;

  int checks = 0;
  int failures = 0;

  logic [N-1:0] a, b;
  tr_pair_t     c;

  trc_tree #(.N(N)) dut (.a(a), .b(b), .c(c));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // sequences over the four words, indexed as heap nodes like the tree
  logic [3:0] seq [1:2*N-1];
  logic [N-1:0] word [4];

  function automatic logic [3:0] next_class(logic [3:0] s);
    if (s == 4'b0011 || s == 4'b1100) return 4'b0101;
    if (s == 4'b0101 || s == 4'b1010) return 4'b0110;
    return 4'b0011;
  endfunction

  // the input pairs each cell sees, observed inside the tree
  tr_pair_t cin1 [1:N-1];
  tr_pair_t cin0 [1:N-1];
  for (genvar k = 1; k < N; k++) begin : g_obs
    assign cin1[k] = dut.g_cell[k].u_cell.in1;
    assign cin0[k] = dut.g_cell[k].u_cell.in0;
  end

  // stuck-at fault on one cell output line, selected at run time
  int  f_cell = 0;     // 0: no fault
  int  f_line = 0;
  logic f_val = 1'b0;
  for (genvar k = 1; k < N; k++) begin : g_force
    always @(f_cell or f_line or f_val) begin
      if (f_cell == k && f_line == 1 && f_val)  force dut.g_cell[k].u_cell.c[1] = 1'b1;
      else if (f_cell == k && f_line == 1)       force dut.g_cell[k].u_cell.c[1] = 1'b0;
      else                                       release dut.g_cell[k].u_cell.c[1];
      if (f_cell == k && f_line == 0 && f_val)  force dut.g_cell[k].u_cell.c[0] = 1'b1;
      else if (f_cell == k && f_line == 0)       force dut.g_cell[k].u_cell.c[0] = 1'b0;
      else                                       release dut.g_cell[k].u_cell.c[0];
    end
  end

  bit seen [1:N-1][4];

  initial begin
    seq[1] = 4'b0011;
    for (int k = 1; k < N; k++) begin
      seq[2*k]   = next_class(seq[k]);
      seq[2*k+1] = seq[2*k] ^ seq[k];
    end
    for (int w = 0; w < 4; w++)
      for (int i = 0; i < N; i++) word[w][i] = seq[2*N-1-i][w];

    // (1) and (2): fault-free tree
    foreach (seen[k, j]) seen[k][j] = 0;
    for (int w = 0; w < 4; w++) begin
      a = word[w];
      b = ~word[w];
      #1;
      check(c[1] != c[0], $sformatf("root output code for word %0d", w));
      for (int k = 1; k < N; k++) begin
        check(cin1[k][1] != cin1[k][0] && cin0[k][1] != cin0[k][0],
              $sformatf("cell %0d inputs are code words", k));
        seen[k][{cin1[k][1], cin0[k][1]}] = 1;
      end
    end
    for (int k = 1; k < N; k++)
      for (int j = 0; j < 4; j++)
        check(seen[k][j], $sformatf("cell %0d never saw code input %0d", k, j));

    // (3): stuck-at faults on every internal cell output line
    for (int k = 1; k < N; k++) begin
      for (int ln = 0; ln < 2; ln++) begin
        for (int v = 0; v < 2; v++) begin
          bit det;
          det = 0;
          f_cell = k; f_line = ln; f_val = v[0];
          for (int w = 0; w < 4; w++) begin
            a = word[w];
            b = ~word[w];
            #1;
            if (c[1] == c[0]) det = 1;
          end
          check(det, $sformatf("cell %0d line c%0d stuck-at-%0d not detected", k, ln, v));
        end
      end
    end
    f_cell = 0;
    #1;

    $display("test words: %h %h %h %h", word[0], word[1], word[2], word[3]);
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
