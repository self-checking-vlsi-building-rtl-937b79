// sc_node_tb: end-to-end testbench of the self-checking node at its default
// size (16-bit modules, one neighbour status pair).
//
// Two behavioural modules (pm_model) run in lock step on the same random
// input words, with their reset and interrupt driven by the node. Over the
// run the testbench
//   - injects transient faults (a random state bit flipped) into module A or
//     module B,
//   - holds a permanent fault (one output bit stuck) in module B for a while,
//   - drives the neighbour status with code values and now and then with a
//     noncode value (00 or 11), a failing neighbour.
// Every cycle it checks, against values computed from the module outputs:
// functional output = module A's output; failure indicator = {^A, ~^A} when
// the modules agree and noncode when they differ; reset = disagreement;
// interrupt = neighbour status noncode. It also checks that a disagreement is
// flagged in the same cycle the wrong output appears and that one clock later
// both modules are back at the sane state (zero) and agree again.
// Each mechanism (match, no-match, local reset, recovery from a transient,
// repeated detection of a permanent fault, neighbour interrupt) must happen
// at least once.
module sc_node_tb;
  import trc_pkg::*;

  localparam int N = 16;

  int checks = 0;
  int failures = 0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] din, flip_a, flip_b, a_out, b_out, func_out;
  logic         stuck_en;
  logic [3:0]   stuck_bit;
  logic         stuck_val;
  tr_pair_t     nbr_status [1];
  tr_pair_t     fail_ind;
  logic         mod_reset, mod_int;

  pm_model #(.N(N)) u_a (.clk, .reset(mod_reset), .intr(mod_int), .din, .flip(flip_a),
                         .stuck_en(1'b0), .stuck_bit(4'd0), .stuck_val(1'b0), .dout(a_out));
  pm_model #(.N(N)) u_b (.clk, .reset(mod_reset), .intr(mod_int), .din, .flip(flip_b),
                         .stuck_en, .stuck_bit, .stuck_val, .dout(b_out));

  sc_node dut (
    .mod_a_out  (a_out),
    .mod_b_out  (b_out),
    .nbr_status (nbr_status),
    .func_out   (func_out),
    .fail_ind   (fail_ind),
    .mod_reset  (mod_reset),
    .mod_int    (mod_int)
  );

  int n_match, n_nomatch, n_reset, n_recover, n_perm, n_int, n_inject;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Checks of the node's combinational outputs, sampled before each clock edge.
  task automatic check_outputs();
    logic differ = (a_out != b_out);
    check(func_out == a_out, "functional output is module A");
    if (differ) check(fail_ind[1] == fail_ind[0], $sformatf("noncode on mismatch, got %b", fail_ind));
    else        check(fail_ind == {^a_out, ~^a_out}, $sformatf("code on match, got %b", fail_ind));
    check(mod_reset == differ, "reset equals mismatch");
    check(mod_int == (nbr_status[0][1] == nbr_status[0][0]), "interrupt equals neighbour noncode");
    if (differ) n_nomatch++; else n_match++;
    if (mod_reset) n_reset++;
    if (mod_int) n_int++;
  endtask

  initial begin
    // start from a reset, as at power-up: force both modules through one
    // disagreement so that the node resets them.
    din = '0; flip_a = '0; flip_b = '0;
    stuck_en = 1'b0; stuck_bit = '0; stuck_val = 1'b0;
    nbr_status[0] = 2'b01;
    @(negedge clk);
    stuck_en = 1'b1; stuck_bit = 4'd0; stuck_val = ~a_out[0];   // makes A != B
    @(negedge clk);
    stuck_en = 1'b0;
    @(negedge clk);
    check(a_out == '0 && b_out == '0, "both modules at sane state after start-up reset");

    for (int cyc = 0; cyc < 2000; cyc++) begin
      // inputs for the next clock edge
      din = N'($urandom);
      nbr_status[0] = ($urandom_range(0, 19) == 0) ? {2{1'($urandom)}}
                                                   : (1'($urandom) ? 2'b10 : 2'b01);
      flip_a = '0;
      flip_b = '0;
      stuck_en = (cyc >= 1200 && cyc < 1300);
      stuck_bit = 4'd9;
      stuck_val = 1'b1;
      #1;
      check_outputs();
      if (stuck_en && mod_reset) n_perm++;

      // a transient fault every so often, only while the node is healthy
      if (!stuck_en && !mod_reset && !mod_int && $urandom_range(0, 24) == 0) begin
        if (1'($urandom)) flip_a = N'(1) << $urandom_range(0, N-1);
        else              flip_b = N'(1) << $urandom_range(0, N-1);
        n_inject++;
        @(negedge clk);
        flip_a = '0;
        flip_b = '0;
        din = N'($urandom);
        #1;
        // the wrong output is flagged in the cycle it appears
        check(mod_reset == 1'b1 && fail_ind[1] == fail_ind[0], "transient detected at once");
        check_outputs();
        @(negedge clk);
        // one clock later both modules are back at the sane state and agree
        check(a_out == '0 && b_out == '0, "both modules reset after no-match");
        if (a_out == b_out) n_recover++;
        continue;
      end
      @(negedge clk);
    end

    $display("match=%0d no_match=%0d reset=%0d injected=%0d recovered=%0d permanent=%0d interrupt=%0d",
             n_match, n_nomatch, n_reset, n_inject, n_recover, n_perm, n_int);
    check(n_match > 0,   "matching cycles seen");
    check(n_nomatch > 0, "no-match seen");
    check(n_reset > 0,   "local reset seen");
    check(n_recover > 0 && n_recover == n_inject, "every transient recovered");
    check(n_perm > 1,    "permanent fault detected repeatedly");
    check(n_int > 0,     "neighbour interrupt seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
