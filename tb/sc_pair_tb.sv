// sc_pair_tb: two self-checking nodes wired as neighbours, each node's
// failure indicator driving the other's neighbour status input.
//
// Each node has two behavioural modules (pm_model) on its own random input
// stream. Transient faults are injected into one module of one node at a
// time. The testbench checks that the failing node flags noncode and resets
// its own modules, that the healthy neighbour is interrupted in the same
// cycle but is not reset (a failed node cannot reset its neighbours), and
// that both nodes agree again one clock later.
module sc_pair_tb;
  import trc_pkg::*;

  localparam int N = 16;

  int checks = 0;
  int failures = 0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] din   [2];
  logic [N-1:0] flip  [2];
  logic [N-1:0] a_out [2];
  logic [N-1:0] b_out [2];
  logic [N-1:0] func_out [2];
  tr_pair_t     fail_ind [2];
  tr_pair_t     status_in [2][1];
  logic         rst [2];
  logic         intr [2];

  assign status_in[0][0] = fail_ind[1];
  assign status_in[1][0] = fail_ind[0];

  for (genvar n = 0; n < 2; n++) begin : g_node
    pm_model #(.N(N)) u_a (.clk, .reset(rst[n]), .intr(intr[n]), .din(din[n]), .flip(flip[n]),
                           .stuck_en(1'b0), .stuck_bit(4'd0), .stuck_val(1'b0), .dout(a_out[n]));
    pm_model #(.N(N)) u_b (.clk, .reset(rst[n]), .intr(intr[n]), .din(din[n]), .flip('0),
                           .stuck_en(1'b0), .stuck_bit(4'd0), .stuck_val(1'b0), .dout(b_out[n]));
    sc_node u_node (
      .mod_a_out (a_out[n]), .mod_b_out (b_out[n]), .nbr_status (status_in[n]),
      .func_out (func_out[n]), .fail_ind (fail_ind[n]), .mod_reset (rst[n]), .mod_int (intr[n])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  int n_fail [2];

  initial begin
    flip[0] = '0; flip[1] = '0;
    din[0]  = '0; din[1]  = '0;
    // bring both nodes to a known state: force a disagreement in each
    @(negedge clk);
    flip[0] = 16'h0001; flip[1] = 16'h0001;
    @(negedge clk);
    flip[0] = '0; flip[1] = '0;
    @(negedge clk);
    @(negedge clk);
    check(a_out[0] == b_out[0] && a_out[1] == b_out[1], "both nodes healthy after start-up");

    for (int t = 0; t < 200; t++) begin
      int victim;
      victim = int'($urandom_range(0, 1));
      din[0] = N'($urandom);
      din[1] = N'($urandom);
      flip[victim] = N'(1) << $urandom_range(0, N-1);
      @(negedge clk);
      flip[victim] = '0;
      #1;
      check(is_noncode(fail_ind[victim]), "failing node flags noncode");
      check(rst[victim], "failing node resets itself");
      check(intr[1-victim], "neighbour interrupted");
      check(!rst[1-victim], "neighbour not reset");
      check(!is_noncode(fail_ind[1-victim]), "neighbour still healthy");
      check(!intr[victim], "failing node not interrupted");
      check(func_out[0] == a_out[0] && func_out[1] == a_out[1], "functional outputs");
      if (rst[victim] && intr[1-victim]) n_fail[victim]++;
      @(negedge clk);
      check(!rst[0] && !rst[1] && !intr[0] && !intr[1], "both nodes agree one clock later");
    end
    check(n_fail[0] > 0 && n_fail[1] > 0, "faults seen in both nodes");
    $display("failures handled: node0=%0d node1=%0d", n_fail[0], n_fail[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
