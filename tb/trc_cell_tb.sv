// trc_cell_tb: self-checking testbench for the two-pair two-rail checker cell.
//
// Part 1 applies all 16 input combinations to the fault-free cell and checks
// the output against the code definition: both pairs valid -> c = {p, ~p}
// with p = a1 ^ a0; any pair invalid -> c is 00 or 11.
//
// Part 2 is a single-fault campaign that checks the self-testing property:
// for every modelled single fault there must be a code input (one of the four
// valid words) that makes the faulty cell produce a noncode output. Faults in
// the planes are built by overriding the cell's AND_PLANE / OR_PLANE:
//   - each of the 16 AND-plane and 8 OR-plane crosspoints flipped
//     (missing or extra device),
//   - each product term stuck-at-0 (full row) and stuck-at-1 (empty row),
//   - each output line stuck-at-1 (column with no devices).
// Faults on the wires around the cell are modelled here: each input line
// stuck at 0 and at 1, each output line stuck at 0, and the two output lines
// shorted (wired-AND and wired-OR).
module trc_cell_tb;
  import trc_pkg::*;

  localparam logic [15:0] DEF_AND = {4'b1010, 4'b0110, 4'b0101, 4'b1001};
  localparam logic [7:0]  DEF_OR  = {2'b10, 2'b01, 2'b10, 2'b01};

  // faulty instances built from the planes
  localparam int NF = 16 + 8 + 4 + 4 + 2;

  int checks = 0;
  int failures = 0;

  tr_pair_t in1, in0, c;
  tr_pair_t cf [NF];

  trc_cell dut (.in1(in1), .in0(in0), .c(c));

  for (genvar k = 0; k < 16; k++) begin : g_and_flip
    trc_cell #(.AND_PLANE(DEF_AND ^ (16'd1 << k))) u (.in1(in1), .in0(in0), .c(cf[k]));
  end
  for (genvar k = 0; k < 8; k++) begin : g_or_flip
    trc_cell #(.AND_PLANE(DEF_AND), .OR_PLANE(DEF_OR ^ (8'd1 << k)))
      u (.in1(in1), .in0(in0), .c(cf[16+k]));
  end
  for (genvar r = 0; r < 4; r++) begin : g_pterm_sa0
    trc_cell #(.AND_PLANE(DEF_AND | (16'hF << (4*r)))) u (.in1(in1), .in0(in0), .c(cf[24+r]));
  end
  for (genvar r = 0; r < 4; r++) begin : g_pterm_sa1
    trc_cell #(.AND_PLANE(DEF_AND & ~(16'hF << (4*r)))) u (.in1(in1), .in0(in0), .c(cf[28+r]));
  end
  for (genvar j = 0; j < 2; j++) begin : g_out_sa1
    trc_cell #(.AND_PLANE(DEF_AND), .OR_PLANE(DEF_OR & ~8'(8'h55 << j)))
      u (.in1(in1), .in0(in0), .c(cf[32+j]));
  end

  // wire faults: stuck input line applied in front of a fault-free cell
  logic [3:0] line_mask_and, line_mask_or;
  tr_pair_t   cw;
  trc_cell u_wire (
    .in1 ((in1 & line_mask_and[3:2]) | line_mask_or[3:2]),
    .in0 ((in0 & line_mask_and[1:0]) | line_mask_or[1:0]),
    .c   (cw)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit detected [NF];
  bit wdet;

  initial begin
    line_mask_and = '1;
    line_mask_or  = '0;

    // Part 1: exhaustive function of the fault-free cell.
    for (int v = 0; v < 16; v++) begin
      logic a1, b1, a0, b0;
      {a1, b1, a0, b0} = 4'(v);
      in1 = {a1, b1};
      in0 = {a0, b0};
      #1;
      if (a1 != b1 && a0 != b0)
        check(c == {a1 ^ a0, ~(a1 ^ a0)}, $sformatf("code input %b -> %b", 4'(v), c));
      else
        check(c[1] == c[0], $sformatf("noncode input %b -> %b", 4'(v), c));
    end

    // Part 2a: plane faults, apply the four code inputs.
    foreach (detected[i]) detected[i] = 0;
    for (int w = 0; w < 4; w++) begin
      in1 = {w[1], ~w[1]};
      in0 = {w[0], ~w[0]};
      #1;
      for (int i = 0; i < NF; i++)
        if (cf[i][1] == cf[i][0]) detected[i] = 1;
    end
    for (int i = 0; i < NF; i++)
      check(detected[i], $sformatf("plane fault %0d not detected by any code input", i));

    // Part 2b: each input line stuck at 0 and at 1.
    for (int ln = 0; ln < 4; ln++) begin
      for (int sv = 0; sv < 2; sv++) begin
        line_mask_and = '1;
        line_mask_or  = '0;
        if (sv == 0) line_mask_and[ln] = 1'b0;
        else         line_mask_or[ln]  = 1'b1;
        wdet = 0;
        for (int w = 0; w < 4; w++) begin
          in1 = {w[1], ~w[1]};
          in0 = {w[0], ~w[0]};
          #1;
          if (cw[1] == cw[0]) wdet = 1;
        end
        check(wdet, $sformatf("input line %0d stuck-at-%0d not detected", ln, sv));
      end
    end
    line_mask_and = '1;
    line_mask_or  = '0;

    // Part 2c: output line stuck-at-0 and output lines shorted.
    for (int f = 0; f < 4; f++) begin
      wdet = 0;
      for (int w = 0; w < 4; w++) begin
        tr_pair_t o;
        in1 = {w[1], ~w[1]};
        in0 = {w[0], ~w[0]};
        #1;
        case (f)
          0: o = {1'b0, c[0]};
          1: o = {c[1], 1'b0};
          2: o = {2{c[1] & c[0]}};
          default: o = {2{c[1] | c[0]}};
        endcase
        if (o[1] == o[0]) wdet = 1;
      end
      check(wdet, $sformatf("output fault %0d not detected", f));
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
