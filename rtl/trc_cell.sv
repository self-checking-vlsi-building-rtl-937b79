// trc_cell: self-testing two-rail code checker cell for two input pairs.
//
// Inputs are two two-rail pairs (a1,b1) and (a0,b0); a pair is valid when
// b = ~a. The output pair {c1,c0} is 01 or 10 when both input pairs are valid
// and 00 or 11 otherwise. For valid inputs c1 = a1 ^ a0, so a tree of cells
// carries the parity of the 'a' rails up to its root.
//
// How it works: the cell is written as the two-level NOR-NOR PLA of the
// published schematic, one product term per code input (four rows for two
// pairs). A product-term line is the NOR of the input lines that carry a
// device in its row, so it is selected (1) only by the one code word for which
// all those inputs are 0. Each product term drives exactly one output column,
// and an output line is the NOR of its product terms. Rows whose code word has
// a1 == a0 pull down c1, the other two pull down c0. The device pattern
// (which crosspoints hold a transistor) is taken from the schematic and kept
// in the AND_PLANE and OR_PLANE parameters, so a missing or extra device, a
// product term stuck at 0 (a full row) or stuck at 1 (an empty row) can be
// modelled by overriding them; the defaults are the fault-free cell.
//
// Interface: purely combinational, no clock. In the original circuit the
// lines are precharged or pulled up each cycle, so no state survives a cycle;
// the model is accordingly stateless.
//
// Plane encoding (this design's own): AND_PLANE[r] is row r (0 = top row of
// the schematic), bit 3..0 = input columns a1, b1, a0, b0. OR_PLANE[r] bit 1
// connects row r to c1, bit 0 to c0.
module trc_cell
  import trc_pkg::*;
#(
  parameter logic [3:0][3:0] AND_PLANE = {4'b1010,   // row 3: a1, a0
                                          4'b0110,   // row 2: b1, a0
                                          4'b0101,   // row 1: b1, b0
                                          4'b1001},  // row 0: a1, b0
  parameter logic [3:0][1:0] OR_PLANE  = {2'b10,     // row 3 -> c1
                                          2'b01,     // row 2 -> c0
                                          2'b10,     // row 1 -> c1
                                          2'b01}     // row 0 -> c0
) (
  input  tr_pair_t in1,   // {a1, b1}
  input  tr_pair_t in0,   // {a0, b0}
  output tr_pair_t c      // {c1, c0}
);

  logic [3:0] in_lines;   // input columns a1, b1, a0, b0
  logic [3:0] pterm;      // product-term lines, one per row

  assign in_lines = {in1, in0};

  // AND plane: each row is pulled low by any of its devices whose input is 1.
  always_comb begin
    for (int r = 0; r < 4; r++)
      pterm[r] = ~|(in_lines & AND_PLANE[r]);
  end

  // OR plane: each output column is pulled low by any product term it holds.
  always_comb begin
    for (int j = 0; j < 2; j++) begin
      c[j] = 1'b1;
      for (int r = 0; r < 4; r++)
        if (OR_PLANE[r][j] && pterm[r]) c[j] = 1'b0;
    end
  end

endmodule
