// fs_demux: the 1-to-2 demultiplexer at the heart of a fanout-splitting cell.
//
// A conventional logarithmic shifter puts a 2:1 MUX in every cell, so each
// data bit fans out to two cells of the next level and both wires toggle with
// the data. Here each cell instead steers its bit onto exactly one of two
// branch wires: `stay` goes straight down to the cell of the same position,
// `shift` goes to the cell 2^k positions to the right. The branch that is not
// selected sits at a constant rest level whatever the data does, so in a
// shifting stage the non-shifting wires are quiet, and vice versa.
//
// The cell is two 2-input gates fed by the select and its complement:
//   GATE_NAND: stay = NAND(x, sel_n), shift = NAND(x, sel)
//              branches are active low and rest at 1.
//   GATE_NOR : stay = NOR(x, sel),    shift = NOR(x, sel_n)
//              branches carry the inverted data and rest at 0.
// The merge gate of the next level (fs_merge, same style) restores the true
// polarity. The two gate styles follow the document's NAND and NOR networks;
// the exact pin assignment of the select rails is this design's own.
//
// Purely combinational, one gate delay from x or sel to either branch.
module fs_demux
  import shifter_pkg::*;
#(
  parameter gate_style_e GATE = GATE_NAND
) (
  input  logic x,      // cell data, true polarity
  input  logic sel,    // stage select: 1 = take the shifting branch
  input  logic sel_n,  // complement of sel
  output logic stay,   // non-shifting branch
  output logic shift   // shifting branch
);

  if (GATE == GATE_NAND) begin : g_nand
    assign stay  = ~(x & sel_n);
    assign shift = ~(x & sel);
  end else begin : g_nor
    assign stay  = ~(x | sel);
    assign shift = ~(x | sel_n);
  end

endmodule
