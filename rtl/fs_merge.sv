// fs_merge: the merge gate at the top of a fanout-splitting cell.
//
// Every cell below the input level receives two branch wires: the `stay`
// branch of the cell at the same logical position on the level above and the
// `shift` branch of the cell 2^k positions to its left. At most one of them
// is active, so merging them is a logical OR of the carried data. In the NAND
// network the branches are active low and the OR is one NAND2 gate; in the
// dual NOR network the branches carry inverted data and the merge is one NOR2
// gate. Either way the output is the cell's data in true polarity, which then
// feeds the cell's DEMUX or, on the last level, is the shifter output Z.
//
// Combinational, one gate delay.
module fs_merge
  import shifter_pkg::*;
#(
  parameter gate_style_e GATE = GATE_NAND
) (
  input  logic a,  // stay branch from the same position
  input  logic b,  // shift branch from position +2^k
  output logic y   // merged cell data, true polarity
);

  if (GATE == GATE_NAND) begin : g_nand
    assign y = ~(a & b);
  end else begin : g_nor
    assign y = ~(a | b);
  end

endmodule
